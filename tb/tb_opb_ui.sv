// tb_opb_ui: drives OPB transfers into the user interface, with a simple
// register file modelled on the register bus (data valid one clock after
// the address). Checks write data/address, read data, the acknowledge
// timing (three clocks after the transfer is taken), that Sl_DBus is zero
// outside read acknowledges, that other address windows are ignored, and
// interrupt management: events set ISR bits, IER masks irq, write-1-to-clear.
module tb_opb_ui;
  logic clk = 0, rst_n = 0;
  logic OPB_select = 0, OPB_RNW = 0, Sl_xferAck, irq;
  logic [31:0] OPB_ABus = 0, OPB_DBus = 0, Sl_DBus;
  logic [9:0] events = 0;
  logic reg_wr;
  logic [15:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [31:0] regs [16];
  int checks = 0, failures = 0, lat;

  opb_ui dut (.*);
  always #5 clk = ~clk;

  // register file model on the register bus
  always_ff @(posedge clk) begin
    if (reg_wr) regs[reg_addr[5:2]] <= reg_wdata;
    reg_rdata <= regs[reg_addr[5:2]];
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && !Sl_xferAck && Sl_DBus != 0) begin
    failures++; $display("FAIL Sl_DBus not zero outside acknowledge");
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic xfer(bit rd, logic [31:0] a, logic [31:0] wd, output logic [31:0] d, output int l);
    @(negedge clk);
    OPB_select = 1; OPB_RNW = rd; OPB_ABus = a; OPB_DBus = wd;
    l = 0; d = 0;
    while (l < 20) begin
      @(posedge clk); #1; l++;
      if (Sl_xferAck) break;
    end
    d = Sl_DBus;
    @(negedge clk); OPB_select = 0;
  endtask

  initial begin
    logic [31:0] d;
    for (int i = 0; i < 16; i++) regs[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 4; i < 16; i++) begin
      xfer(0, 32'h8000_0000 + 4 * i, 32'hA500_0000 + i, d, lat);
      chk(lat == 4, $sformatf("write acknowledge latency %0d", lat));
    end
    for (int i = 4; i < 16; i++) begin
      xfer(1, 32'h8000_0000 + 4 * i, 0, d, lat);
      chk(d == 32'hA500_0000 + i && lat == 4, $sformatf("read back reg %0d = %h", i, d));
    end
    // outside the window: no acknowledge, no write
    xfer(0, 32'h9000_0010, 32'hDEAD, d, lat);
    chk(lat == 20, "other window ignored");
    chk(regs[4] == 32'hA500_0004, "no write outside window");
    // interrupts
    xfer(0, 32'h8000_000C, 32'h005, d, lat);   // IER bits 0 and 2
    @(negedge clk); events = 10'h002; @(negedge clk); events = 0;
    chk(!irq, "masked event does not interrupt");
    @(negedge clk); events = 10'h004; @(negedge clk); events = 0;
    @(negedge clk);
    chk(irq, "enabled event interrupts");
    xfer(1, 32'h8000_0008, 0, d, lat);
    chk(d == 32'h006, "ISR holds both events");
    xfer(0, 32'h8000_0008, 32'h004, d, lat);
    @(negedge clk);
    chk(!irq, "irq cleared by write 1");
    xfer(1, 32'h8000_0008, 0, d, lat);
    chk(d == 32'h002, "other ISR bit kept");
    xfer(1, 32'h8000_000C, 0, d, lat);
    chk(d == 32'h005, "IER read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
