// tb_flexray_cc_full: one complete transfer between two controllers at the
// default parameters (128 Tx and Rx buffers, 8-frame FIFO, 8 samples per
// bit, 80 clocks per macrotick, 8 static slots of 300 macroticks). The host
// of node A loads a 254-byte frame for static slot 1 into Tx buffer 127 and
// a 6-byte frame for slot 8 into Tx buffer 0; node B takes slot 1 into Rx
// buffer 127 and slot 8 into its FIFO. Both payloads are read back over the
// OPB and compared, and the length of the 254-byte frame on the bus is
// checked: TSS 9 bits, FSS, 261 bytes of 10 bits (259 data bytes and a
// two-byte EEDC trailer) and FES, i.e. 2622 bits.
module tb_flexray_cc_full;
  import flexray_pkg::*;
  localparam logic [31:0] BASE = 32'h8000_0000;

  logic clk = 0, rst_n = 0;
  logic sel [2], rnw [2], ack [2], irq [2];
  logic [31:0] abus [2], dbus [2], sdbus [2];
  logic integ = 0;
  logic tx [2], tx_en [2];
  wire  bus = (tx_en[0] ? tx[0] : 1'b1) & (tx_en[1] ? tx[1] : 1'b1);
  int checks = 0, failures = 0;
  int en_clocks = 0, frames = 0;

  for (genvar g = 0; g < 2; g++) begin : g_node
    flexray_cc_top u_node (
      .clk, .rst_n,
      .OPB_select(sel[g]), .OPB_RNW(rnw[g]), .OPB_ABus(abus[g]), .OPB_DBus(dbus[g]),
      .Sl_DBus(sdbus[g]), .Sl_xferAck(ack[g]), .irq(irq[g]),
      .integration_ok(integ), .sync_ok(1'b0), .sync_error(1'b0),
      .tx(tx[g]), .tx_en(tx_en[g]), .rx(bus)
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // length of the first frame on the bus, in clocks
  always @(posedge clk) if (rst_n && frames == 0) begin
    if (tx_en[0]) en_clocks++;
    else if (en_clocks > 0) frames = 1;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic opb_wr(int n, logic [15:0] a, logic [31:0] d);
    @(negedge clk);
    sel[n] = 1; rnw[n] = 0; abus[n] = BASE | 32'(a); dbus[n] = d;
    @(posedge clk); #1;
    while (!ack[n]) begin @(posedge clk); #1; end
    @(negedge clk); sel[n] = 0;
  endtask

  task automatic opb_rd(int n, logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    sel[n] = 1; rnw[n] = 1; abus[n] = BASE | 32'(a); dbus[n] = 0;
    @(posedge clk); #1;
    while (!ack[n]) begin @(posedge clk); #1; end
    d = sdbus[n];
    @(negedge clk); sel[n] = 0;
  endtask

  byte unsigned pay [2][254];
  int words [2] = '{127, 3};
  int fids  [2] = '{1, 8};
  int bufs  [2] = '{127, 0};

  task automatic load_tx(int f);
    logic [10:0] fid;
    fid = 11'(fids[f]);
    opb_wr(0, 16'h018, bufs[f]);
    opb_wr(0, 16'h1000, {24'd0, 5'b00100, fid[10:8]});
    opb_wr(0, 16'h1004, {24'd0, fid[7:0]});
    opb_wr(0, 16'h1008, {24'd0, 7'(words[f]), 1'b0});
    opb_wr(0, 16'h100C, 32'h00);
    opb_wr(0, 16'h1010, 32'h00);
    for (int i = 0; i < 2 * words[f]; i++) begin
      pay[f][i] = 8'($urandom);
      opb_wr(0, 16'(16'h1014 + 4 * i), {24'd0, pay[f][i]});
    end
    opb_wr(0, 16'h01C, 32'(bufs[f]) | 32'h100);
  endtask

  initial begin
    logic [31:0] d;
    bit ok;
    sel = '{0, 0}; rnw = '{0, 0}; abus = '{0, 0}; dbus = '{0, 0};
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 2; n++) opb_wr(n, 16'h000, CMD_CONFIG_DONE);
    load_tx(0);
    load_tx(1);
    opb_wr(1, 16'h020, 127); opb_wr(1, 16'h028, 32'h3 | (1 << 4));
    opb_wr(1, 16'h050, 32'h7FF | (8 << 16)); opb_wr(1, 16'h054, 0); opb_wr(1, 16'h058, 0);
    opb_wr(1, 16'h05C, 32'h4);
    for (int n = 0; n < 2; n++) opb_wr(n, 16'h000, CMD_RUN);
    @(negedge clk); integ = 1; @(negedge clk); integ = 0;
    // wait for the end of static slot 8 of cycle 0
    while (!(g_node[1].u_node.slot_id == 11'd9)) @(posedge clk);
    chk(en_clocks == 2622 * 8, $sformatf("254-byte frame lasts 2622 bits (%0d clocks)", en_clocks));
    opb_wr(1, 16'h020, 127);
    opb_rd(1, 16'h034, d);
    chk(d[0], "Rx buffer 127 has new data");
    ok = 1;
    for (int i = 0; i < 254; i++) begin
      opb_rd(1, 16'(16'h2000 + 4 * i), d);
      if (d[7:0] != pay[0][i]) ok = 0;
    end
    chk(ok, "254-byte payload received");
    opb_rd(1, 16'h040, d);
    chk(!d[0] && d[15:8] == 1, "one frame in FIFO");
    ok = 1;
    for (int i = 0; i < 6; i++) begin
      opb_rd(1, 16'(16'h3000 + 4 * i), d);
      if (d[7:0] != pay[1][i]) ok = 0;
    end
    chk(ok, "6-byte payload received in FIFO");
    opb_rd(1, 16'h010, d);
    chk(d[5] && d[26:16] == 8, "last frame status valid, frame ID 8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
