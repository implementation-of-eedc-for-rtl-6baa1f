// tb_flexray_cc_top: two controllers (A and B) on one bus, driven by the
// testbench acting as both hosts over the OPB. The bus is a wired-AND of the
// two transmitters (idle high). The test configures both nodes, brings them
// to normal active together, and lets A send four frames per cycle: static
// slots 1 (20 bytes), 2 (254 bytes, two trailer bytes) and 3 (8 bytes), and
// the first dynamic slot (6 bytes). B stores slots 1 and 3 in Rx buffers and
// slots 2 and the dynamic one in its FIFO via acceptance filters. It checks
// the payloads read back over the OPB, the interrupt, a single bit error
// injected on the bus (corrected by EEDC), FIFO overflow, the stretch of the
// dynamic slot, the passive state (no transmission) after a sync error,
// recovery on sync OK, and halt. Before startup A goes through the wake-up
// state and sends a wakeup symbol, which B (not yet running) must report as
// two valid WUS phases; in cycle 1 A sends a media test symbol in the symbol
// window, which B must report as a valid symbol and A must not count as
// received. Each mechanism is counted and must occur.
module tb_flexray_cc_top;
  import flexray_pkg::*;
  localparam logic [31:0] BASE = 32'h8000_0000;
  localparam int CPM = 8, NST = 4, SMT = 2700, NMS = 40, MMT = 20;

  logic clk = 0, rst_n = 0;
  logic sel [2], rnw [2], ack [2], irq [2];
  logic [31:0] abus [2], dbus [2], sdbus [2];
  logic integ = 0, sync_ok = 0, sync_err_a = 0;
  logic tx [2], tx_en [2];
  logic inject = 0;
  wire  bus = ((tx_en[0] ? tx[0] : 1'b1) & (tx_en[1] ? tx[1] : 1'b1)) ^ inject;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_sent = 0, n_trail1 = 0, n_trail2 = 0, n_rxbuf = 0, n_fifo = 0, n_corr = 0;
  int n_ovf = 0, n_stretch = 0, n_passive_quiet = 0, n_irq = 0, n_halt = 0;
  int n_wus = 0, n_mts = 0;

  for (genvar g = 0; g < 2; g++) begin : g_node
    flexray_cc_top #(
      .C_BASEADDR(BASE), .N_TX_BUF(8), .N_RX_BUF(8), .FIFO_DEPTH(2),
      .CLKS_PER_MT(CPM), .N_STATIC(NST), .STATIC_SLOT_MT(SMT),
      .N_MINISLOTS(NMS), .MINISLOT_MT(MMT), .SYMBOL_MT(40), .NIT_MT(10)
    ) u_node (
      .clk, .rst_n,
      .OPB_select(sel[g]), .OPB_RNW(rnw[g]), .OPB_ABus(abus[g]), .OPB_DBus(dbus[g]),
      .Sl_DBus(sdbus[g]), .Sl_xferAck(ack[g]), .irq(irq[g]),
      .integration_ok(integ), .sync_ok(sync_ok), .sync_error(g == 0 ? sync_err_a : 1'b0),
      .tx(tx[g]), .tx_en(tx_en[g]), .rx(bus)
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors
  always @(posedge clk) if (rst_n) begin
    if (g_node[0].u_node.u_bse.done) begin
      n_sent++;
      if (g_node[0].u_node.u_bse.r_len > 8) n_trail2++; else n_trail1++;
    end
    if (g_node[1].u_node.u_rxb.in_end && g_node[1].u_node.u_rxb.active) n_rxbuf++;
    if (g_node[1].u_node.u_fifo.in_end && g_node[1].u_node.u_fifo.active) n_fifo++;
  end

  // dynamic slot stretch seen by B: a dynamic slot longer than one minislot
  int dyn_len = 0;
  always @(posedge clk) if (rst_n) begin
    if (g_node[1].u_node.u_mac.slot_start || g_node[1].u_node.u_mac.sym_start) begin
      if (dyn_len > MMT * CPM) n_stretch++;
      dyn_len = 0;
    end else if (g_node[1].u_node.u_mac.segment == SEG_DYNAMIC) dyn_len++;
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

  byte unsigned pay [4][254];
  int words [4] = '{10, 127, 4, 3};
  int fids  [4] = '{1, 2, 3, NST + 1};

  task automatic load_tx(int b);
    logic [10:0] fid;
    fid = 11'(fids[b]);
    opb_wr(0, 16'h018, b);
    opb_wr(0, 16'h1000, {24'd0, 5'b00100, fid[10:8]});
    opb_wr(0, 16'h1004, {24'd0, fid[7:0]});
    opb_wr(0, 16'h1008, {24'd0, 7'(words[b]), 1'b0});
    opb_wr(0, 16'h100C, 32'h5A);
    opb_wr(0, 16'h1010, 32'h80);
    for (int i = 0; i < 2 * words[b]; i++) begin
      pay[b][i] = 8'($urandom);
      opb_wr(0, 16'(16'h1014 + 4 * i), {24'd0, pay[b][i]});
    end
    opb_wr(0, 16'h01C, 32'(b) | 32'h100);
  endtask

  task automatic check_rxbuf(int rb, int b);
    logic [31:0] d;
    bit ok;
    ok = 1;
    opb_wr(1, 16'h020, rb);
    opb_rd(1, 16'h034, d);
    chk(d[0], $sformatf("Rx buffer %0d has new data", rb));
    for (int i = 0; i < 2 * words[b]; i++) begin
      opb_rd(1, 16'(16'h2000 + 4 * i), d);
      if (d[7:0] != pay[b][i]) ok = 0;
    end
    chk(ok, $sformatf("Rx buffer %0d payload", rb));
    opb_rd(1, 16'h02C, d);
    chk(d[23:17] == 7'(words[b]), "Rx buffer header length");
    opb_wr(1, 16'h034, 1);
  endtask

  task automatic check_fifo_head(int b);
    logic [31:0] d, h;
    bit ok;
    ok = 1;
    opb_rd(1, 16'h040, d);
    chk(!d[0], "FIFO not empty");
    opb_rd(1, 16'h048, h);
    opb_rd(1, 16'h044, d);
    chk({h[7:0], d}[34:24] == 11'(fids[b]), "FIFO head frame ID");
    for (int i = 0; i < 2 * words[b]; i++) begin
      opb_rd(1, 16'(16'h3000 + 4 * i), d);
      if (d[7:0] != pay[b][i]) ok = 0;
    end
    chk(ok, $sformatf("FIFO payload of frame ID %0d", fids[b]));
    opb_wr(1, 16'h040, 1);  // pop
  endtask

  task automatic wait_cycle(int c);
    while (g_node[1].u_node.u_mac.cycle != 6'(c)) @(posedge clk);
    repeat (20) @(posedge clk);
  endtask

  // flip one bit on the bus inside the payload of the slot-3 frame of cycle c
  task automatic inject_in_slot3(int c);
    while (!(g_node[0].u_node.u_mac.cycle == 6'(c) && g_node[0].u_node.u_mac.slot_id == 3 &&
             tx_en[0])) @(posedge clk);
    // TSS(9) + FSS + 7 bytes*10 bits + BSS(2) + 3 bits = bit 85
    repeat (85 * CPM + 2) @(posedge clk);
    @(negedge clk); inject = 1;
    repeat (CPM) @(negedge clk);
    inject = 0;
  endtask

  initial begin
    logic [31:0] d;
    int s0;
    sel = '{0, 0}; rnw = '{0, 0}; abus = '{0, 0}; dbus = '{0, 0};
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 2; n++) begin
      opb_rd(n, 16'h004, d);
      chk(d[3:0] == POC_CONFIG, "POC in config after reset");
      opb_wr(n, 16'h000, CMD_CONFIG_DONE);
      opb_rd(n, 16'h004, d);
      chk(d[3:0] == POC_READY, $sformatf("POC ready (status %h)", d));
    end
    // wake-up: A sends a WUS while B is ready
    opb_wr(0, 16'h060, 32'h2);
    opb_wr(0, 16'h000, CMD_WAKEUP);
    opb_rd(0, 16'h004, d);
    chk(d[3:0] == POC_WAKEUP, "A in wake-up");
    while (!g_node[0].u_node.u_sym.busy) @(posedge clk);
    while (g_node[0].u_node.u_sym.busy) @(posedge clk);
    repeat (40 * CPM) @(posedge clk);
    opb_rd(1, 16'h064, d);
    chk(d[15:8] == 8'd2, $sformatf("B saw two WUS phases (%h)", d));
    if (d[15:8] == 8'd2) n_wus++;
    opb_rd(0, 16'h064, d);
    chk(d == 0, "A does not count its own symbol");
    opb_wr(0, 16'h000, CMD_READY);
    opb_rd(0, 16'h004, d);
    chk(d[3:0] == POC_READY, "A back in ready");
    for (int b = 0; b < 4; b++) load_tx(b);
    // B: Rx buffer 0 <- frame ID 1, Rx buffer 1 <- frame ID 3 in any cycle
    opb_wr(1, 16'h020, 0); opb_wr(1, 16'h028, 32'h3 | (1 << 4));
    opb_wr(1, 16'h020, 1); opb_wr(1, 16'h028, 32'h3 | (3 << 4));
    // B FIFO: pair 0 exact ID 2, pair 1 exact first dynamic ID
    opb_wr(1, 16'h050, 32'h7FF | (2 << 16)); opb_wr(1, 16'h054, 0); opb_wr(1, 16'h058, 0);
    opb_wr(1, 16'h05C, 32'h4 | 0);
    opb_wr(1, 16'h050, 32'h7FF | ((NST + 1) << 16));
    opb_wr(1, 16'h05C, 32'h4 | 1);
    opb_wr(1, 16'h00C, 32'h011);   // IER: valid frame, EEDC correction
    for (int n = 0; n < 2; n++) opb_wr(n, 16'h000, CMD_RUN);
    @(negedge clk); integ = 1; @(negedge clk); integ = 0;
    opb_rd(0, 16'h004, d);
    chk(d[3:0] == POC_NORMAL_ACTIVE, "A normal active");

    // cycle 0: all four frames; check them early in cycle 1
    wait_cycle(1);
    chk(n_sent == 4, $sformatf("four frames sent in cycle 0 (%0d)", n_sent));
    chk(irq[1], "B interrupt raised");
    if (irq[1]) n_irq++;
    opb_rd(1, 16'h008, d);
    chk(d[0], "ISR valid-frame bit");
    opb_wr(1, 16'h008, 32'h3FF);
    @(negedge clk);
    chk(!irq[1], "interrupt cleared");
    check_rxbuf(0, 0);
    check_rxbuf(1, 2);
    check_fifo_head(1);
    check_fifo_head(3);
    // media test symbol in the symbol window of cycle 1
    opb_wr(0, 16'h060, 32'h1);

    // cycle 1: single bit error in the slot-3 frame
    inject_in_slot3(1);
    wait_cycle(2);
    opb_rd(1, 16'h008, d);
    chk(d[4], "EEDC correction reported");
    if (d[4]) n_corr++;
    chk(d[9], "valid symbol interrupt bit");
    opb_rd(1, 16'h064, d);
    chk(d[7:0] == 8'd1, $sformatf("B saw one MTS (%h)", d));
    if (d[7:0] == 8'd1) n_mts++;
    opb_rd(0, 16'h064, d);
    chk(d[7:0] == 8'd0, "A does not count its own MTS");
    check_rxbuf(1, 2);

    // cycle 2: FIFO (depth 2) still holds cycle 1's frames -> overflow
    wait_cycle(3);
    opb_rd(1, 16'h040, d);
    chk(d[16], "FIFO overflow");
    if (d[16]) n_ovf++;
    opb_wr(1, 16'h040, 32'h3);  // pop and clear overflow
    opb_wr(1, 16'h040, 32'h1);

    // sync error on A: passive, no transmission in cycle 4
    @(negedge clk); sync_err_a = 1; @(negedge clk); sync_err_a = 0;
    opb_rd(0, 16'h004, d);
    chk(d[3:0] == POC_NORMAL_PASSIVE, "A normal passive");
    wait_cycle(4);
    s0 = n_sent;
    wait_cycle(5);
    chk(n_sent == s0, "no frames while passive");
    if (n_sent == s0) n_passive_quiet++;
    @(negedge clk); sync_ok = 1; @(negedge clk); sync_ok = 0;
    s0 = n_sent;
    wait_cycle(6);
    chk(n_sent > s0, "frames again after sync OK");

    // halt
    opb_wr(0, 16'h000, CMD_HALT);
    opb_rd(0, 16'h004, d);
    chk(d[3:0] == POC_HALT, "A halted");
    while (tx_en[0]) @(posedge clk);   // a frame already on the bus completes
    repeat (2) @(posedge clk);
    s0 = n_sent;
    wait_cycle(7);
    chk(n_sent == s0, "no frames after halt");
    if (n_sent == s0 && d[3:0] == POC_HALT) n_halt++;

    chk(n_trail1 > 0, "one-byte trailer frames sent");
    chk(n_trail2 > 0, "two-byte trailer frames sent");
    chk(n_rxbuf > 0, "frames stored in Rx buffers");
    chk(n_fifo > 0, "frames stored in FIFO");
    chk(n_corr > 0, "EEDC correction happened");
    chk(n_ovf > 0, "FIFO overflow happened");
    chk(n_stretch > 0, "dynamic slot stretched");
    chk(n_passive_quiet > 0, "passive state silenced the node");
    chk(n_irq > 0, "interrupt happened");
    chk(n_halt > 0, "halt happened");
    chk(n_wus > 0, "wakeup symbol sent and received");
    chk(n_mts > 0, "media test symbol sent and received");
    $display("mechanisms: sent=%0d trailer1=%0d trailer2=%0d rxbuf=%0d fifo=%0d corrected=%0d overflow=%0d stretch=%0d passive=%0d irq=%0d halt=%0d wus=%0d mts=%0d",
             n_sent, n_trail1, n_trail2, n_rxbuf, n_fifo, n_corr, n_ovf, n_stretch, n_passive_quiet, n_irq, n_halt, n_wus, n_mts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
