// tb_bsd_bit_decoder: drives RX with coded frames built in the testbench
// (TSS, FSS, BSS per byte, FES), starting at random sample phases and with
// single-sample glitches inside bits, and checks the decoded bytes,
// frame_start/frame_end, channel idle detection and the reporting of a
// decoding error for a corrupted byte start sequence. Low phases of 30 and
// 60 bits must be reported as a CAS/MTS and a wakeup symbol phase, and a
// 20-bit low phase (too long for a TSS, too short for a symbol) as an error.
module tb_bsd_bit_decoder;
  localparam int SPB = 8;
  logic clk = 0, rst_n = 0, rxd = 1;
  logic channel_idle, frame_start, byte_valid, frame_end, dec_error;
  logic sym_cas_mts, sym_wus;
  logic [7:0] byte_data;
  int checks = 0, failures = 0;
  int n_start = 0, n_end = 0, n_err = 0, n_glitch = 0, n_cas = 0, n_wus = 0;
  byte unsigned got[$];

  bsd_bit_decoder #(.SAMPLES_PER_BIT(SPB)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (frame_start) n_start++;
    if (frame_end)   n_end++;
    if (dec_error)   n_err++;
    if (sym_cas_mts) n_cas++;
    if (sym_wus)     n_wus++;
    if (byte_valid)  got.push_back(byte_data);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // one bit, optionally with a one-sample glitch somewhere inside it
  task automatic put_bit(bit b, bit glitch);
    int g;
    g = glitch ? 1 + int'($urandom % (SPB - 2)) : -1;
    for (int s = 0; s < SPB; s++) begin
      @(negedge clk);
      rxd = (s == g) ? ~b : b;
    end
    if (glitch) n_glitch++;
  endtask

  task automatic send_frame(byte unsigned d[$], bit bad_bss);
    for (int i = 0; i < 9; i++) put_bit(0, 0);
    put_bit(1, 0);
    foreach (d[i]) begin
      put_bit((bad_bss && i == 2) ? 1'b0 : 1'b1, 0);
      put_bit(0, 0);
      for (int k = 7; k >= 0; k--) put_bit(d[i][k], ($urandom % 4) == 0);
    end
    put_bit(0, 0);
    put_bit(1, 0);
  endtask

  initial begin
    byte unsigned d[$];
    int s0, e0, r0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) put_bit(1, 0);
    chk(channel_idle, "channel idle after 11+ high bits");
    for (int f = 0; f < 6; f++) begin
      d = {};
      for (int i = 0; i < 3 + int'($urandom % 40); i++) d.push_back(8'($urandom));
      got = {};
      s0 = n_start; e0 = n_end;
      repeat ($urandom % SPB) @(negedge clk);  // random phase
      send_frame(d, 0);
      repeat (SPB) @(negedge clk);
      chk(n_start == s0 + 1 && n_end == e0 + 1, "one frame start and end");
      chk(!channel_idle, "not idle right after frame");
      checks++;
      if (got != d) begin failures++; $display("FAIL frame %0d bytes differ (%0d vs %0d)", f, got.size(), d.size()); end
      for (int i = 0; i < 12; i++) put_bit(1, 0);
      chk(channel_idle, "idle again");
    end
    r0 = n_err; e0 = n_end;
    d = {8'h12, 8'h34, 8'h56, 8'h78};
    send_frame(d, 1);
    for (int i = 0; i < 12; i++) put_bit(1, 0);
    chk(n_err == r0 + 1, "decoding error on bad BSS");
    chk(n_end == e0, "no frame end for bad frame");
    chk(n_glitch > 10, "glitches were injected");
    // symbols: a low phase followed by idle
    for (int k = 0; k < 3; k++) begin
      int len, c0, w0;
      len = (k == 0) ? 30 : (k == 1) ? 60 : 20;
      r0 = n_err; s0 = n_start; c0 = n_cas; w0 = n_wus;
      repeat ($urandom % SPB) @(negedge clk);
      for (int i = 0; i < len; i++) put_bit(0, ($urandom % 4) == 0);
      for (int i = 0; i < 12; i++) put_bit(1, 0);
      chk(n_start == s0, "no frame start for a symbol");
      chk(n_cas == c0 + (k == 0 ? 1 : 0), "CAS/MTS count");
      chk(n_wus == w0 + (k == 1 ? 1 : 0), "WUS count");
      chk(n_err == r0 + (k == 2 ? 1 : 0), "error for a 20-bit low phase");
      chk(channel_idle, "idle after symbol");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
