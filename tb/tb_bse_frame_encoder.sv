// tb_bse_frame_encoder: sends frames of several payload lengths from a
// modelled Tx buffer and decodes the TX line at the middle of each bit. It
// checks the TSS length, FSS, every BSS, the data bytes, the EEDC trailer
// (against a reference long division) and the FES, that tx_en covers exactly
// the frame, and that the frame takes the expected number of bit times.
module tb_bse_frame_encoder;
  import flexray_pkg::*;
  localparam int SPB = 8, TSS = 9;
  logic clk = 0, rst_n = 0;
  logic tx_req = 0;
  logic [6:0] tx_buf = 0, rd_buf;
  logic [5:0] cycle = 0;
  logic [8:0] rd_addr;
  logic [7:0] rd_data;
  logic tx, tx_en, busy, done;
  logic [3:0] r_len;
  int checks = 0, failures = 0;
  byte unsigned frame[MAX_DATA];
  byte unsigned sent4;

  bse_frame_encoder #(.SAMPLES_PER_BIT(SPB), .TSS_BITS(TSS)) dut (.*);
  always #5 clk = ~clk;

  // modelled buffer read port, one clock of latency
  always_ff @(posedge clk) rd_data <= frame[rd_addr];

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_r(int dbits);
    for (int r = 2; r <= 12; r++) if (dbits + r + 1 <= (1 << r)) return r;
    return 12;
  endfunction

  function automatic int ref_rem(int n, int r);
    bit bits[$];
    int poly, rem;
    poly = (1 << r) | (int'(eedc_poly(4'(r))) & ((1 << r) - 1));
    for (int i = 0; i < n; i++) for (int b = 7; b >= 0; b--) bits.push_back(frame[i][b]);
    for (int i = 0; i < r; i++) bits.push_back(1'b0);
    for (int i = 0; i + r < bits.size(); i++)
      if (bits[i]) for (int t = 0; t <= r; t++) bits[i + t] ^= poly[r - t];
    rem = 0;
    for (int i = bits.size() - r; i < bits.size(); i++) rem = (rem << 1) | int'(bits[i]);
    return rem;
  endfunction

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // sample one bit at its middle and return it
  task automatic get_bit(output bit b);
    repeat (SPB / 2) @(posedge clk);
    #1 b = tx;
    chk(tx_en, "tx_en during frame");
    repeat (SPB - SPB / 2) @(posedge clk);
  endtask

  task automatic send(int words);
    int n, r, rm, nt, bits_total, t0, t1;
    bit b;
    byte unsigned got;
    n = 5 + 2 * words;
    for (int i = 0; i < n; i++) frame[i] = 8'($urandom);
    frame[2][7:1] = 7'(words);
    cycle = 6'($urandom);
    r  = ref_r(8 * n);
    nt = (r > 8) ? 2 : 1;
    @(negedge clk); tx_req = 1; @(negedge clk); tx_req = 0;
    // the encoder sends the current cycle count in header byte 4; the
    // buffer model keeps the host's byte, the reference uses the sent one
    #1 cycle = ~cycle;
    while (!tx_en) @(posedge clk);
    t0 = $time;
    #1;
    begin
      byte unsigned keep;
      keep = frame[4];
      frame[4][5:0] = ~cycle;       // value sampled at tx_req
      rm = ref_rem(n, r);
      sent4 = frame[4];
      frame[4] = keep;
    end
    for (int i = 0; i < TSS; i++) begin get_bit(b); chk(b == 0, "TSS bit low"); end
    get_bit(b); chk(b == 1, "FSS");
    for (int i = 0; i < n + nt; i++) begin
      byte unsigned exp;
      get_bit(b); chk(b == 1, "BSS high");
      get_bit(b); chk(b == 0, "BSS low");
      for (int k = 0; k < 8; k++) begin get_bit(b); got = {got[6:0], b}; end
      if (i == 4) exp = sent4;
      else if (i < n) exp = frame[i];
      else if (nt == 2 && i == n) exp = 8'(rm >> 8);
      else exp = 8'(rm);
      checks++;
      if (got != exp) begin failures++; $display("FAIL byte %0d got %h exp %h (n=%0d)", i, got, exp, n); end
    end
    get_bit(b); chk(b == 0, "FES low");
    get_bit(b); chk(b == 1, "FES high");
    while (tx_en) @(posedge clk);
    t1 = $time;
    bits_total = TSS + 1 + 10 * (n + nt) + 2;
    checks++;
    if ((t1 - t0) / 10 < bits_total * SPB - 1 || (t1 - t0) / 10 > bits_total * SPB + 1) begin
      failures++; $display("FAIL frame length %0d clocks, expected %0d", (t1 - t0) / 10, bits_total * SPB);
    end
    chk(int'(r_len) == r, "r_len");
    repeat (3) @(posedge clk); #1;
    chk(tx == 1 && !busy, "idle after frame");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(0);
    send(127);
    send(12);
    send(13);
    for (int i = 0; i < 4; i++) send(int'($urandom % 128));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
