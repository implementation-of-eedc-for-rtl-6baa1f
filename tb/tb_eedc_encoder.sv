// tb_eedc_encoder: self-checking test of the EEDC trailer generator.
// For random frames of 0..254 payload bytes it compares r and r(x) with a
// reference computed by long division of the bit string D followed by r
// zeros by the full degree-r polynomial, and checks that 'done' rises one
// clock after the last data byte.
module tb_eedc_encoder;
  import flexray_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, in_valid = 0, done;
  logic [8:0] nbytes = 0;
  logic [7:0] in_data = 0;
  logic [3:0] r_len;
  logic [11:0] r_bits;
  int checks = 0, failures = 0;
  byte unsigned data[MAX_DATA];

  eedc_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_r(int dbits);
    for (int r = 2; r <= 12; r++) if (dbits + r + 1 <= (1 << r)) return r;
    return 12;
  endfunction

  // Long division of D(x)*x^r by p(x) = x^r + low terms.
  function automatic int ref_rem(int n, int r);
    bit bits[$];
    int poly;
    int rem;
    poly = (1 << r) | int'(eedc_poly(4'(r)) & ((12'd1 << r) - 1));
    for (int i = 0; i < n; i++) for (int b = 7; b >= 0; b--) bits.push_back(data[i][b]);
    for (int i = 0; i < r; i++) bits.push_back(1'b0);
    for (int i = 0; i + r < bits.size(); i++)
      if (bits[i]) for (int t = 0; t <= r; t++) bits[i + t] ^= poly[r - t];
    rem = 0;
    for (int i = bits.size() - r; i < bits.size(); i++) rem = (rem << 1) | int'(bits[i]);
    return rem;
  endfunction

  task automatic run(int n);
    int r, rm, lat;
    for (int i = 0; i < n; i++) data[i] = 8'($urandom);
    @(negedge clk); start = 1; nbytes = 9'(n);
    @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      in_valid = 1; in_data = data[i];
      @(negedge clk);
      in_valid = 0;
      if (($urandom % 3) == 0) @(negedge clk);
    end
    lat = 0;
    // done must already be high one clock after the last byte
    checks++;
    if (!done) begin failures++; $display("FAIL: done late, n=%0d", n); end
    r  = ref_r(8 * n);
    rm = ref_rem(n, r);
    checks++;
    if (int'(r_len) != r) begin failures++; $display("FAIL r n=%0d got %0d exp %0d", n, r_len, r); end
    checks++;
    if (int'(r_bits) != rm) begin failures++; $display("FAIL rem n=%0d got %h exp %h", n, r_bits, rm); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(5);      // header only: r = 6
    run(5 + 254); // largest frame: r = 12
    run(5 + 26);  // 248 bits -> r = 9
    run(5 + 24);  // 232 bits -> r = 8
    for (int t = 0; t < 40; t++) run(5 + 2 * int'($urandom % 128));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
