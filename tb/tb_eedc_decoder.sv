// tb_eedc_decoder: self-checking test of the EEDC checker/corrector.
// Builds codewords with a reference long division, then checks: an intact
// codeword gives no error; every tried single-bit error (in data or in the
// redundancy bits) is located at the right byte/bit; two-bit errors are
// always detected. Also checks the locator latency bound of D+r+1 clocks.
module tb_eedc_decoder;
  import flexray_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, in_valid = 0, chk_valid = 0;
  logic [8:0] nbytes = 0;
  logic [7:0] in_data = 0;
  logic [11:0] chk_bits = 0;
  logic done, err, correctable, err_in_data;
  logic [8:0] err_byte;
  logic [2:0] err_bit;
  logic [3:0] r_len;
  int checks = 0, failures = 0;
  byte unsigned data[MAX_DATA];

  eedc_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
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
    for (int i = 0; i < n; i++) for (int b = 7; b >= 0; b--) bits.push_back(data[i][b]);
    for (int i = 0; i < r; i++) bits.push_back(1'b0);
    for (int i = 0; i + r < bits.size(); i++)
      if (bits[i]) for (int t = 0; t <= r; t++) bits[i + t] ^= poly[r - t];
    rem = 0;
    for (int i = bits.size() - r; i < bits.size(); i++) rem = (rem << 1) | int'(bits[i]);
    return rem;
  endfunction

  // Send n data bytes and the redundancy word; flip codeword positions e1, e2
  // (position 0 = last redundancy bit; -1 = none). Returns clocks to done.
  task automatic send(int n, int rm, int r, int e1, int e2, output int lat);
    byte unsigned d[MAX_DATA];
    int red;
    for (int i = 0; i < n; i++) d[i] = data[i];
    red = rm;
    for (int q = 0; q < 2; q++) begin
      int e;
      e = (q == 0) ? e1 : e2;
      if (e >= 0) begin
        if (e < r) red ^= (1 << e);
        else d[n - 1 - (e - r) / 8][(e - r) % 8] ^= 1'b1;
      end
    end
    @(negedge clk); start = 1; nbytes = 9'(n);
    @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      in_valid = 1; in_data = d[i]; @(negedge clk);
    end
    in_valid = 0;
    chk_valid = 1; chk_bits = 12'(red); @(negedge clk); chk_valid = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  task automatic run(int n);
    int r, rm, lat, e, e2;
    for (int i = 0; i < n; i++) data[i] = 8'($urandom);
    r  = ref_r(8 * n);
    rm = ref_rem(n, r);
    send(n, rm, r, -1, -1, lat);
    checks++;
    if (err || int'(r_len) != r) begin failures++; $display("FAIL clean n=%0d", n); end
    for (int t = 0; t < 6; t++) begin
      e = (t == 0) ? 0 : (t == 1) ? (8 * n + r - 1) : int'($urandom % (8 * n + r));
      send(n, rm, r, e, -1, lat);
      checks++;
      if (!err || !correctable) begin failures++; $display("FAIL single n=%0d e=%0d not found", n, e); end
      else if (e < r) begin
        checks++;
        if (err_in_data) begin failures++; $display("FAIL e=%0d should be in r bits", e); end
      end else begin
        checks++;
        if (!err_in_data || int'(err_byte) != n - 1 - (e - r) / 8 || int'(err_bit) != (e - r) % 8) begin
          failures++; $display("FAIL n=%0d e=%0d got byte %0d bit %0d", n, e, err_byte, err_bit);
        end
      end
      checks++;
      if (lat > 8 * n + r + 1) begin failures++; $display("FAIL latency %0d", lat); end
    end
    for (int t = 0; t < 3; t++) begin
      e  = int'($urandom % (8 * n + r));
      e2 = (e + 1 + int'($urandom % (8 * n + r - 1))) % (8 * n + r);
      send(n, rm, r, e, e2, lat);
      checks++;
      if (!err) begin failures++; $display("FAIL double n=%0d %0d %0d not detected", n, e, e2); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(5);
    run(5 + 254);
    run(5 + 26);
    for (int t = 0; t < 12; t++) run(5 + 2 * int'($urandom % 128));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
