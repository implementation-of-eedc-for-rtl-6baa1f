// tb_eedc_detection: error-detection workload for the EEDC checker.
// For frames whose payload is 25, 50, ... 250 bytes (plus the 5 header
// bytes) it builds codewords with an independent long division and sends
// them to eedc_decoder with injected errors of four kinds:
//   - one flipped bit:            must be detected and located exactly;
//   - two flipped bits:           must always be detected (distance 3);
//   - a burst of 2..r bits:       must always be detected (a burst no longer
//                                 than the degree of the generator cannot be
//                                 a multiple of it);
//   - 3..8 bits at random places: the detected share is printed per size and
//                                 must be at least 95 % (about 1 - 2^-r is
//                                 expected for patterns of this kind).
// The printed percentage table is the counterpart of an error-detection
// versus frame-size plot; the error mix itself is this test's own choice.
// Timing: the decoder is driven one byte per clock; each trial waits for
// its done pulse.
module tb_eedc_detection;
  import flexray_pkg::*;
  localparam int TRIALS = 200;
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
    repeat (30000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_r(int dbits);
    for (int r = 2; r <= 12; r++) if (dbits + r + 1 <= (1 << r)) return r;
    return 12;
  endfunction

  // Remainder of D(x)*x^r divided by x^r + poly, done bit by bit.
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

  // Send the codeword with the listed positions flipped (position 0 = last
  // redundancy bit sent). Positions may repeat; a repeat cancels.
  task automatic send(int n, int rm, int r, int pos[$]);
    byte unsigned d[MAX_DATA];
    int red;
    for (int i = 0; i < n; i++) d[i] = data[i];
    red = rm;
    foreach (pos[k]) begin
      if (pos[k] < r) red ^= (1 << pos[k]);
      else d[n - 1 - (pos[k] - r) / 8][(pos[k] - r) % 8] ^= 1'b1;
    end
    @(negedge clk); start = 1; nbytes = 9'(n);
    @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      in_valid = 1; in_data = d[i]; @(negedge clk);
    end
    in_valid = 0;
    chk_valid = 1; chk_bits = 12'(red); @(negedge clk); chk_valid = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic run_size(int payload);
    int n, r, rm, len, e, w, det, tot;
    int pos[$];
    n = HDR_BYTES + payload;
    for (int i = 0; i < n; i++) data[i] = 8'($urandom);
    r   = ref_r(8 * n);
    rm  = ref_rem(n, r);
    len = 8 * n + r;
    // single errors
    for (int t = 0; t < TRIALS / 4; t++) begin
      e = int'($urandom % len);
      pos = '{e};
      send(n, rm, r, pos);
      checks++;
      if (!err || !correctable) begin failures++; $display("FAIL single %0d missed", e); end
      else if (e >= r && (int'(err_byte) != n - 1 - (e - r) / 8 || int'(err_bit) != (e - r) % 8)) begin
        failures++; $display("FAIL single %0d located wrongly", e);
      end
    end
    // double errors
    for (int t = 0; t < TRIALS / 4; t++) begin
      e = int'($urandom % len);
      pos = '{e, (e + 1 + int'($urandom % (len - 1))) % len};
      send(n, rm, r, pos);
      checks++;
      if (!err) begin failures++; $display("FAIL double missed at size %0d", payload); end
    end
    // bursts of length 2..r (first and last bit flipped, inside random)
    for (int t = 0; t < TRIALS / 4; t++) begin
      w = 2 + int'($urandom % (r - 1));
      e = int'($urandom % (len - w + 1));
      pos = '{e, e + w - 1};
      for (int k = 1; k < w - 1; k++) if ($urandom % 2 != 0) pos.push_back(e + k);
      send(n, rm, r, pos);
      checks++;
      if (!err) begin failures++; $display("FAIL burst %0d missed at size %0d", w, payload); end
    end
    // random multi-bit errors
    det = 0; tot = 0;
    for (int t = 0; t < TRIALS; t++) begin
      w = 3 + int'($urandom % 6);
      pos.delete();
      while (pos.size() < w) begin
        bit fresh;
        e = int'($urandom % len);
        fresh = 1;
        foreach (pos[k]) if (pos[k] == e) fresh = 0;
        if (fresh) pos.push_back(e);
      end
      send(n, rm, r, pos);
      tot++;
      if (err) det++;
    end
    checks++;
    if (det * 100 < tot * 95) begin
      failures++; $display("FAIL size %0d: only %0d of %0d multi-bit errors detected", payload, det, tot);
    end
    $display("payload %3d bytes  r=%0d  trailer %0d byte(s)  multi-bit errors detected %0d/%0d (%0d%%)",
             payload, r, trailer_bytes(4'(r)), det, tot, det * 100 / tot);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 25; p <= 250; p += 25) run_size(p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
