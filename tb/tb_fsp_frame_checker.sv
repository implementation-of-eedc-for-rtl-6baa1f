// tb_fsp_frame_checker: feeds decoded-byte events for frames built with a
// reference EEDC trailer and checks the status and the payload handed on:
// clean frames, single-bit errors in payload, header and trailer (corrected),
// wrong slot or cycle (content error), wrong length (syntax error), a
// decoding error, a slot boundary inside the frame (boundary violation), and
// a frame received while transmitting (ignored). Symbols: a CAS/MTS in the
// symbol window or outside normal operation is valid, one outside the symbol
// window in normal operation is not, a WUS is valid only outside normal
// operation, and the node's own symbols are ignored.
module tb_fsp_frame_checker;
  import flexray_pkg::*;
  logic clk = 0, rst_n = 0, enable = 1;
  logic frame_start = 0, byte_valid = 0, frame_end = 0, dec_error = 0;
  logic [7:0] byte_data = 0;
  logic [10:0] slot_id = 11'd3;
  logic [5:0] cycle = 6'd7;
  logic slot_start = 0, tx_active = 0;
  logic status_valid;
  logic sym_cas_mts = 0, sym_wus = 0, symbol_valid, symbol_wus;
  segment_t segment = SEG_STATIC;
  int n_sym = 0, n_sym_wus = 0;
  rx_status_t status;
  frame_hdr_t status_hdr, out_hdr;
  logic [15:0] dropped, out_msg_id;
  logic out_start, out_valid, out_end;
  logic [7:0] out_idx, out_data;
  int checks = 0, failures = 0;
  byte unsigned frame[MAX_FRAME];
  byte unsigned outp[256];
  int n_out_start = 0, n_out_end = 0, n_status = 0, n_out_bytes = 0;
  rx_status_t last;

  fsp_frame_checker dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (status_valid) begin n_status++; last = status; end
    if (out_start) n_out_start++;
    if (out_valid) begin outp[out_idx] = out_data; n_out_bytes++; end
    if (out_end) n_out_end++;
    if (symbol_valid) begin n_sym++; if (symbol_wus) n_sym_wus++; end
  end

  initial begin
    repeat (400000) @(posedge clk);
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

  // Build a frame for (fid, cyc, words); returns total byte count.
  function automatic int build(int fid, int cyc, int words);
    int n, r, rm;
    n = 5 + 2 * words;
    for (int i = 0; i < n; i++) frame[i] = 8'($urandom);
    frame[0] = {5'b00100, 3'(fid >> 8)};
    frame[1] = 8'(fid);
    frame[2][7:1] = 7'(words);
    frame[4][5:0] = 6'(cyc);
    r  = ref_r(8 * n);
    rm = ref_rem(n, r);
    if (r > 8) begin frame[n] = 8'(rm >> 8); frame[n + 1] = 8'(rm); return n + 2; end
    frame[n] = 8'(rm);
    return n + 1;
  endfunction

  // Feed bytes; flip bit 'fb' of byte 'fi' on the way (fi < 0: none).
  task automatic feed(int total, int fi, int fb, bit derr, bit bnd);
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    for (int i = 0; i < total; i++) begin
      repeat (20) @(negedge clk);
      if (bnd && i == 3) begin slot_start = 1; @(negedge clk); slot_start = 0; end
      byte_valid = 1;
      byte_data = (i == fi) ? frame[i] ^ (8'd1 << fb) : frame[i];
      @(negedge clk); byte_valid = 0;
      if (derr && i == 4) begin dec_error = 1; @(negedge clk); dec_error = 0; return; end
    end
    repeat (20) @(negedge clk);
    frame_end = 1; @(negedge clk); frame_end = 0;
  endtask

  task automatic wait_status(int s0);
    int k;
    k = 0;
    while (n_status == s0 && k < 5000) begin @(negedge clk); k++; end
    repeat (300) @(negedge clk);
  endtask

  task automatic good(int words, int fi, int fb, bit exp_corr);
    int total, s0, o0;
    total = build(3, 7, words);
    s0 = n_status; o0 = n_out_end;
    n_out_bytes = 0;
    feed(total, fi, fb, 0, 0);
    wait_status(s0);
    chk(n_status == s0 + 1, "one status");
    chk(last.valid_frame && !last.syntax_error && !last.content_error, "valid frame");
    chk(last.eedc_corrected == exp_corr && !last.eedc_uncorrectable, "EEDC correction flag");
    chk(n_out_end == o0 + 1 && n_out_bytes == 2 * words, "payload handed on");
    checks++;
    for (int i = 0; i < 2 * words; i++)
      if (outp[i] != frame[5 + i]) begin failures++; $display("FAIL payload byte %0d", i); break; end
    chk(out_hdr.frame_id == 3 && out_hdr.cycle == 7 && int'(out_hdr.plen) == words, "header handed on");
    if (words > 0) chk(out_msg_id == {frame[5], frame[6]}, "message ID");
  endtask

  task automatic bad(int fid, int cyc, int words, int fi, bit derr, bit bnd, bit shorten, int kind);
    int total, s0, o0;
    total = build(fid, cyc, words);
    s0 = n_status; o0 = n_out_start;
    feed(shorten ? total - 1 : total, fi, 0, derr, bnd);
    wait_status(s0);
    chk(n_status == s0 + 1, "one status (bad)");
    chk(!last.valid_frame && n_out_start == o0, "bad frame not valid, not handed on");
    case (kind)
      0: chk(last.syntax_error, "syntax error");
      1: chk(last.content_error, "content error");
      2: chk(last.boundary_violation, "boundary violation");
      default: ;
    endcase
  endtask

  initial begin
    int s0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    good(0, -1, 0, 0);
    good(10, -1, 0, 0);
    good(127, -1, 0, 0);
    good(20, 5 + 17, 3, 1);     // payload bit
    good(127, 200, 0, 1);       // payload bit, largest frame
    good(8, 1, 2, 1);           // frame ID bit in header
    good(8, 4, 5, 1);           // cycle bit in header
    good(8, 5 + 16, 0, 1);      // trailer bit
    bad(4, 7, 6, -1, 0, 0, 0, 1);   // wrong slot
    bad(3, 9, 6, -1, 0, 0, 0, 1);   // wrong cycle
    bad(3, 7, 6, -1, 0, 0, 1, 0);   // one byte short
    bad(3, 7, 6, -1, 1, 0, 0, 0);   // decoding error
    bad(3, 7, 6, -1, 0, 1, 0, 2);   // slot boundary inside
    // own frame while transmitting: no status at all
    s0 = n_status;
    tx_active = 1;
    feed(build(3, 7, 4), -1, 0, 0, 0);
    tx_active = 0;
    repeat (400) @(negedge clk);
    chk(n_status == s0, "own frame ignored");
    // symbols: {kind (1 = WUS), segment, enable, tx_active, expected valid}
    for (int k = 0; k < 8; k++) begin
      bit w, en, ta, exp;
      segment_t sg;
      int v0, w0;
      w  = (k >= 4);
      sg = (k % 2 == 0) ? SEG_SYMBOL : SEG_DYNAMIC;
      en = (k % 4 < 2);
      ta = (k == 3);
      exp = w ? (!en && !ta) : (!ta && (!en || sg == SEG_SYMBOL));
      v0 = n_sym; w0 = n_sym_wus;
      @(negedge clk);
      segment = sg; enable = en; tx_active = ta;
      if (w) sym_wus = 1; else sym_cas_mts = 1;
      @(negedge clk);
      sym_wus = 0; sym_cas_mts = 0; tx_active = 0;
      repeat (80) @(negedge clk);
      chk(n_sym == v0 + (exp ? 1 : 0), $sformatf("symbol case %0d valid=%0d", k, exp));
      chk(n_sym_wus == w0 + ((exp && w) ? 1 : 0), $sformatf("symbol case %0d kind", k));
    end
    enable = 1;
    // a symbol reported shortly after this node stopped transmitting is its own
    begin
      int v0;
      v0 = n_sym;
      segment = SEG_SYMBOL;
      @(negedge clk); tx_active = 1; @(negedge clk); tx_active = 0;
      repeat (12) @(negedge clk);
      sym_cas_mts = 1; @(negedge clk); sym_cas_mts = 0;
      repeat (80) @(negedge clk);
      chk(n_sym == v0, "own symbol ignored after transmission");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
