// tb_rx_buffers: programs buffer filters on frame ID, cycle, message ID and
// combinations, hands on frames and checks which buffer (if any) stores each
// one, the stored header and payload, the new-data flags and their clearing.
module tb_rx_buffers;
  import flexray_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic cfg_wr = 0;
  logic [3:0] cfg_buf = 0, rd_buf = 0, clr_buf = 0;
  rxb_filter_t cfg = '0;
  logic in_start = 0, in_valid = 0, in_end = 0, clr = 0;
  frame_hdr_t in_hdr = '0, rd_hdr;
  logic [15:0] in_msg_id = 0;
  logic [7:0] in_idx = 0, in_data = 0, rd_addr = 0, rd_data;
  logic matched;
  logic [N-1:0] new_data;
  int checks = 0, failures = 0;
  byte unsigned pay[254];

  rx_buffers #(.N_RX_BUF(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic set_filter(int b, bit uf, bit uc, bit um, int fid, int cyc, int msg);
    @(negedge clk);
    cfg_wr = 1; cfg_buf = 4'(b);
    cfg = '{en: 1'b1, use_fid: uf, use_cyc: uc, use_msg: um,
            fid: 11'(fid), cyc: 6'(cyc), msg_id: 16'(msg)};
    @(negedge clk); cfg_wr = 0;
  endtask

  // hand on a frame; returns whether 'matched' was seen
  task automatic hand_on(int fid, int cyc, int words, output bit m);
    for (int i = 0; i < 2 * words; i++) pay[i] = 8'($urandom);
    @(negedge clk);
    in_hdr = '0; in_hdr.frame_id = 11'(fid); in_hdr.cycle = 6'(cyc); in_hdr.plen = 7'(words);
    in_msg_id = (words > 0) ? {pay[0], pay[1]} : 16'd0;
    in_start = 1; #1 m = matched;
    @(negedge clk); in_start = 0;
    for (int i = 0; i < 2 * words; i++) begin
      in_valid = 1; in_idx = 8'(i); in_data = pay[i];
      in_end = (i == 2 * words - 1);
      @(negedge clk);
    end
    in_valid = 0; in_end = 0;
    if (words == 0) begin in_end = 1; @(negedge clk); in_end = 0; end
  endtask

  task automatic check_buf(int b, int fid, int words);
    bit ok;
    ok = 1;
    @(negedge clk); rd_buf = 4'(b);
    for (int i = 0; i < 2 * words; i++) begin
      rd_addr = 8'(i); @(negedge clk);
      if (rd_data != pay[i]) ok = 0;
    end
    chk(ok, $sformatf("payload in buffer %0d", b));
    chk(rd_hdr.frame_id == 11'(fid) && int'(rd_hdr.plen) == words, "stored header");
    chk(new_data[b], "new data flag");
    clr = 1; clr_buf = 4'(b); @(negedge clk); clr = 0;
    chk(!new_data[b], "flag cleared");
  endtask

  initial begin
    bit m;
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_filter(2, 1, 0, 0, 5, 0, 0);        // frame ID 5
    set_filter(3, 1, 1, 0, 6, 2, 0);        // frame ID 6 in cycle 2
    set_filter(7, 0, 0, 1, 0, 0, 16'hBEEF); // message ID only
    set_filter(9, 1, 0, 0, 5, 0, 0);        // also ID 5: lower index wins
    hand_on(5, 11, 10, m);  chk(m, "ID 5 matched");
    chk(new_data == 16'b0000_0000_0000_0100, "only buffer 2 flagged");
    check_buf(2, 5, 10);
    hand_on(6, 1, 4, m);    chk(!m && new_data == 0, "ID 6 cycle 1 rejected");
    hand_on(6, 2, 4, m);    chk(m && new_data == 16'h0008, "ID 6 cycle 2 to buffer 3");
    check_buf(3, 6, 4);
    @(negedge clk);
    pay[0] = 8'hBE; pay[1] = 8'hEF;
    in_hdr = '0; in_hdr.frame_id = 11'd40; in_hdr.plen = 7'd3;
    in_msg_id = 16'hBEEF; in_start = 1; #1 m = matched; @(negedge clk); in_start = 0;
    for (int i = 0; i < 6; i++) begin
      if (i > 1) pay[i] = 8'(i * 17);
      in_valid = 1; in_idx = 8'(i); in_data = pay[i]; in_end = (i == 5); @(negedge clk);
    end
    in_valid = 0; in_end = 0;
    chk(m, "message ID matched");
    check_buf(7, 40, 3);
    hand_on(33, 0, 2, m);   chk(!m && new_data == 0, "no filter, not stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
