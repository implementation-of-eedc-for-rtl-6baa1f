// tb_rx_fifo: programs acceptance filter pairs, hands on frames and checks
// which are queued, their order, header and payload, the effect of 'skip'
// (frame taken by a receive buffer), and overflow when the FIFO is full.
module tb_rx_fifo;
  import flexray_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0;
  logic cfg_wr = 0, skip = 0, pop = 0, clr_overflow = 0;
  logic [1:0] cfg_idx = 0;
  acc_filter_t cfg = '0;
  logic in_start = 0, in_valid = 0, in_end = 0;
  frame_hdr_t in_hdr = '0, head_hdr;
  logic [15:0] in_msg_id = 0;
  logic [7:0] in_idx = 0, in_data = 0, rd_addr = 0, rd_data;
  logic empty, overflow;
  logic [2:0] count;
  int checks = 0, failures = 0;
  byte unsigned q_pay[$][$];
  int q_fid[$];

  rx_fifo #(.DEPTH(D)) dut (.*);
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

  task automatic hand_on(int fid, int cyc, int words, bit expect_queued);
    byte unsigned p[$];
    for (int i = 0; i < 2 * words; i++) p.push_back(8'($urandom));
    @(negedge clk);
    in_hdr = '0; in_hdr.frame_id = 11'(fid); in_hdr.cycle = 6'(cyc); in_hdr.plen = 7'(words);
    in_msg_id = {p[0], p[1]};
    in_start = 1; @(negedge clk); in_start = 0;
    for (int i = 0; i < 2 * words; i++) begin
      in_valid = 1; in_idx = 8'(i); in_data = p[i]; in_end = (i == 2 * words - 1);
      @(negedge clk);
    end
    in_valid = 0; in_end = 0;
    if (expect_queued) begin q_pay.push_back(p); q_fid.push_back(fid); end
  endtask

  task automatic pop_check();
    byte unsigned p[$];
    bit ok;
    p = q_pay.pop_front();
    ok = 1;
    chk(!empty && head_hdr.frame_id == 11'(q_fid.pop_front()), "head frame ID");
    for (int i = 0; i < p.size(); i++) begin
      rd_addr = 8'(i); @(negedge clk);
      if (rd_data != p[i]) ok = 0;
    end
    chk(ok, "head payload");
    pop = 1; @(negedge clk); pop = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // pair 0: frame IDs 0x10..0x17 ; pair 1: even cycles with ID 0x40
    @(negedge clk); cfg_wr = 1; cfg_idx = 0;
    cfg = '{en: 1'b1, fid_mask: 11'h7F8, fid_data: 11'h010, cyc_mask: 6'h0, cyc_data: 6'h0,
            msg_mask: 16'h0, msg_data: 16'h0};
    @(negedge clk); cfg_idx = 1;
    cfg = '{en: 1'b1, fid_mask: 11'h7FF, fid_data: 11'h040, cyc_mask: 6'h01, cyc_data: 6'h0,
            msg_mask: 16'h0, msg_data: 16'h0};
    @(negedge clk); cfg_wr = 0;
    chk(empty, "empty after reset");
    hand_on(16'h13, 5, 3, 1);
    hand_on(16'h20, 5, 3, 0);   // no pair passes
    hand_on(16'h40, 4, 2, 1);
    hand_on(16'h40, 3, 2, 0);   // odd cycle
    skip = 1; hand_on(16'h15, 0, 2, 0); skip = 0;  // taken by a buffer
    chk(int'(count) == 2, "two frames queued");
    pop_check();
    pop_check();
    chk(empty, "empty again");
    for (int i = 0; i < D; i++) hand_on(16'h10 + i, 0, 1 + i, 1);
    chk(int'(count) == D && !overflow, "full, no overflow yet");
    hand_on(16'h17, 0, 1, 0);
    chk(overflow && int'(count) == D, "overflow when full");
    clr_overflow = 1; @(negedge clk); clr_overflow = 0;
    chk(!overflow, "overflow cleared");
    for (int i = 0; i < D; i++) pop_check();
    chk(empty, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
