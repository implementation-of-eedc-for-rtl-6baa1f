// tb_tx_buffers: writes frames into several Tx buffers, reads them back
// through the encoder's read port (one clock of latency), and checks the
// slot lookup: only ready buffers hit, the lowest-numbered one wins, and a
// withdrawn buffer no longer hits.
module tb_tx_buffers;
  import flexray_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, commit = 0, commit_val = 0;
  logic [3:0] wr_buf = 0, commit_buf = 0, hit_buf, rd_buf = 0;
  logic [8:0] wr_addr = 0, rd_addr = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic [N-1:0] ready;
  logic [10:0] slot_id = 0;
  logic hit;
  int checks = 0, failures = 0;
  byte unsigned img [N][MAX_DATA];

  tx_buffers #(.N_TX_BUF(N)) dut (.*);
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

  task automatic write_frame(int b, int fid, int nbytes);
    for (int i = 0; i < nbytes; i++) begin
      img[b][i] = 8'($urandom);
      if (i == 0) img[b][i][2:0] = 3'(fid >> 8);
      if (i == 1) img[b][i] = 8'(fid);
      @(negedge clk); wr_en = 1; wr_buf = 4'(b); wr_addr = 9'(i); wr_data = img[b][i];
    end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic set_ready(int b, bit v);
    @(negedge clk); commit = 1; commit_buf = 4'(b); commit_val = v;
    @(negedge clk); commit = 0;
  endtask

  task automatic lookup(int slot, bit exp_hit, int exp_buf);
    @(negedge clk); slot_id = 11'(slot); #1;
    chk(hit == exp_hit && (!exp_hit || int'(hit_buf) == exp_buf),
        $sformatf("lookup slot %0d: hit=%0d buf=%0d", slot, hit, hit_buf));
  endtask

  initial begin
    bit ok;
    repeat (3) @(negedge clk);
    rst_n = 1;
    write_frame(3, 17, 30);
    write_frame(5, 17, 9);
    write_frame(9, 1500, MAX_DATA);
    write_frame(0, 2, 5);
    lookup(17, 0, 0);            // nothing ready yet
    set_ready(5, 1);
    lookup(17, 1, 5);
    set_ready(3, 1);
    lookup(17, 1, 3);            // lowest index wins
    set_ready(9, 1);
    lookup(1500, 1, 9);
    lookup(2, 0, 0);
    chk(ready == 16'h0228, "ready flags");
    set_ready(3, 0);
    lookup(17, 1, 5);
    foreach (img[b]) begin
      if (b == 3 || b == 5 || b == 9 || b == 0) begin
        int n;
        n = (b == 3) ? 30 : (b == 5) ? 9 : (b == 9) ? MAX_DATA : 5;
        ok = 1;
        for (int i = 0; i < n; i++) begin
          @(negedge clk); rd_buf = 4'(b); rd_addr = 9'(i);
          @(negedge clk);
          if (rd_data != img[b][i]) ok = 0;
        end
        chk(ok, $sformatf("buffer %0d read back", b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
