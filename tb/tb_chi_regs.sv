// tb_chi_regs: checks the CHI register map: decoded write strobes and their
// fields (POC command, Tx window and commit, Rx buffer filter, FIFO
// acceptance pair, pop and overflow clear), the read mux (status, last frame
// status, Rx buffer and FIFO windows and headers, staging registers) and the
// one-clock event pulses, and the symbol request strobes and counters.
module tb_chi_regs;
  import flexray_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reg_wr = 0;
  logic [15:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [9:0] events;
  logic sym_req_cas_mts, sym_req_wus;
  logic symbol_valid = 0, symbol_wus = 0;
  logic poc_cmd_valid;
  poc_cmd_t poc_cmd;
  poc_state_t poc_state = POC_NORMAL_ACTIVE;
  logic [5:0] cycle = 6'd33;
  logic [10:0] slot_id = 11'd1234;
  segment_t segment = SEG_DYNAMIC;
  logic channel_idle = 1;
  logic rx_status_valid = 0;
  rx_status_t rx_status = '0;
  frame_hdr_t rx_status_hdr = '0;
  logic [15:0] rx_dropped = 16'd7;
  logic tx_done = 0;
  logic txb_wr, txb_commit, txb_commit_val;
  logic [6:0] txb_wr_buf, txb_commit_buf;
  logic [8:0] txb_wr_addr;
  logic [7:0] txb_wr_data;
  logic rxb_cfg_wr, rxb_clr;
  logic [6:0] rxb_sel;
  rxb_filter_t rxb_cfg;
  logic [7:0] rxb_rd_addr, rxb_rd_data;
  frame_hdr_t rxb_rd_hdr = 40'h12_3456_789A;
  logic [127:0] rxb_new = '0;
  logic fifo_cfg_wr, fifo_pop, fifo_clr_overflow;
  logic [1:0] fifo_cfg_idx;
  acc_filter_t fifo_cfg;
  logic fifo_empty = 0, fifo_overflow = 0;
  logic [3:0] fifo_count = 4'd3;
  frame_hdr_t fifo_head_hdr = 40'hAB_CDEF_0123;
  logic [7:0] fifo_rd_addr, fifo_rd_data;
  int checks = 0, failures = 0;

  chi_regs dut (.*);
  always #5 clk = ~clk;

  // memory models: data follows the address by one clock
  always_ff @(posedge clk) begin
    rxb_rd_data  <= rxb_rd_addr ^ 8'h5C;
    fifo_rd_data <= fifo_rd_addr ^ 8'hC5;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // write; 'probe' is evaluated in the clock of reg_wr
  task automatic wr(logic [15:0] a, logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    #1;
  endtask
  task automatic wr_end();
    @(negedge clk); reg_wr = 0;
    #1;
  endtask

  task automatic rd(logic [15:0] a, output logic [31:0] d);
    @(negedge clk); reg_addr = a;
    @(negedge clk); d = reg_rdata;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(16'h000, 32'(CMD_RUN));
    chk(poc_cmd_valid && poc_cmd == CMD_RUN, "POC command strobe");
    wr_end();
    chk(!poc_cmd_valid, "POC strobe one clock");
    wr(16'h018, 32'd5); wr_end();
    wr(16'h1000 + 16'd4 * 16'd200, 32'hA7);
    chk(txb_wr && txb_wr_buf == 5 && txb_wr_addr == 200 && txb_wr_data == 8'hA7, "Tx window write");
    wr_end();
    wr(16'h01C, 32'h106);
    chk(txb_commit && txb_commit_buf == 6 && txb_commit_val, "Tx commit");
    wr_end();
    wr(16'h020, 32'd9); wr_end();
    wr(16'h024, 32'hBEEF); wr_end();
    wr(16'h028, 32'h1 | 32'h2 | 32'h8 | (32'd77 << 4) | (32'd12 << 15));
    chk(rxb_cfg_wr && rxb_sel == 9 && rxb_cfg.en && rxb_cfg.use_fid && !rxb_cfg.use_cyc &&
        rxb_cfg.use_msg && rxb_cfg.fid == 77 && rxb_cfg.cyc == 12 && rxb_cfg.msg_id == 16'hBEEF,
        "Rx buffer filter write");
    wr_end();
    wr(16'h050, 32'h0123_07F0); wr_end();
    wr(16'h054, 32'h0000_2A3F); wr_end();
    wr(16'h058, 32'h1234_FF00); wr_end();
    wr(16'h05C, 32'h6);
    chk(fifo_cfg_wr && fifo_cfg_idx == 2 && fifo_cfg.en && fifo_cfg.fid_mask == 11'h7F0 &&
        fifo_cfg.fid_data == 11'h123 && fifo_cfg.cyc_mask == 6'h3F && fifo_cfg.cyc_data == 6'h2A &&
        fifo_cfg.msg_mask == 16'hFF00 && fifo_cfg.msg_data == 16'h1234, "acceptance pair write");
    wr_end();
    wr(16'h040, 32'h3);
    chk(fifo_pop && fifo_clr_overflow, "FIFO pop and clear");
    wr_end();
    wr(16'h034, 32'h1);
    chk(rxb_clr, "Rx buffer clear");
    wr_end();
    rd(16'h004, d);
    chk(d == {7'd0, 1'b1, SEG_DYNAMIC, 11'd1234, 6'd33, POC_NORMAL_ACTIVE}, "STATUS");
    rd(16'h014, d);  chk(d == 7, "DROPPED");
    rd(16'h018, d);  chk(d == 5, "TX_SEL");
    rd(16'h02C, d);  chk(d == 32'h3456_789A, "RXB_HDR");
    rd(16'h030, d);  chk(d == 32'h12, "RXB_HDR_HI");
    rd(16'h044, d);  chk(d == 32'hCDEF_0123, "FIFO_HDR");
    rd(16'h048, d);  chk(d == 32'hAB, "FIFO_HDR_HI");
    rd(16'h040, d);  chk(d == {15'd0, 1'b0, 8'd3, 7'd0, 1'b0}, "FIFO_STAT");
    rd(16'h2000 + 16'd4 * 16'd17, d); chk(d == (17 ^ 8'h5C), "Rx window read");
    rd(16'h3000 + 16'd4 * 16'd250, d); chk(d == (250 ^ 8'hC5), "FIFO window read");
    rd(16'h058, d);  chk(d == 32'h1234_FF00, "ACC_MSG read back");
    rxb_new[9] = 1'b1;
    rd(16'h034, d);  chk(d == 1, "RXB_NEW of selected buffer");
    // events and last status
    @(negedge clk);
    rx_status_valid = 1; rx_status = '{valid_frame: 1'b1, eedc_corrected: 1'b1, default: 1'b0};
    rx_status_hdr = '0; rx_status_hdr.frame_id = 11'd300;
    @(negedge clk); rx_status_valid = 0;
    chk(events == 10'b00_0001_0001 || events == 10'b01_0001_0001, "frame events");
    tx_done = 1; @(negedge clk); tx_done = 0;
    chk(events[6], "frame sent event");
    fifo_overflow = 1; @(negedge clk);
    chk(events[7], "overflow event");
    @(negedge clk);
    chk(!events[7], "overflow event is one pulse");
    rd(16'h010, d);
    chk(d[5:0] == 6'b100010 && d[26:16] == 300, "RX_STATUS");
    // symbols
    wr(16'h060, 32'h1);
    chk(sym_req_cas_mts && !sym_req_wus, "CAS/MTS request strobe");
    wr(16'h060, 32'h2);
    chk(!sym_req_cas_mts && sym_req_wus, "WUS request strobe");
    wr_end();
    chk(!sym_req_cas_mts && !sym_req_wus, "no request without write");
    symbol_valid = 1; symbol_wus = 0; @(negedge clk);
    chk(events[9], "valid symbol event");
    symbol_wus = 1; @(negedge clk);
    symbol_wus = 1; @(negedge clk);
    symbol_valid = 0;
    rd(16'h064, d);
    chk(d == 32'h0000_0201, "SYM_STATUS counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
