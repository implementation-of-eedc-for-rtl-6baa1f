// chi_regs: memory map and registers of the controller host interface.
//
// Decodes the internal register bus (32-bit words, byte addresses) coming
// from the user interface into the control, status and configuration
// registers and into windows onto the Tx buffers, Rx buffers and Rx FIFO.
// Word map (all this design's own):
//   0x000 POC_CMD     W  [2:0] POC command, issued when written
//   0x004 STATUS      R  [3:0] POC state, [9:4] cycle, [20:10] slot,
//                        [23:21] segment, [24] channel idle
//   0x010 RX_STATUS   R  last frame status {valid, syntax, content,
//                        boundary, corrected, uncorrectable} in [5:0],
//                        its frame ID in [26:16]
//   0x014 DROPPED     R  frames dropped while the previous was checked
//   0x018 TX_SEL      RW [6:0] Tx buffer selected for the Tx window
//   0x01C TX_COMMIT   W  [6:0] buffer, [8] ready value
//   0x020 RXB_SEL     RW Rx buffer selected for window, header, flags, filter
//   0x024 RXB_MSG     RW message ID value for the next RXB_FILTER write
//   0x028 RXB_FILTER  W  [0] en, [1] use frame ID, [2] use cycle,
//                        [3] use message ID, [14:4] frame ID, [20:15] cycle
//   0x02C RXB_HDR     R  header of the selected Rx buffer, bits [31:0]
//   0x030 RXB_HDR_HI  R  header bits [39:32]
//   0x034 RXB_NEW     R  [0] new data in selected buffer; W: 1 clears it
//   0x040 FIFO_STAT   R  [0] empty, [15:8] count, [16] overflow;
//                     W  [0] pop, [1] clear overflow
//   0x044 FIFO_HDR    R  head header bits [31:0]; 0x048 FIFO_HDR_HI [39:32]
//   0x050 ACC_FID     RW [10:0] mask, [26:16] data  (staging for ACC_SET)
//   0x054 ACC_CYC     RW [5:0] mask, [13:8] data
//   0x058 ACC_MSG     RW [15:0] mask, [31:16] data
//   0x05C ACC_SET     W  [1:0] pair index, [2] enable: loads the staged pair
//   0x060 SYM_CMD     W  [0] send a CAS/MTS, [1] send a wakeup symbol
//   0x064 SYM_STATUS  R  [7:0] valid CAS/MTS received, [15:8] valid WUS
//                        phases received (both counters wrap)
//   0x1000 + 4k       W  Tx window: byte k of the selected Tx buffer
//   0x2000 + 4k       R  Rx window: payload byte k of the selected Rx buffer
//   0x3000 + 4k       R  FIFO window: payload byte k of the head frame
// reg_rdata is valid one clock after reg_addr has become stable (the
// windows read block memories); writes take effect in the clock of reg_wr. 'events' reports, one clock
// each: [0] valid frame, [1] syntax error, [2] content error, [3] boundary
// violation, [4] EEDC correction, [5] EEDC uncorrectable, [6] frame or
// symbol sent,
// [7] FIFO overflow, [8] Rx buffer new data, [9] valid symbol.
//
// Several outputs (write data, buffer index, filter and acceptance fields)
// are fields of the register write data or of staging registers routed
// straight through; what is decoded here are their strobes.
//
// The document names this block and its role (control, status and
// configuration registers for the protocol and the CHI); the register set
// and addresses are this design's own.
module chi_regs
  import flexray_pkg::*;
#(
  parameter int unsigned N_TX_BUF = 128,
  parameter int unsigned N_RX_BUF = 128,
  parameter int unsigned FIFO_DEPTH = 8,
  localparam int unsigned TBW = $clog2(N_TX_BUF),
  localparam int unsigned RBW = $clog2(N_RX_BUF),
  localparam int unsigned FAW = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // register bus
  input  logic           reg_wr,
  input  logic [15:0]    reg_addr,
  input  logic [31:0]    reg_wdata,
  output logic [31:0]    reg_rdata,
  output logic [9:0]     events,
  // POC and status
  output logic           poc_cmd_valid,
  output poc_cmd_t       poc_cmd,
  input  poc_state_t     poc_state,
  input  logic [5:0]     cycle,
  input  logic [10:0]    slot_id,
  input  segment_t       segment,
  input  logic           channel_idle,
  input  logic           rx_status_valid,
  input  rx_status_t     rx_status,
  input  frame_hdr_t     rx_status_hdr,
  input  logic [15:0]    rx_dropped,
  input  logic           tx_done,
  // symbols
  output logic           sym_req_cas_mts,
  output logic           sym_req_wus,
  input  logic           symbol_valid,
  input  logic           symbol_wus,
  // Tx buffers
  output logic           txb_wr,
  output logic [TBW-1:0] txb_wr_buf,
  output logic [8:0]     txb_wr_addr,
  output logic [7:0]     txb_wr_data,
  output logic           txb_commit,
  output logic [TBW-1:0] txb_commit_buf,
  output logic           txb_commit_val,
  // Rx buffers
  output logic           rxb_cfg_wr,
  output logic [RBW-1:0] rxb_sel,
  output rxb_filter_t    rxb_cfg,
  output logic [7:0]     rxb_rd_addr,
  input  logic [7:0]     rxb_rd_data,
  input  frame_hdr_t     rxb_rd_hdr,
  input  logic [N_RX_BUF-1:0] rxb_new,
  output logic           rxb_clr,
  // Rx FIFO
  output logic           fifo_cfg_wr,
  output logic [1:0]     fifo_cfg_idx,
  output acc_filter_t    fifo_cfg,
  input  logic           fifo_empty,
  input  logic [FAW:0]   fifo_count,
  input  frame_hdr_t     fifo_head_hdr,
  output logic [7:0]     fifo_rd_addr,
  input  logic [7:0]     fifo_rd_data,
  input  logic           fifo_overflow,
  output logic           fifo_pop,
  output logic           fifo_clr_overflow
);

  logic [TBW-1:0] tx_sel;
  logic [15:0]    rxb_msg;
  logic [31:0]    acc_fid, acc_cyc, acc_msg;
  rx_status_t     last_status;
  logic [10:0]    last_fid;
  logic           ovf_q, new_any_q;
  logic [3:0]     region;
  logic [7:0]     n_cas_rx, n_wus_rx;

  assign region = reg_addr[15:12];

  // combinational write decode
  always_comb begin
    poc_cmd_valid     = reg_wr && reg_addr == 16'h000;
    poc_cmd           = poc_cmd_t'(reg_wdata[2:0]);
    sym_req_cas_mts   = reg_wr && reg_addr == 16'h060 && reg_wdata[0];
    sym_req_wus       = reg_wr && reg_addr == 16'h060 && reg_wdata[1];
    txb_wr            = reg_wr && region == 4'h1;
    txb_wr_buf        = tx_sel;
    txb_wr_addr       = reg_addr[10:2];
    txb_wr_data       = reg_wdata[7:0];
    txb_commit        = reg_wr && reg_addr == 16'h01C;
    txb_commit_buf    = TBW'(reg_wdata[6:0]);
    txb_commit_val    = reg_wdata[8];
    rxb_cfg_wr        = reg_wr && reg_addr == 16'h028;
    rxb_cfg           = '{en: reg_wdata[0], use_fid: reg_wdata[1], use_cyc: reg_wdata[2],
                          use_msg: reg_wdata[3], fid: reg_wdata[14:4], cyc: reg_wdata[20:15],
                          msg_id: rxb_msg};
    rxb_clr           = reg_wr && reg_addr == 16'h034 && reg_wdata[0];
    rxb_rd_addr       = reg_addr[9:2];
    fifo_rd_addr      = reg_addr[9:2];
    fifo_pop          = reg_wr && reg_addr == 16'h040 && reg_wdata[0];
    fifo_clr_overflow = reg_wr && reg_addr == 16'h040 && reg_wdata[1];
    fifo_cfg_wr       = reg_wr && reg_addr == 16'h05C;
    fifo_cfg_idx      = reg_wdata[1:0];
    fifo_cfg          = '{en: reg_wdata[2],
                          fid_mask: acc_fid[10:0], fid_data: acc_fid[26:16],
                          cyc_mask: acc_cyc[5:0],  cyc_data: acc_cyc[13:8],
                          msg_mask: acc_msg[15:0], msg_data: acc_msg[31:16]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sel      <= '0;
      rxb_sel     <= '0;
      rxb_msg     <= '0;
      acc_fid     <= '0;
      acc_cyc     <= '0;
      acc_msg     <= '0;
      last_status <= '0;
      last_fid    <= '0;
      ovf_q       <= 1'b0;
      new_any_q   <= 1'b0;
      n_cas_rx    <= '0;
      n_wus_rx    <= '0;
      events      <= '0;
    end else begin
      if (reg_wr) begin
        unique case (reg_addr)
          16'h018: tx_sel  <= TBW'(reg_wdata[6:0]);
          16'h020: rxb_sel <= RBW'(reg_wdata[6:0]);
          16'h024: rxb_msg <= reg_wdata[15:0];
          16'h050: acc_fid <= reg_wdata;
          16'h054: acc_cyc <= reg_wdata;
          16'h058: acc_msg <= reg_wdata;
          default: ;
        endcase
      end
      if (rx_status_valid) begin
        last_status <= rx_status;
        last_fid    <= rx_status_hdr.frame_id;
      end
      if (symbol_valid && symbol_wus)  n_wus_rx <= n_wus_rx + 8'd1;
      if (symbol_valid && !symbol_wus) n_cas_rx <= n_cas_rx + 8'd1;
      ovf_q     <= fifo_overflow;
      new_any_q <= |rxb_new;
      events <= {symbol_valid, (|rxb_new) && !new_any_q, fifo_overflow && !ovf_q, tx_done,
                 {6{rx_status_valid}} & {rx_status.eedc_uncorrectable, rx_status.eedc_corrected,
                                         rx_status.boundary_violation, rx_status.content_error,
                                         rx_status.syntax_error, rx_status.valid_frame}};
    end
  end

  // read data
  always_comb begin
    reg_rdata = '0;
    unique case (reg_addr[15:12])
      4'h2: reg_rdata = {24'd0, rxb_rd_data};
      4'h3: reg_rdata = {24'd0, fifo_rd_data};
      4'h0:
        case (reg_addr)
          16'h004: reg_rdata = {7'd0, channel_idle, segment, slot_id, cycle, poc_state};
          16'h010: reg_rdata = {5'd0, last_fid, 10'd0, last_status};
          16'h014: reg_rdata = {16'd0, rx_dropped};
          16'h018: reg_rdata = 32'(tx_sel);
          16'h020: reg_rdata = 32'(rxb_sel);
          16'h024: reg_rdata = {16'd0, rxb_msg};
          16'h02C: reg_rdata = rxb_rd_hdr[31:0];
          16'h030: reg_rdata = {24'd0, rxb_rd_hdr[39:32]};
          16'h034: reg_rdata = {31'd0, rxb_new[rxb_sel]};
          16'h040: reg_rdata = {15'd0, fifo_overflow, 8'(fifo_count), 7'd0, fifo_empty};
          16'h044: reg_rdata = fifo_head_hdr[31:0];
          16'h048: reg_rdata = {24'd0, fifo_head_hdr[39:32]};
          16'h050: reg_rdata = acc_fid;
          16'h054: reg_rdata = acc_cyc;
          16'h058: reg_rdata = acc_msg;
          16'h064: reg_rdata = {16'd0, n_wus_rx, n_cas_rx};
          default: reg_rdata = '0;
        endcase
      default: reg_rdata = '0;
    endcase
  end

endmodule
