// flexray_cc_top: enhanced FlexRay communication controller.
//
// A single-channel FlexRay controller whose frame trailer carries EEDC
// redundancy bits (a shortened cyclic Hamming code whose length grows with
// the frame) instead of the fixed 24-bit CRC. The host reaches it over the
// OPB through the user interface (opb_ui), which drives the controller host
// interface: registers (chi_regs), transmit buffers (tx_buffers), receive
// buffers (rx_buffers) and the receive FIFO (rx_fifo). The protocol engine
// holds the POC state machine (poc_fsm), the MAC cycle timer (mac_timer),
// the bitstream encoder with the EEDC trailer generator (bse_frame_encoder),
// the symbol encoder (bse_symbol_encoder), the bitstream decoder
// (bsd_bit_decoder) and frame and symbol processing with EEDC checking and
// correction (fsp_frame_checker).
//
// Transmission: at each slot boundary in a normal-active POC state, if a
// ready Tx buffer carries the current slot's frame ID, the encoder sends it.
// Reception: RX is decoded, checked and corrected; valid frames go to the
// first matching Rx buffer, or else to the FIFO if an acceptance filter
// passes them. Wakeup/startup and clock synchronisation are outside this
// RTL: their results enter on integration_ok, sync_ok and sync_error, and the
// bus transceiver connects to tx, tx_en and rx. The MAC runs while the POC is
// in a normal state; the bus counts as busy for the dynamic segment while the
// decoder does not see channel idle. Symbols requested by the host go out
// as an MTS at the start of the symbol window in normal active, as a CAS
// during startup, or as a WUS in the wake-up state once the bus is idle.
//
// The block structure and the TX/TX_EN/RX and OPB connections follow the
// document's controller architecture, and the EEDC trailer is its proposal;
// the transmit condition, the symbol scheduling, the bus-busy source for the
// dynamic segment and all default sizes apart from the 128 Tx and 128 Rx
// buffers are this design's own choices.
module flexray_cc_top
  import flexray_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR      = 32'h8000_0000,
  parameter int unsigned N_TX_BUF        = 128,
  parameter int unsigned N_RX_BUF        = 128,
  parameter int unsigned FIFO_DEPTH      = 8,
  parameter int unsigned SAMPLES_PER_BIT = 8,
  parameter int unsigned TSS_BITS        = 9,
  parameter int unsigned CLKS_PER_MT     = 80,
  parameter int unsigned N_STATIC        = 8,
  parameter int unsigned STATIC_SLOT_MT  = 300,
  parameter int unsigned N_MINISLOTS     = 50,
  parameter int unsigned MINISLOT_MT     = 8,
  parameter int unsigned SYMBOL_MT       = 20,
  parameter int unsigned NIT_MT          = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  // OPB slave
  input  logic        OPB_select,
  input  logic        OPB_RNW,
  input  logic [31:0] OPB_ABus,
  input  logic [31:0] OPB_DBus,
  output logic [31:0] Sl_DBus,
  output logic        Sl_xferAck,
  output logic        irq,
  // results of wakeup/startup and clock synchronisation
  input  logic        integration_ok,
  input  logic        sync_ok,
  input  logic        sync_error,
  // bus driver
  output logic        tx,
  output logic        tx_en,
  input  logic        rx
);

  localparam int unsigned TBW = $clog2(N_TX_BUF);
  localparam int unsigned RBW = $clog2(N_RX_BUF);
  localparam int unsigned FAW = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;

  // register bus
  logic        reg_wr;
  logic [15:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [9:0]  events;

  // POC
  logic       poc_cmd_valid, tx_allowed, rx_allowed;
  poc_cmd_t   poc_cmd;
  poc_state_t poc_state;

  // MAC
  segment_t    segment;
  logic [5:0]  cycle;
  logic [10:0] slot_id;
  logic        mt_tick, cycle_start, static_start, dyn_start, sym_start, nit_start, slot_start;

  // Tx path
  logic           txb_wr, txb_commit, txb_commit_val, tx_hit, tx_req, tx_busy, tx_done;
  logic [TBW-1:0] txb_wr_buf, txb_commit_buf, tx_hit_buf, tx_rd_buf;
  logic [8:0]     txb_wr_addr, tx_rd_addr;
  logic [7:0]     txb_wr_data, tx_rd_data;
  logic [N_TX_BUF-1:0] txb_ready;
  logic [3:0]     tx_r_len;
  logic           f_tx, f_tx_en;

  // symbols
  logic sym_req_cas_mts, sym_req_wus, sym_ok_cas_mts, sym_ok_wus;
  logic sym_tx, sym_tx_en, sym_busy, sym_done;
  logic bd_cas_mts, bd_wus, symbol_valid, symbol_wus;

  // Rx path
  logic        channel_idle, bd_start, bd_valid, bd_end, bd_err;
  logic [7:0]  bd_data;
  logic        st_valid;
  rx_status_t  st_status;
  frame_hdr_t  st_hdr, o_hdr;
  logic [15:0] dropped, o_msg;
  logic        o_start, o_valid, o_end;
  logic [7:0]  o_idx, o_data;

  logic           rxb_cfg_wr, rxb_clr, rxb_matched;
  logic [RBW-1:0] rxb_sel;
  rxb_filter_t    rxb_cfg;
  logic [7:0]     rxb_rd_addr, rxb_rd_data;
  frame_hdr_t     rxb_rd_hdr;
  logic [N_RX_BUF-1:0] rxb_new;

  logic          fifo_cfg_wr, fifo_empty, fifo_overflow, fifo_pop, fifo_clr_ovf;
  logic [1:0]    fifo_cfg_idx;
  acc_filter_t   fifo_cfg;
  logic [FAW:0]  fifo_count;
  frame_hdr_t    fifo_head_hdr;
  logic [7:0]    fifo_rd_addr, fifo_rd_data;

  opb_ui #(.C_BASEADDR(C_BASEADDR), .N_EVENTS(10)) u_ui (
    .clk, .rst_n,
    .OPB_select, .OPB_RNW, .OPB_ABus, .OPB_DBus, .Sl_DBus, .Sl_xferAck,
    .events, .irq,
    .reg_wr, .reg_addr, .reg_wdata, .reg_rdata
  );

  chi_regs #(.N_TX_BUF(N_TX_BUF), .N_RX_BUF(N_RX_BUF), .FIFO_DEPTH(FIFO_DEPTH)) u_chi (
    .clk, .rst_n,
    .reg_wr, .reg_addr, .reg_wdata, .reg_rdata, .events,
    .poc_cmd_valid, .poc_cmd, .poc_state, .cycle, .slot_id, .segment, .channel_idle,
    .rx_status_valid(st_valid), .rx_status(st_status), .rx_status_hdr(st_hdr),
    .rx_dropped(dropped), .tx_done(tx_done || sym_done),
    .sym_req_cas_mts, .sym_req_wus, .symbol_valid, .symbol_wus,
    .txb_wr, .txb_wr_buf, .txb_wr_addr, .txb_wr_data,
    .txb_commit, .txb_commit_buf, .txb_commit_val,
    .rxb_cfg_wr, .rxb_sel, .rxb_cfg, .rxb_rd_addr, .rxb_rd_data, .rxb_rd_hdr,
    .rxb_new, .rxb_clr,
    .fifo_cfg_wr, .fifo_cfg_idx, .fifo_cfg, .fifo_empty, .fifo_count, .fifo_head_hdr,
    .fifo_rd_addr, .fifo_rd_data, .fifo_overflow, .fifo_pop,
    .fifo_clr_overflow(fifo_clr_ovf)
  );

  poc_fsm u_poc (
    .clk, .rst_n,
    .cmd_valid(poc_cmd_valid), .cmd(poc_cmd),
    .integration_ok, .sync_ok, .sync_error,
    .state(poc_state), .tx_allowed, .rx_allowed
  );

  mac_timer #(
    .CLKS_PER_MT(CLKS_PER_MT), .N_STATIC(N_STATIC), .STATIC_SLOT_MT(STATIC_SLOT_MT),
    .N_MINISLOTS(N_MINISLOTS), .MINISLOT_MT(MINISLOT_MT), .SYMBOL_MT(SYMBOL_MT),
    .NIT_MT(NIT_MT)
  ) u_mac (
    .clk, .rst_n,
    .run(rx_allowed), .bus_busy(!channel_idle),
    .segment, .cycle, .slot_id, .mt_tick,
    .cycle_start, .static_start, .dyn_start, .sym_start, .nit_start, .slot_start
  );

  tx_buffers #(.N_TX_BUF(N_TX_BUF)) u_txb (
    .clk, .rst_n,
    .wr_en(txb_wr), .wr_buf(txb_wr_buf), .wr_addr(txb_wr_addr), .wr_data(txb_wr_data),
    .commit(txb_commit), .commit_buf(txb_commit_buf), .commit_val(txb_commit_val),
    .ready(txb_ready),
    .slot_id, .hit(tx_hit), .hit_buf(tx_hit_buf),
    .rd_buf(tx_rd_buf), .rd_addr(tx_rd_addr), .rd_data(tx_rd_data)
  );

  // send the slot's frame at the slot boundary (static or dynamic segment)
  assign tx_req = slot_start && tx_allowed && tx_hit && !tx_busy &&
                  (segment == SEG_STATIC || segment == SEG_DYNAMIC);

  bse_frame_encoder #(
    .N_TX_BUF(N_TX_BUF), .SAMPLES_PER_BIT(SAMPLES_PER_BIT), .TSS_BITS(TSS_BITS)
  ) u_bse (
    .clk, .rst_n,
    .tx_req, .tx_buf(tx_hit_buf), .cycle,
    .rd_buf(tx_rd_buf), .rd_addr(tx_rd_addr), .rd_data(tx_rd_data),
    .tx(f_tx), .tx_en(f_tx_en), .busy(tx_busy), .done(tx_done), .r_len(tx_r_len)
  );

  // symbols: an MTS starts at the symbol window start in normal active, a
  // CAS at once during startup; a WUS in the wake-up state on an idle bus
  assign sym_ok_cas_mts = !tx_busy &&
                          ((sym_start && tx_allowed) || (poc_state == POC_STARTUP && channel_idle));
  assign sym_ok_wus     = !tx_busy && poc_state == POC_WAKEUP && channel_idle;

  bse_symbol_encoder #(.SAMPLES_PER_BIT(SAMPLES_PER_BIT)) u_sym (
    .clk, .rst_n,
    .req_cas_mts(sym_req_cas_mts), .req_wus(sym_req_wus),
    .ok_cas_mts(sym_ok_cas_mts), .ok_wus(sym_ok_wus),
    .tx(sym_tx), .tx_en(sym_tx_en), .busy(sym_busy), .done(sym_done)
  );

  // the two encoders never drive at the same time; idle TX is high
  assign tx    = f_tx & sym_tx;
  assign tx_en = f_tx_en | sym_tx_en;

  bsd_bit_decoder #(.SAMPLES_PER_BIT(SAMPLES_PER_BIT)) u_bsd (
    .clk, .rst_n, .rxd(rx),
    .channel_idle, .frame_start(bd_start), .byte_valid(bd_valid), .byte_data(bd_data),
    .frame_end(bd_end), .dec_error(bd_err),
    .sym_cas_mts(bd_cas_mts), .sym_wus(bd_wus)
  );

  fsp_frame_checker u_fsp (
    .clk, .rst_n, .enable(rx_allowed),
    .frame_start(bd_start), .byte_valid(bd_valid), .byte_data(bd_data),
    .frame_end(bd_end), .dec_error(bd_err),
    .sym_cas_mts(bd_cas_mts), .sym_wus(bd_wus), .segment,
    .slot_id, .cycle, .slot_start, .tx_active(tx_busy || sym_busy),
    .status_valid(st_valid), .status(st_status), .status_hdr(st_hdr), .dropped,
    .symbol_valid, .symbol_wus,
    .out_start(o_start), .out_hdr(o_hdr), .out_msg_id(o_msg),
    .out_valid(o_valid), .out_idx(o_idx), .out_data(o_data), .out_end(o_end)
  );

  rx_buffers #(.N_RX_BUF(N_RX_BUF)) u_rxb (
    .clk, .rst_n,
    .cfg_wr(rxb_cfg_wr), .cfg_buf(rxb_sel), .cfg(rxb_cfg),
    .in_start(o_start), .in_hdr(o_hdr), .in_msg_id(o_msg),
    .in_valid(o_valid), .in_idx(o_idx), .in_data(o_data), .in_end(o_end),
    .matched(rxb_matched),
    .rd_buf(rxb_sel), .rd_addr(rxb_rd_addr), .rd_data(rxb_rd_data), .rd_hdr(rxb_rd_hdr),
    .clr(rxb_clr), .clr_buf(rxb_sel), .new_data(rxb_new)
  );

  rx_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .cfg_wr(fifo_cfg_wr), .cfg_idx(fifo_cfg_idx), .cfg(fifo_cfg),
    .in_start(o_start), .in_hdr(o_hdr), .in_msg_id(o_msg),
    .in_valid(o_valid), .in_idx(o_idx), .in_data(o_data), .in_end(o_end),
    .skip(rxb_matched),
    .empty(fifo_empty), .count(fifo_count), .head_hdr(fifo_head_hdr),
    .rd_addr(fifo_rd_addr), .rd_data(fifo_rd_data), .pop(fifo_pop),
    .overflow(fifo_overflow), .clr_overflow(fifo_clr_ovf)
  );

endmodule
