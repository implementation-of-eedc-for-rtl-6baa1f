// rx_buffers: dedicated receive buffers of the controller host interface.
//
// N_RX_BUF buffers each store the payload and header of one frame. Each
// buffer has a filter (rxb_filter_t) that the host programs through cfg_wr:
// when enabled it accepts a frame whose frame ID, cycle count and message ID
// match the values of the fields selected by use_fid/use_cyc/use_msg, so any
// combination of the three can be used. When frame processing starts handing
// on a valid frame (in_start), the lowest-numbered matching buffer is chosen
// ('matched' is high in that same clock, combinational, so the Rx FIFO can
// skip the frame). Payload bytes are written as they arrive and, with
// in_end, the header is stored and the buffer's new_data flag set. A newer
// frame overwrites an unread one. The host reads payload bytes with one
// clock of latency, reads the stored header and clears new_data with clr.
//
// The document gives the number of buffers (up to 128), one frame per buffer
// and the filter on any combination of frame ID, cycle counter and message
// ID; the exact-match filter, the priority and the overwrite rule are this
// design's own.
module rx_buffers
  import flexray_pkg::*;
#(
  parameter int unsigned N_RX_BUF = 128,
  localparam int unsigned BW = $clog2(N_RX_BUF)
) (
  input  logic          clk,
  input  logic          rst_n,
  // filter configuration
  input  logic          cfg_wr,
  input  logic [BW-1:0] cfg_buf,
  input  rxb_filter_t   cfg,
  // from frame processing
  input  logic          in_start,
  input  frame_hdr_t    in_hdr,
  input  logic [15:0]   in_msg_id,
  input  logic          in_valid,
  input  logic [7:0]    in_idx,
  input  logic [7:0]    in_data,
  input  logic          in_end,
  output logic          matched,
  // host side
  input  logic [BW-1:0] rd_buf,
  input  logic [7:0]    rd_addr,
  output logic [7:0]    rd_data,
  output frame_hdr_t    rd_hdr,
  input  logic          clr,
  input  logic [BW-1:0] clr_buf,
  output logic [N_RX_BUF-1:0] new_data
);

  rxb_filter_t flt [N_RX_BUF];
  frame_hdr_t  hdr [N_RX_BUF];
  logic [7:0]  mem [N_RX_BUF][MAX_PAYLOAD];
  logic [BW-1:0] match_buf, sel;
  logic          active;
  frame_hdr_t    cur_hdr;

  function automatic logic hits(rxb_filter_t f, frame_hdr_t h, logic [15:0] m);
    return f.en && (!f.use_fid || f.fid == h.frame_id) &&
           (!f.use_cyc || f.cyc == h.cycle) && (!f.use_msg || f.msg_id == m);
  endfunction

  always_comb begin
    matched   = 1'b0;
    match_buf = '0;
    for (int i = N_RX_BUF - 1; i >= 0; i--)
      if (hits(flt[i], in_hdr, in_msg_id)) begin
        matched   = in_start;
        match_buf = BW'(i);
      end
  end

  always_ff @(posedge clk) begin
    if (active && in_valid && in_idx < 8'(MAX_PAYLOAD)) mem[sel][in_idx] <= in_data;
    rd_data <= mem[rd_buf][(rd_addr < 8'(MAX_PAYLOAD)) ? rd_addr : 8'd0];
  end

  assign rd_hdr = hdr[rd_buf];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_RX_BUF; i++) begin
        flt[i] <= '0;
        hdr[i] <= '0;
      end
      new_data <= '0;
      active   <= 1'b0;
      sel      <= '0;
      cur_hdr  <= '0;
    end else begin
      if (cfg_wr) flt[cfg_buf] <= cfg;
      if (clr) new_data[clr_buf] <= 1'b0;
      if (in_start) begin
        active  <= matched;
        sel     <= match_buf;
        cur_hdr <= in_hdr;
      end
      if (active && in_end) begin
        active        <= 1'b0;
        hdr[sel]      <= cur_hdr;
        new_data[sel] <= 1'b1;
      end
    end
  end

endmodule
