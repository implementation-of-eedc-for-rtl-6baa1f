// rx_fifo: receive FIFO of the controller host interface.
//
// Holds up to DEPTH received frames (header plus up to 254 payload bytes
// each) in arrival order. A valid frame handed on by frame processing is
// taken when no dedicated receive buffer took it ('skip' low) and at least
// one of the four acceptance filter pairs passes it: a pair passes a frame
// when ((field ^ data) & mask) == 0 for the frame ID, the cycle count and
// the message ID. When the FIFO is full the frame is lost and 'overflow' is
// set until the host clears it. The host sees the oldest frame: its header
// (head_hdr), its payload bytes through rd_addr with one clock of latency,
// and removes it with 'pop'.
//
// The document gives the FIFO of whole frames, its configurable size and the
// four mask/data filter pairs on frame ID, cycle counter and message ID. The
// rule that the FIFO takes only frames no Rx buffer took, the default depth
// of 8 frames and the overflow flag are this design's own.
module rx_fifo
  import flexray_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_wr,
  input  logic [1:0]  cfg_idx,
  input  acc_filter_t cfg,
  // from frame processing
  input  logic        in_start,
  input  frame_hdr_t  in_hdr,
  input  logic [15:0] in_msg_id,
  input  logic        in_valid,
  input  logic [7:0]  in_idx,
  input  logic [7:0]  in_data,
  input  logic        in_end,
  input  logic        skip,
  // host side
  output logic        empty,
  output logic [AW:0] count,
  output frame_hdr_t  head_hdr,
  input  logic [7:0]  rd_addr,
  output logic [7:0]  rd_data,
  input  logic        pop,
  output logic        overflow,
  input  logic        clr_overflow
);

  acc_filter_t flt [4];
  frame_hdr_t  hdr [DEPTH];
  logic [7:0]  mem [DEPTH][MAX_PAYLOAD];
  logic [AW-1:0] wp, rp;
  logic          active, accept;
  frame_hdr_t    cur_hdr;

  function automatic logic pass(acc_filter_t f, frame_hdr_t h, logic [15:0] m);
    return f.en && (((h.frame_id ^ f.fid_data) & f.fid_mask) == '0) &&
           (((h.cycle ^ f.cyc_data) & f.cyc_mask) == '0) &&
           (((m ^ f.msg_data) & f.msg_mask) == '0);
  endfunction

  always_comb begin
    accept = 1'b0;
    for (int i = 0; i < 4; i++)
      if (pass(flt[i], in_hdr, in_msg_id)) accept = 1'b1;
    accept = accept && !skip;
  end

  assign empty    = (count == '0);
  assign head_hdr = hdr[rp];

  always_ff @(posedge clk) begin
    if (active && in_valid && in_idx < 8'(MAX_PAYLOAD)) mem[wp][in_idx] <= in_data;
    rd_data <= mem[rp][(rd_addr < 8'(MAX_PAYLOAD)) ? rd_addr : 8'd0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) flt[i] <= '0;
      for (int i = 0; i < DEPTH; i++) hdr[i] <= '0;
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      active   <= 1'b0;
      overflow <= 1'b0;
      cur_hdr  <= '0;
    end else begin
      logic push, do_pop;
      push   = active && in_end;
      do_pop = pop && !empty;
      if (cfg_wr) flt[cfg_idx] <= cfg;
      if (clr_overflow) overflow <= 1'b0;
      if (in_start && accept) begin
        if (count == (AW + 1)'(DEPTH) && !do_pop) overflow <= 1'b1;
        else begin
          active  <= 1'b1;
          cur_hdr <= in_hdr;
        end
      end
      if (push) begin
        active  <= 1'b0;
        hdr[wp] <= cur_hdr;
        wp      <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (do_pop) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW + 1)'(push) - (AW + 1)'(do_pop);
    end
  end

endmodule
