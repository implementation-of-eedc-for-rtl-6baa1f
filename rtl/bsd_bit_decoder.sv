// bsd_bit_decoder: bitstream decoder of the protocol engine.
//
// RX is synchronised with two flip-flops and sampled every clock
// (SAMPLES_PER_BIT samples per bit). A majority vote over the last VOTE_WIN
// samples removes glitches. Bit clock alignment restarts the sample counter
// on each falling edge of the voted signal at the start of a frame and in
// each byte start sequence; the bit is strobed STROBE_POS samples after that.
// The strobed bits are decoded by a state machine:
//   channel idle : IDLE_BITS consecutive high bits ('channel_idle' = 1)
//   TSS          : low bits, ended by the high FSS bit ('frame_start')
//   BSS          : high, low; then 8 data bits MSB first ('byte_valid')
//   after a byte : high, low = next BSS;  low, high = FES ('frame_end')
// A low phase that is too long for a TSS is a symbol when it ends with a
// high bit: CAS_RX_MIN..CAS_RX_MAX low bits give 'sym_cas_mts' (collision
// avoidance or media test symbol, which share one pattern) and
// WUS_RX_MIN..WUS_RX_MAX low bits give 'sym_wus' (one wakeup symbol phase).
// Any other bit pattern is a decoding error ('dec_error'); the decoder then
// waits for channel idle again. 'channel_idle' stays low from the start of a
// frame until the bus has been idle again for IDLE_BITS bits, and serves as
// bus activity for the MAC.
//
// The document lists sampling and majority voting, bit clock alignment and
// bit strobing, frame decoding, channel idle detection and decoding error
// detection as the BSD's tasks. The window of 5, strobe point, 11-bit idle
// delimiter, coding patterns and symbol length windows follow the FlexRay
// coding scheme and are this design's reading; the document names symbol
// decoding but gives no symbol formats.
module bsd_bit_decoder #(
  parameter int unsigned SAMPLES_PER_BIT = 8,
  parameter int unsigned VOTE_WIN        = 5,
  parameter int unsigned STROBE_POS      = 4,
  parameter int unsigned IDLE_BITS       = 11,
  parameter int unsigned TSS_MAX_BITS    = 16,
  parameter int unsigned CAS_RX_MIN      = 26,
  parameter int unsigned CAS_RX_MAX      = 40,
  parameter int unsigned WUS_RX_MIN      = 50,
  parameter int unsigned WUS_RX_MAX      = 70
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       channel_idle,
  output logic       frame_start,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic       frame_end,
  output logic       dec_error,
  output logic       sym_cas_mts,
  output logic       sym_wus
);

  typedef enum logic [2:0] {
    D_WAIT_IDLE, D_IDLE, D_TSS, D_BSS1, D_BSS0, D_DATA, D_AFTER, D_FES1
  } dstate_t;

  logic [1:0]          sync;
  logic [VOTE_WIN-1:0] win;
  logic                voted, voted_q, fall, strobe;
  logic [$clog2(SAMPLES_PER_BIT)-1:0] smp;
  logic [6:0]          cnt;
  dstate_t             st;

  always_comb begin
    int ones;
    ones = 0;
    for (int i = 0; i < VOTE_WIN; i++) ones += int'(win[i]);
    voted = (ones > int'(VOTE_WIN / 2));
  end

  assign fall   = voted_q && !voted;
  assign strobe = (smp == ($bits(smp))'(STROBE_POS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync         <= 2'b11;
      win          <= '1;
      voted_q      <= 1'b1;
      smp          <= '0;
      cnt          <= '0;
      st           <= D_WAIT_IDLE;
      channel_idle <= 1'b0;
      frame_start  <= 1'b0;
      byte_valid   <= 1'b0;
      byte_data    <= '0;
      frame_end    <= 1'b0;
      dec_error    <= 1'b0;
      sym_cas_mts  <= 1'b0;
      sym_wus      <= 1'b0;
    end else begin
      sync        <= {sync[0], rxd};
      win         <= {win[VOTE_WIN-2:0], sync[1]};
      voted_q     <= voted;
      frame_start <= 1'b0;
      byte_valid  <= 1'b0;
      frame_end   <= 1'b0;
      dec_error   <= 1'b0;
      sym_cas_mts <= 1'b0;
      sym_wus     <= 1'b0;

      // bit clock alignment
      if (fall && (st == D_IDLE || st == D_BSS0 || st == D_WAIT_IDLE))
        smp <= '0;
      else
        smp <= (smp == ($bits(smp))'(SAMPLES_PER_BIT - 1)) ? '0 : smp + 1'b1;

      if (st == D_IDLE && fall) begin
        st           <= D_TSS;
        cnt          <= '0;
        channel_idle <= 1'b0;
      end else if (strobe) begin
        unique case (st)
          D_WAIT_IDLE:
            if (!voted) cnt <= '0;
            else if (cnt == 7'(IDLE_BITS - 1)) begin
              st           <= D_IDLE;
              channel_idle <= 1'b1;
            end else cnt <= cnt + 7'd1;
          D_IDLE: ;
          D_TSS:
            if (voted && cnt < 7'(TSS_MAX_BITS)) begin
              frame_start <= 1'b1;
              st          <= D_BSS1;
            end else if (voted) begin
              // end of a long low phase: a symbol or a coding error
              if (cnt >= 7'(CAS_RX_MIN) && cnt <= 7'(CAS_RX_MAX))      sym_cas_mts <= 1'b1;
              else if (cnt >= 7'(WUS_RX_MIN) && cnt <= 7'(WUS_RX_MAX)) sym_wus     <= 1'b1;
              else                                                    dec_error   <= 1'b1;
              st  <= D_WAIT_IDLE;
              cnt <= 7'd1;  // this high bit counts as idle
            end else if (cnt == 7'(WUS_RX_MAX)) begin
              dec_error <= 1'b1;
              st        <= D_WAIT_IDLE;
              cnt       <= '0;
            end else cnt <= cnt + 7'd1;
          D_BSS1:
            if (voted) st <= D_BSS0;
            else begin
              dec_error <= 1'b1;
              st        <= D_WAIT_IDLE;
              cnt       <= '0;
            end
          D_BSS0:
            if (!voted) begin
              st  <= D_DATA;
              cnt <= '0;
            end else begin
              dec_error <= 1'b1;
              st        <= D_WAIT_IDLE;
              cnt       <= '0;
            end
          D_DATA: begin
            byte_data <= {byte_data[6:0], voted};
            cnt       <= cnt + 7'd1;
            if (cnt == 7'd7) begin
              byte_valid <= 1'b1;
              st         <= D_AFTER;
            end
          end
          D_AFTER:
            st <= voted ? D_BSS0 : D_FES1;
          D_FES1: begin
            if (voted) frame_end <= 1'b1;
            else       dec_error <= 1'b1;
            st  <= D_WAIT_IDLE;
            cnt <= voted ? 7'd1 : 7'd0;  // the FES high bit counts as idle
          end
          default: st <= D_WAIT_IDLE;
        endcase
      end
    end
  end

endmodule
