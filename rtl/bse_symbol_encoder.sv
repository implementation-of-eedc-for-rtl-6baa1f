// bse_symbol_encoder: symbol encoder of the bitstream encoder.
//
// Sends the FlexRay symbols on TX/TX_EN. The collision avoidance symbol
// (CAS) and the media test symbol (MTS) share one pattern: CAS_BITS low bits
// with the driver enabled, after which the driver is released. The wakeup
// symbol (WUS) is WUS_REPEAT repetitions of WUS_LOW_BITS low bits with the
// driver enabled followed by WUS_IDLE_BITS bits with the driver released
// (the bus then reads idle high).
//
// Interface: a one-clock pulse on 'req_cas_mts' or 'req_wus' makes that
// symbol pending. A pending CAS/MTS is sent once 'ok_cas_mts' is high and a
// pending WUS once 'ok_wus' is high; the owner of this block decides when
// each symbol is allowed (symbol window, startup, wakeup). A pending request
// is kept until its symbol has been sent. 'busy' is high while a symbol is
// being sent, including the idle phases of a WUS, and 'done' pulses for one
// clock at its end. Each bit lasts SAMPLES_PER_BIT clocks; the first bit
// starts on the clock after the start condition holds.
//
// The document says the symbol encoder sends these three symbols; the bit
// lengths follow the FlexRay coding scheme and are this design's reading,
// as the document gives no symbol formats.
module bse_symbol_encoder #(
  parameter int unsigned SAMPLES_PER_BIT = 8,
  parameter int unsigned CAS_BITS        = 30,
  parameter int unsigned WUS_LOW_BITS    = 60,
  parameter int unsigned WUS_IDLE_BITS   = 180,
  parameter int unsigned WUS_REPEAT      = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req_cas_mts,
  input  logic req_wus,
  input  logic ok_cas_mts,
  input  logic ok_wus,
  output logic tx,
  output logic tx_en,
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] { S_IDLE, S_LOW, S_REL } sstate_t;

  localparam int unsigned SW = (SAMPLES_PER_BIT > 1) ? $clog2(SAMPLES_PER_BIT) : 1;

  sstate_t     st;
  logic        pend_cas, pend_wus, is_wus;
  logic [SW-1:0] smp;
  logic [7:0]  bits;     // bits left in the current phase, minus one
  logic [3:0]  rep;      // WUS repetitions left, minus one
  logic        bit_end;

  assign bit_end = (smp == SW'(SAMPLES_PER_BIT - 1));
  assign busy    = (st != S_IDLE);
  assign tx      = (st != S_LOW);
  assign tx_en   = (st == S_LOW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      pend_cas <= 1'b0;
      pend_wus <= 1'b0;
      is_wus   <= 1'b0;
      smp      <= '0;
      bits     <= '0;
      rep      <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (req_cas_mts) pend_cas <= 1'b1;
      if (req_wus)     pend_wus <= 1'b1;
      unique case (st)
        S_IDLE: begin
          smp <= '0;
          if (pend_cas && ok_cas_mts) begin
            pend_cas <= 1'b0;
            is_wus   <= 1'b0;
            bits     <= 8'(CAS_BITS - 1);
            st       <= S_LOW;
          end else if (pend_wus && ok_wus) begin
            pend_wus <= 1'b0;
            is_wus   <= 1'b1;
            bits     <= 8'(WUS_LOW_BITS - 1);
            rep      <= 4'(WUS_REPEAT - 1);
            st       <= S_LOW;
          end
        end
        S_LOW: begin
          smp <= bit_end ? '0 : smp + 1'b1;
          if (bit_end) begin
            if (bits != 8'd0) bits <= bits - 8'd1;
            else if (is_wus) begin
              bits <= 8'(WUS_IDLE_BITS - 1);
              st   <= S_REL;
            end else begin
              done <= 1'b1;
              st   <= S_IDLE;
            end
          end
        end
        S_REL: begin
          smp <= bit_end ? '0 : smp + 1'b1;
          if (bit_end) begin
            if (bits != 8'd0) bits <= bits - 8'd1;
            else if (rep != 4'd0) begin
              rep  <= rep - 4'd1;
              bits <= 8'(WUS_LOW_BITS - 1);
              st   <= S_LOW;
            end else begin
              done <= 1'b1;
              st   <= S_IDLE;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
