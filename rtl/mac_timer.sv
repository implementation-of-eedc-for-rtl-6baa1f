// mac_timer: media access control timing of the FlexRay communication cycle.
//
// While 'run' is high the timer counts macroticks (CLKS_PER_MT clocks each)
// and walks through the cycle: static segment (N_STATIC equal static slots),
// dynamic segment (N_MINISLOTS minislots), symbol window and network idle
// time (NIT). Cycles are numbered 0..63 and wrap. Slots are numbered from 1
// through the static segment and on into the dynamic segment. A dynamic slot
// ends at the first minislot boundary where 'bus_busy' is low, so it lasts
// one minislot when the bus stays quiet and is stretched minislot by
// minislot while a frame is on the bus: dynamic slots adapt to the frames
// sent in them. The dynamic
// segment always ends after N_MINISLOTS minislots.
//
// One-clock strobes mark the start of the cycle, of each segment and of each
// slot (slot boundary); they come on the clock where the new segment/slot
// becomes current, together with the new slot_id. When 'run' drops the timer
// returns to idle at once.
//
// The document gives the cycle structure (cycles 0..63, static slots,
// minislots, symbol window, NIT) and the strobes the MAC asserts; all
// durations are this design's own defaults, and the clock-sync corrections
// of a full FlexRay node are not applied.
module mac_timer
  import flexray_pkg::*;
#(
  parameter int unsigned CLKS_PER_MT    = 80,   // 1 us macrotick at 80 MHz
  parameter int unsigned N_STATIC       = 8,
  parameter int unsigned STATIC_SLOT_MT = 300,
  parameter int unsigned N_MINISLOTS    = 50,
  parameter int unsigned MINISLOT_MT    = 8,
  parameter int unsigned SYMBOL_MT      = 20,
  parameter int unsigned NIT_MT         = 20,
  parameter int unsigned N_CYCLES       = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        bus_busy,
  output segment_t    segment,
  output logic [5:0]  cycle,
  output logic [10:0] slot_id,
  output logic        mt_tick,
  output logic        cycle_start,
  output logic        static_start,
  output logic        dyn_start,
  output logic        sym_start,
  output logic        nit_start,
  output logic        slot_start
);

  logic [$clog2(CLKS_PER_MT+1)-1:0] pre;
  logic [15:0] mt_in_unit;      // macroticks into the current slot/minislot/window
  logic [15:0] unit_idx;        // static slot or minislot index within segment
  logic        running;

  assign mt_tick = running && (pre == ($bits(pre))'(CLKS_PER_MT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre          <= '0;
      mt_in_unit   <= '0;
      unit_idx     <= '0;
      running      <= 1'b0;
      segment      <= SEG_IDLE;
      cycle        <= '0;
      slot_id      <= '0;
      cycle_start  <= 1'b0;
      static_start <= 1'b0;
      dyn_start    <= 1'b0;
      sym_start    <= 1'b0;
      nit_start    <= 1'b0;
      slot_start   <= 1'b0;
    end else begin
      cycle_start  <= 1'b0;
      static_start <= 1'b0;
      dyn_start    <= 1'b0;
      sym_start    <= 1'b0;
      nit_start    <= 1'b0;
      slot_start   <= 1'b0;
      if (!run) begin
        running  <= 1'b0;
        segment  <= SEG_IDLE;
        pre      <= '0;
        cycle    <= '0;
        slot_id  <= '0;
      end else if (!running) begin
        // first cycle begins
        running      <= 1'b1;
        segment      <= SEG_STATIC;
        cycle        <= '0;
        slot_id      <= 11'd1;
        pre          <= '0;
        mt_in_unit   <= '0;
        unit_idx     <= '0;
        cycle_start  <= 1'b1;
        static_start <= 1'b1;
        slot_start   <= 1'b1;
      end else begin
        if (!mt_tick) begin
          pre <= pre + 1'b1;
        end else begin
          pre        <= '0;
          mt_in_unit <= mt_in_unit + 16'd1;
          unique case (segment)
            SEG_STATIC:
              if (mt_in_unit == 16'(STATIC_SLOT_MT - 1)) begin
                mt_in_unit <= '0;
                if (unit_idx == 16'(N_STATIC - 1)) begin
                  unit_idx <= '0;
                  if (N_MINISLOTS != 0) begin
                    segment    <= SEG_DYNAMIC;
                    dyn_start  <= 1'b1;
                    slot_id    <= slot_id + 11'd1;
                    slot_start <= 1'b1;
                  end else begin
                    segment   <= SEG_SYMBOL;
                    sym_start <= 1'b1;
                  end
                end else begin
                  unit_idx   <= unit_idx + 16'd1;
                  slot_id    <= slot_id + 11'd1;
                  slot_start <= 1'b1;
                end
              end
            SEG_DYNAMIC:
              if (mt_in_unit == 16'(MINISLOT_MT - 1)) begin
                mt_in_unit <= '0;
                unit_idx   <= unit_idx + 16'd1;
                if (unit_idx == 16'(N_MINISLOTS - 1)) begin
                  unit_idx  <= '0;
                  segment   <= SEG_SYMBOL;
                  sym_start <= 1'b1;
                end else if (!bus_busy) begin
                  // quiet minislot, or the frame in this slot has ended
                  slot_id    <= slot_id + 11'd1;
                  slot_start <= 1'b1;
                end
              end
            SEG_SYMBOL:
              if (mt_in_unit == 16'(SYMBOL_MT - 1)) begin
                mt_in_unit <= '0;
                segment    <= SEG_NIT;
                nit_start  <= 1'b1;
              end
            SEG_NIT:
              if (mt_in_unit == 16'(NIT_MT - 1)) begin
                mt_in_unit   <= '0;
                segment      <= SEG_STATIC;
                cycle        <= (cycle == 6'(N_CYCLES - 1)) ? 6'd0 : cycle + 6'd1;
                slot_id      <= 11'd1;
                cycle_start  <= 1'b1;
                static_start <= 1'b1;
                slot_start   <= 1'b1;
              end
            default: ;
          endcase
        end
      end
    end
  end

endmodule
