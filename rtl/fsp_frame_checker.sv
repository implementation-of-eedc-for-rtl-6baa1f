// fsp_frame_checker: frame processing of received frames.
//
// Collects the bytes decoded by the bitstream decoder. The five header bytes
// are kept in registers and the payload in a byte array. As soon as header
// byte 2 (payload length) has arrived, the EEDC decoder is started and given
// the bytes so far; later data bytes are passed to it as they arrive, and the
// trailer bytes form the received redundancy bits. At the frame end the
// frame is checked:
//   syntax error   : a decoding error inside the frame, or a byte count
//                    different from 5 + 2*length + trailer bytes
//   EEDC           : a single wrong bit is corrected in place
//                    ('eedc_corrected'); a syndrome that matches no bit
//                    position makes the frame invalid ('eedc_uncorrectable')
//   content error  : frame ID not equal to the current slot, or cycle count
//                    not equal to the node's cycle counter
//   boundary violation : a slot boundary passed while the frame was on the bus
// One 'status_valid' pulse reports each frame. A valid frame is then passed
// on to the receive buffers and FIFO: 'out_start' with the header and the
// message ID (first two payload bytes, zero when the payload is shorter),
// then one payload byte per clock on out_valid/out_idx/out_data, with
// 'out_end' on the last byte (alone for an empty payload). Slot and cycle
// are those current when the frame started. Frames that start while this node is transmitting are its own
// and are ignored; frames that start while the previous one is still being
// checked or passed on are dropped and counted in 'dropped'.
// Symbols reported by the decoder are checked against the schedule: a
// CAS/MTS is a valid symbol when it arrives in the symbol window of normal
// operation, or at any time outside normal operation ('enable' low, where it
// is a collision avoidance symbol of the startup); a wakeup symbol phase is
// valid only outside normal operation. Symbols reported while this node
// transmits or within 64 clocks after it stopped are its own and are
// ignored (the decoder reports a symbol about 1.5 bits after its low phase,
// so the hold assumes at most about 40 clocks per bit). A valid symbol gives one
// 'symbol_valid' pulse two clocks after the decoder's pulse, with
// 'symbol_wus' telling which kind it was; others are ignored, as are the
// node's own symbols.
//
// The document lists the FSP status indicators (valid frame, syntax error,
// content error, boundary violation) and that EEDC corrects errors; the order
// of checks, the symbol timing rule and the hand-off to the buffers are this
// design's own. TX conflicts are not reported.
module fsp_frame_checker
  import flexray_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  // from the bitstream decoder
  input  logic        frame_start,
  input  logic        byte_valid,
  input  logic [7:0]  byte_data,
  input  logic        frame_end,
  input  logic        dec_error,
  input  logic        sym_cas_mts,
  input  logic        sym_wus,
  input  segment_t    segment,
  // from the MAC and transmitter
  input  logic [10:0] slot_id,
  input  logic [5:0]  cycle,
  input  logic        slot_start,
  input  logic        tx_active,
  // status
  output logic        status_valid,
  output rx_status_t  status,
  output frame_hdr_t  status_hdr,
  output logic [15:0] dropped,
  output logic        symbol_valid,
  output logic        symbol_wus,
  // hand-off to Rx buffers / FIFO
  output logic        out_start,
  output frame_hdr_t  out_hdr,
  output logic [15:0] out_msg_id,
  output logic        out_valid,
  output logic [7:0]  out_idx,
  output logic [7:0]  out_data,
  output logic        out_end
);

  typedef enum logic [2:0] {F_IDLE, F_RX, F_CHECK, F_FIX, F_REPORT, F_OUT, F_SKIP} fstate_t;

  fstate_t     st;
  logic [7:0]  hdr [HDR_BYTES];
  logic [7:0]  pay [MAX_PAYLOAD];
  logic [9:0]  nrx;                 // bytes received
  logic [8:0]  nbytes;
  logic [1:0]  ntrail;
  logic [15:0] trail;
  logic        syn_err, bnd_err;
  logic [1:0]  replay;              // header bytes still to give to the decoder
  logic [7:0]  oidx;
  logic [10:0] slot_q;              // slot and cycle when the frame started
  logic [5:0]  cycle_q;
  frame_hdr_t  h;

  // EEDC decoder
  logic        d_start, d_valid, d_chk, d_done, d_err, d_corr, d_in_data;
  logic [7:0]  d_data;
  logic [8:0]  d_byte;
  logic [2:0]  d_bit;
  logic [3:0]  d_r;
  logic        corrected, uncorrectable;

  eedc_decoder u_dec (
    .clk, .rst_n,
    .start(d_start), .nbytes,
    .in_valid(d_valid), .in_data(d_data),
    .chk_valid(d_chk), .chk_bits(trail[EEDC_RMAX-1:0]),
    .done(d_done), .err(d_err), .correctable(d_corr), .err_in_data(d_in_data),
    .err_byte(d_byte), .err_bit(d_bit), .r_len(d_r)
  );

  assign h = frame_hdr_t'({hdr[0], hdr[1], hdr[2], hdr[3], hdr[4]});
  assign ntrail = trailer_bytes(eedc_r({nbytes, 3'b000}));

  always_ff @(posedge clk) begin
    if (st == F_RX && byte_valid && nrx >= 10'(HDR_BYTES) && nrx < 10'(MAX_DATA))
      pay[8'(nrx - 10'(HDR_BYTES))] <= byte_data;
    if (st == F_FIX && d_in_data && d_byte >= 9'(HDR_BYTES))
      pay[8'(d_byte - 9'(HDR_BYTES))][d_bit] <= ~pay[8'(d_byte - 9'(HDR_BYTES))][d_bit];
    out_data <= pay[oidx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= F_IDLE;
      for (int i = 0; i < HDR_BYTES; i++) hdr[i] <= '0;
      nrx           <= '0;
      nbytes        <= '0;
      trail         <= '0;
      syn_err       <= 1'b0;
      bnd_err       <= 1'b0;
      replay        <= '0;
      oidx          <= '0;
      slot_q        <= '0;
      cycle_q       <= '0;
      d_start       <= 1'b0;
      d_valid       <= 1'b0;
      d_data        <= '0;
      d_chk         <= 1'b0;
      corrected     <= 1'b0;
      uncorrectable <= 1'b0;
      status_valid  <= 1'b0;
      status        <= '0;
      status_hdr    <= '0;
      dropped       <= '0;
      out_start     <= 1'b0;
      out_hdr       <= '0;
      out_msg_id    <= '0;
      out_valid     <= 1'b0;
      out_idx       <= '0;
      out_end       <= 1'b0;
    end else begin
      d_start      <= 1'b0;
      d_valid      <= 1'b0;
      d_chk        <= 1'b0;
      status_valid <= 1'b0;
      out_start    <= 1'b0;
      out_valid    <= 1'b0;
      out_end      <= 1'b0;
      if (frame_start && st != F_IDLE && st != F_SKIP && st != F_RX && enable && !tx_active)
        dropped <= dropped + 16'd1;
      unique case (st)
        F_IDLE, F_SKIP:
          if (st == F_SKIP && (frame_end || dec_error)) st <= F_IDLE;
          else if (frame_start) begin
            if (!enable || tx_active) st <= F_SKIP;
            else begin
              st      <= F_RX;
              nrx     <= '0;
              trail   <= '0;
              syn_err <= 1'b0;
              bnd_err <= 1'b0;
              replay  <= '0;
              nbytes  <= 9'd511;
              slot_q  <= slot_id;
              cycle_q <= cycle;
            end
          end
        F_RX: begin
          if (slot_start) bnd_err <= 1'b1;
          if (byte_valid) begin
            nrx <= nrx + 10'd1;
            if (nrx < 10'(HDR_BYTES)) hdr[nrx[2:0]] <= byte_data;
            if (nrx == 10'd2) begin
              nbytes  <= data_bytes(byte_data[7:1]);
              d_start <= 1'b1;
              replay  <= 2'd3;
            end else if (nrx >= 10'd3 && nrx < {1'b0, nbytes}) begin
              d_valid <= 1'b1;
              d_data  <= byte_data;
            end else if (nrx >= {1'b0, nbytes}) begin
              trail <= {trail[7:0], byte_data};
            end
          end else if (replay != 2'd0 && !d_start) begin
            // give header bytes 0..2 to the decoder
            d_valid <= 1'b1;
            d_data  <= hdr[3'd3 - {1'b0, replay}];
            replay  <= replay - 2'd1;
          end
          if (dec_error) begin
            syn_err <= 1'b1;
            st      <= F_REPORT;
          end else if (frame_end) begin
            if (nrx != {1'b0, nbytes} + {8'd0, ntrail} || nrx < 10'(HDR_BYTES)) begin
              syn_err <= 1'b1;
              st      <= F_REPORT;
            end else begin
              d_chk <= 1'b1;
              st    <= F_CHECK;
            end
          end
        end
        F_CHECK:
          if (d_done) begin
            corrected     <= d_err && d_corr;
            uncorrectable <= d_err && !d_corr;
            st            <= F_FIX;
          end
        F_FIX: begin
          if (corrected && d_in_data && d_byte < 9'(HDR_BYTES))
            hdr[d_byte[2:0]][d_bit] <= ~hdr[d_byte[2:0]][d_bit];
          st <= F_REPORT;
        end
        F_REPORT: begin
          status_valid <= 1'b1;
          status_hdr   <= h;
          status.syntax_error       <= syn_err;
          status.boundary_violation <= bnd_err;
          status.eedc_corrected     <= !syn_err && corrected;
          status.eedc_uncorrectable <= !syn_err && uncorrectable;
          status.content_error      <= !syn_err && !uncorrectable &&
                                       (h.frame_id != slot_q || h.cycle != cycle_q);
          status.valid_frame        <= !syn_err && !uncorrectable && !bnd_err &&
                                       h.frame_id == slot_q && h.cycle == cycle_q;
          if (!syn_err && !uncorrectable && !bnd_err && h.frame_id == slot_q && h.cycle == cycle_q) begin
            st         <= F_OUT;
            out_start  <= 1'b1;
            out_hdr    <= h;
            out_msg_id <= (h.plen != 7'd0) ? {pay[0], pay[1]} : 16'd0;
            oidx       <= '0;
          end else begin
            st <= F_IDLE;
          end
          corrected     <= 1'b0;
          uncorrectable <= 1'b0;
        end
        F_OUT: begin
          // pay[oidx] appears on out_data together with out_valid/out_idx
          if (h.plen == 7'd0) begin
            out_end <= 1'b1;
            st      <= F_IDLE;
          end else begin
            out_valid <= 1'b1;
            out_idx   <= oidx;
            oidx      <= oidx + 8'd1;
            if ({1'b0, oidx} == {h.plen, 1'b0} - 8'd1) begin
              out_end <= 1'b1;
              st      <= F_IDLE;
            end
          end
        end
        default: st <= F_IDLE;
      endcase
    end
  end

  // symbol timing check; the decoder reports a symbol only after its low
  // phase has ended, so a symbol counts as this node's own when the node was
  // transmitting within the last OWN_HOLD clocks
  localparam int unsigned OWN_HOLD = 64;
  logic sym_q, sym_wus_q, sym_ok_q;
  logic [6:0] since_tx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      since_tx     <= 7'(OWN_HOLD);
      sym_q        <= 1'b0;
      sym_wus_q    <= 1'b0;
      sym_ok_q     <= 1'b0;
      symbol_valid <= 1'b0;
      symbol_wus   <= 1'b0;
    end else begin
      if (tx_active)                     since_tx <= '0;
      else if (since_tx != 7'(OWN_HOLD)) since_tx <= since_tx + 7'd1;
      sym_q        <= (sym_cas_mts || sym_wus) && !tx_active && since_tx == 7'(OWN_HOLD);
      sym_wus_q    <= sym_wus;
      sym_ok_q     <= sym_wus ? !enable : (!enable || segment == SEG_SYMBOL);
      symbol_valid <= sym_q && sym_ok_q;
      symbol_wus   <= sym_wus_q;
    end
  end

endmodule
