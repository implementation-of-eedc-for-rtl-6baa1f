// bse_frame_encoder: bitstream encoder (frame encoder) of the protocol engine.
//
// On 'tx_req' it sends the frame held in Tx buffer 'tx_buf'. It first reads
// header byte 2 to learn the payload length (7-bit field, in 16-bit words),
// which gives the number of data bytes nbytes = 5 + 2*length, and starts the
// EEDC encoder. The bitstream is then, one bit per SAMPLES_PER_BIT clocks:
//   TSS   TSS_BITS low bits (transmission start sequence)
//   FSS   one high bit (frame start sequence)
//   per byte: BSS = high, low (byte start sequence), then 8 bits MSB first
//   FES   low, high (frame end sequence)
// Data bytes are read from the buffer during each byte's BSS and passed to
// the EEDC encoder as they are loaded for sending. After the last data byte
// come the trailer bytes: the EEDC redundancy bits r(x), right aligned in one
// byte (r <= 8) or two bytes (r > 8), in place of the three CRC bytes of a
// standard frame. tx_en is high from the first TSS bit to the last FES bit;
// tx is high when idle. 'done' pulses one clock after the last bit. The
// cycle count field of the header (low 6 bits of byte 4) is replaced by the
// 'cycle' input sampled at tx_req, so the frame carries the cycle in which
// it is sent; the rest of the header, including the header CRC, comes from
// the buffer as the host wrote it.
//
// The document gives the frame layout, that the frame encoder prepends the
// TSS and appends the check bits, and that EEDC replaces the CRC. The TSS
// length, the 8 samples per bit, the BSS/FSS/FES patterns (taken from the
// FlexRay coding scheme) and the trailer padding are this design's own.
module bse_frame_encoder
  import flexray_pkg::*;
#(
  parameter int unsigned N_TX_BUF        = 128,
  parameter int unsigned SAMPLES_PER_BIT = 8,
  parameter int unsigned TSS_BITS        = 9,
  localparam int unsigned BW = $clog2(N_TX_BUF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tx_req,
  input  logic [BW-1:0] tx_buf,
  input  logic [5:0]    cycle,
  output logic [BW-1:0] rd_buf,
  output logic [8:0]    rd_addr,
  input  logic [7:0]    rd_data,
  output logic          tx,
  output logic          tx_en,
  output logic          busy,
  output logic          done,
  output logic [3:0]    r_len
);

  typedef enum logic [3:0] {
    P_IDLE, P_HDR_RD, P_HDR_WAIT, P_TSS, P_FSS, P_BSS1, P_BSS0, P_DATA, P_FES0, P_FES1
  } phase_t;

  phase_t     ph;
  logic [$clog2(SAMPLES_PER_BIT)-1:0] smp;
  logic       bit_end;
  logic [4:0] cnt;          // bit counter inside TSS or byte
  logic [8:0] nbytes;
  logic [9:0] byte_idx;     // data bytes first, then trailer bytes
  logic [1:0] ntrail;
  logic [7:0] sh;
  logic       enc_start, enc_valid, enc_done;
  logic [7:0] enc_data;
  logic [EEDC_RMAX-1:0] r_bits;
  logic [15:0] trail;
  logic [5:0]  cyc_q;
  logic [7:0]  cur;         // buffer byte, with the cycle count put in byte 4

  eedc_encoder u_eedc (
    .clk, .rst_n,
    .start(enc_start), .nbytes,
    .in_valid(enc_valid), .in_data(enc_data),
    .done(enc_done), .r_len, .r_bits
  );

  assign bit_end = (smp == ($bits(smp))'(SAMPLES_PER_BIT - 1));
  assign trail   = 16'(r_bits);
  assign ntrail  = trailer_bytes(r_len);
  assign cur      = (byte_idx == 10'd4) ? {rd_data[7:6], cyc_q} : rd_data;
  assign enc_data = cur;

  always_comb begin
    unique case (ph)
      P_TSS, P_BSS0, P_FES0: tx = 1'b0;
      P_DATA:                tx = sh[7];
      default:               tx = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph        <= P_IDLE;
      smp       <= '0;
      cnt       <= '0;
      nbytes    <= '0;
      byte_idx  <= '0;
      sh        <= '0;
      cyc_q     <= '0;
      rd_buf    <= '0;
      rd_addr   <= '0;
      tx_en     <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
      enc_start <= 1'b0;
      enc_valid <= 1'b0;
    end else begin
      done      <= 1'b0;
      enc_start <= 1'b0;
      enc_valid <= 1'b0;
      if (ph != P_IDLE && ph != P_HDR_RD && ph != P_HDR_WAIT)
        smp <= bit_end ? '0 : smp + 1'b1;
      unique case (ph)
        P_IDLE:
          if (tx_req) begin
            rd_buf  <= tx_buf;
            cyc_q   <= cycle;
            rd_addr <= 9'd2;
            busy    <= 1'b1;
            ph      <= P_HDR_RD;
          end
        P_HDR_RD:   ph <= P_HDR_WAIT;
        P_HDR_WAIT: begin
          nbytes    <= data_bytes(rd_data[7:1]);
          enc_start <= 1'b1;
          ph        <= P_TSS;
          smp       <= '0;
          cnt       <= '0;
          byte_idx  <= '0;
          tx_en     <= 1'b1;
        end
        P_TSS:
          if (bit_end) begin
            cnt <= cnt + 5'd1;
            if (cnt == 5'(TSS_BITS - 1)) ph <= P_FSS;
          end
        P_FSS:
          if (bit_end) ph <= P_BSS1;
        P_BSS1: begin
          rd_addr <= byte_idx[8:0];
          if (bit_end) ph <= P_BSS0;
        end
        P_BSS0:
          if (bit_end) begin
            if (byte_idx < {1'b0, nbytes}) begin
              sh        <= cur;
              enc_valid <= 1'b1;
            end else if (byte_idx == {1'b0, nbytes} && ntrail == 2'd2) begin
              sh <= trail[15:8];
            end else begin
              sh <= trail[7:0];
            end
            cnt <= '0;
            ph  <= P_DATA;
          end
        P_DATA:
          if (bit_end) begin
            sh  <= {sh[6:0], 1'b0};
            cnt <= cnt + 5'd1;
            if (cnt == 5'd7) begin
              byte_idx <= byte_idx + 10'd1;
              if (byte_idx + 10'd1 == {1'b0, nbytes} + {8'd0, ntrail}) ph <= P_FES0;
              else                                                     ph <= P_BSS1;
            end
          end
        P_FES0:
          if (bit_end) ph <= P_FES1;
        P_FES1:
          if (bit_end) begin
            ph    <= P_IDLE;
            tx_en <= 1'b0;
            busy  <= 1'b0;
            done  <= 1'b1;
          end
        default: ph <= P_IDLE;
      endcase
    end
  end

  // The trailer is only sent once the EEDC encoder has finished.
  trailer_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (ph == P_BSS0 && bit_end && byte_idx >= {1'b0, nbytes}) |-> enc_done);

endmodule
