// eedc_decoder: checks a received EEDC codeword and locates a single error.
//
// The data bytes are divided by the same degree-r primitive polynomial as in
// the encoder (r from the data length). When the received redundancy bits
// arrive on 'chk_valid', the syndrome S = recomputed r(x) XOR received r(x)
// is formed. S = 0 means no error. Otherwise a single wrong bit at codeword
// position j (j = 0 is the last redundancy bit) gives S = x^j mod p(x); the
// locator steps v = x^j through j = 0 .. D+r-1, one position per clock, until
// v equals S. 'done' pulses once with the result: err (S non-zero),
// correctable (position found), err_in_data and the byte/bit of the wrong
// data bit (byte 0 is the first data byte, bit 7 its first transmitted bit).
// A non-zero syndrome that matches no position is uncorrectable.
//
// The document gives only that the code detects and corrects errors; the
// syndrome and the serial search are this design's own. Worst-case latency
// after chk_valid is D+r+1 clocks (2085 for the largest frame).
module eedc_decoder
  import flexray_pkg::*;
#(
  parameter int unsigned RMAX = EEDC_RMAX
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [8:0]      nbytes,
  input  logic            in_valid,
  input  logic [7:0]      in_data,
  input  logic            chk_valid,
  input  logic [RMAX-1:0] chk_bits,
  output logic            done,
  output logic            err,
  output logic            correctable,
  output logic            err_in_data,
  output logic [8:0]      err_byte,
  output logic [2:0]      err_bit,
  output logic [3:0]      r_len
);

  typedef enum logic [1:0] {S_IDLE, S_DATA, S_SEARCH} dstate_t;
  dstate_t         st;
  logic [RMAX-1:0] rem, syn, v;
  logic [11:0]     pos, total;
  logic [8:0]      nb;
  logic [11:0]     k;

  function automatic logic [RMAX-1:0] step_byte(input logic [RMAX-1:0] r0,
                                                input logic [7:0] b,
                                                input logic [3:0] rl);
    logic [RMAX-1:0] acc;
    acc = r0;
    for (int i = 7; i >= 0; i--) acc = eedc_step(acc, b[i], rl);
    return acc;
  endfunction

  // Data-bit offset from the end of the data for the current position.
  assign k = pos - {8'd0, r_len};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      rem         <= '0;
      syn         <= '0;
      v           <= '0;
      pos         <= '0;
      total       <= '0;
      nb          <= '0;
      r_len       <= '0;
      done        <= 1'b0;
      err         <= 1'b0;
      correctable <= 1'b0;
      err_in_data <= 1'b0;
      err_byte    <= '0;
      err_bit     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        st    <= S_DATA;
        rem   <= '0;
        nb    <= nbytes;
        r_len <= eedc_r({nbytes, 3'b000});
        total <= {nbytes, 3'b000} + 12'(eedc_r({nbytes, 3'b000}));
      end else begin
        case (st)
          S_DATA: begin
            if (in_valid) rem <= step_byte(rem, in_data, r_len);
            if (chk_valid) begin
              syn         <= rem ^ (chk_bits & ((RMAX'(1) << r_len) - RMAX'(1)));
              v           <= RMAX'(1);
              pos         <= '0;
              err_in_data <= 1'b0;
              correctable <= 1'b0;
              err_byte    <= '0;
              err_bit     <= '0;
              if ((rem ^ (chk_bits & ((RMAX'(1) << r_len) - RMAX'(1)))) == '0) begin
                err  <= 1'b0;
                done <= 1'b1;
                st   <= S_IDLE;
              end else begin
                err <= 1'b1;
                st  <= S_SEARCH;
              end
            end
          end
          S_SEARCH: begin
            if (v == syn) begin
              correctable <= 1'b1;
              err_in_data <= (pos >= {8'd0, r_len});
              err_byte    <= nb - 9'd1 - k[11:3];
              err_bit     <= k[2:0];
              done        <= 1'b1;
              st          <= S_IDLE;
            end else if (pos == total - 12'd1) begin
              done <= 1'b1;
              st   <= S_IDLE;
            end else begin
              v   <= eedc_mulx(v, r_len);
              pos <= pos + 12'd1;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
