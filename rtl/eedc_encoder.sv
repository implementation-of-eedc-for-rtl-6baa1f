// eedc_encoder: generates the EEDC trailer of a FlexRay frame.
//
// On 'start' the redundancy-bit identifier picks r, the smallest value with
// D + r + 1 <= 2^r for D = 8*nbytes data bits (header and payload). The
// r generator then divides D(x)*x^r by a primitive polynomial of degree r,
// one data byte per 'in_valid' cycle (eight LFSR steps per byte, MSB first).
// When the last byte has been taken, 'done' rises on the next clock and
// r_bits holds r(x), right aligned, until the next 'start'. The codeword
// D(x)*x^r + r(x) is sent with r(x) appended after the data.
//
// What follows the document: the count of r by the Hamming-style bound, the
// codeword D(x)*x^r + r(x) and appending r at the end of the data. This
// design's own choices: the primitive polynomials, byte-serial processing and
// the handshake. 'start' and 'in_valid' must not be asserted together.
module eedc_encoder
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
  output logic            done,
  output logic [3:0]      r_len,
  output logic [RMAX-1:0] r_bits
);

  logic [RMAX-1:0] rem;
  logic [8:0]      left;
  logic            busy;

  function automatic logic [RMAX-1:0] step_byte(input logic [RMAX-1:0] r0,
                                                input logic [7:0] b,
                                                input logic [3:0] rl);
    logic [RMAX-1:0] acc;
    acc = r0;
    for (int i = 7; i >= 0; i--) acc = eedc_step(acc, b[i], rl);
    return acc;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem   <= '0;
      left  <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      r_len <= 4'd0;
    end else if (start) begin
      rem   <= '0;
      left  <= nbytes;
      busy  <= (nbytes != 9'd0);
      done  <= (nbytes == 9'd0);
      r_len <= eedc_r({nbytes, 3'b000});
    end else if (busy && in_valid) begin
      rem  <= step_byte(rem, in_data, r_len);
      left <= left - 9'd1;
      if (left == 9'd1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assign r_bits = rem;

endmodule
