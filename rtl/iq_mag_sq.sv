// iq_mag_sq: sum of squares of the in-phase and quadrature samples.
//
// Computes I^2 + Q^2 with two multipliers and an adder, the step before the square
// root of the envelope detector. I and Q are signed 1.15; each square is a 2.30
// number in [0, 1] and the sum, at most 2.0, is returned as an unsigned 32-bit 2.30
// value. The multiplier-and-adder structure follows the processor's specification;
// the register placement is this design's choice.
//
// Timing: one sample per clock; out_valid/out_sum follow in_valid by 2 clocks
// (square register, sum register).
module iq_mag_sq
  import bmode_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  sample_t     in_i,
  input  sample_t     in_q,
  output logic        out_valid,
  output logic [31:0] out_sum
);

  logic signed [31:0] sq_i, sq_q;
  logic               v1;

  always_ff @(posedge clk) begin
    sq_i <= in_i * in_i;
    sq_q <= in_q * in_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      out_sum   <= '0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      out_sum   <= unsigned'(sq_i) + unsigned'(sq_q);
    end
  end

endmodule
