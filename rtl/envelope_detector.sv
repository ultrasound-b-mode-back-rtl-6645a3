// envelope_detector: envelope of one RF scan line stream.
//
// Computes env = sqrt(I^2 + Q^2), the magnitude of the analytic signal, where Q is
// the Hilbert transform of the RF input and I the input delayed to match. The chain
// follows the processor's envelope detection architecture: Hilbert FIR with I and Q
// outputs, Q brought back to 1.15 by an arithmetic right shift, squares summed by
// multipliers and an adder, square root. Samples are 1.15 signed in and the envelope
// is unsigned 1.15 out (values up to sqrt(2) are possible).
//
// Interface: in_valid/in_first/in_data as for hilbert_fir (in_first starts a new scan
// line). Timing: one sample per clock; out_valid/out_env follow a sample by
// 4 + 2 + 16 = 22 clocks. The output stream keeps the filter's group delay:
// the envelope of RF sample k appears with the 34th sample after it is fed (k + 33).
module envelope_detector
  import bmode_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_first,
  input  sample_t in_data,
  output logic    out_valid,
  output env_t    out_env
);

  logic        fir_valid, sq_valid;
  sample_t     fir_i, fir_q;
  logic [31:0] sq_sum;

  hilbert_fir u_fir (
    .clk, .rst_n,
    .in_valid, .in_first, .in_data,
    .out_valid (fir_valid),
    .out_i     (fir_i),
    .out_q     (fir_q)
  );

  iq_mag_sq u_sq (
    .clk, .rst_n,
    .in_valid  (fir_valid),
    .in_i      (fir_i),
    .in_q      (fir_q),
    .out_valid (sq_valid),
    .out_sum   (sq_sum)
  );

  cordic_sqrt #(.IN_W(32)) u_sqrt (
    .clk, .rst_n,
    .in_valid  (sq_valid),
    .in_data   (sq_sum),
    .out_valid (out_valid),
    .out_root  (out_env)
  );

endmodule
