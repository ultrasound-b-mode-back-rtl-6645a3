// hilbert_fir: 67-tap Hilbert transform FIR filter with I and Q outputs.
//
// The filter turns a real RF scan line into its analytic pair. Q is the Hilbert
// transform y[n] = sum_m h[m] x[n-33-m]; I is the input delayed by the filter's group
// delay (33 samples), i.e. the centre tap, so that I and Q line up. The length (67),
// the Hamming window, the 1.15 input format and the 2.30 product format follow the
// processor's specification. The rest is this design's choice: because the Hilbert
// response is odd (h[-m] = -h[m]) and zero at even m, the filter is folded into 17
// pre-subtractions d[33+m] - d[33-m] (m odd) and 17 multipliers. The 2.30 sum is
// shifted right by 15 and saturated to 1.15 (the worst-case gain of the taps is about
// 2.55, so saturation can happen on full-scale square-wave input).
//
// Interface: a sample is taken on each clock with in_valid high. in_first marks the
// first sample of a scan line and clears the rest of the delay line, so every line is
// filtered on its own, as if preceded by zeros.
// Timing: fully pipelined, one sample per clock. out_valid/out_i/out_q are high 4
// clocks after the cycle in which in_valid was high (delay line, pre-subtract,
// multiply and sum registers).
module hilbert_fir
  import bmode_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_first,
  input  sample_t in_data,
  output logic    out_valid,
  output sample_t out_i,
  output sample_t out_q
);

  localparam int unsigned DIFF_W = SAMPLE_W + 1;        // 17-bit pre-subtraction
  localparam int unsigned PROD_W = DIFF_W + 16;         // 33-bit product
  localparam int unsigned ACC_W  = PROD_W + 5;          // 17 products

  sample_t                    taps   [N_TAPS];          // taps[k] = x[n-k]
  logic signed [DIFF_W-1:0]   diff_q [N_COEF];
  logic signed [PROD_W-1:0]   prod_q [N_COEF];
  sample_t                    i_s1, i_s2;
  logic                       v1, v2, v3;
  logic signed [ACC_W-1:0]    acc;
  logic signed [ACC_W-16:0]   q_shift;

  // Delay line.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(N_TAPS); k++) taps[k] <= '0;
    end else if (in_valid) begin
      taps[0] <= in_data;
      for (int k = 1; k < int'(N_TAPS); k++)
        taps[k] <= in_first ? '0 : taps[k-1];
    end
  end

  // Stage 1: fold the odd-symmetric taps. Stage 2: multiply.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(N_COEF); k++) begin
      diff_q[k] <= DIFF_W'(taps[FIR_HALF + 2*k + 1]) - DIFF_W'(taps[FIR_HALF - 2*k - 1]);
      prod_q[k] <= diff_q[k] * PROD_W'(HILB_COEF[k]);
    end
    i_s1 <= taps[FIR_HALF];
    i_s2 <= i_s1;
  end

  // Stage 3: sum, shift 2.30 -> 1.15, saturate.
  always_comb begin
    acc = '0;
    for (int k = 0; k < int'(N_COEF); k++)
      acc += ACC_W'(prod_q[k]);
    q_shift = acc[ACC_W-1:15];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= v3;
      out_i     <= i_s2;
      if (q_shift > (ACC_W-15)'(32767))
        out_q <= 16'sh7fff;
      else if (q_shift < -(ACC_W-15)'(32768))
        out_q <= -16'sh8000;
      else
        out_q <= sample_t'(q_shift);
    end
  end

endmodule
