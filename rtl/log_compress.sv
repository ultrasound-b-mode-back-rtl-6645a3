// log_compress: dynamic range (logarithmic) compression of the envelope to grey levels.
//
// Strong reflectors would make a linearly scaled B-mode image dark, so the envelope m
// is mapped through a logarithm before it is cut to 8 bits. As in the processor's log
// compression unit, the natural log comes from a hyperbolic CORDIC,
//   ln(m) = 2 * atanh((m - 1) / (m + 1)),
// the doubling is a left shift, and log10(m) = ln(m) * log10(e) is one multiplication.
// The CORDIC is fed x = m + 1 and y = m - 1, so no divider is needed.
// This design's own choices:
//  * m is first normalised, m = f * 2^e with f in [0.5, 1) from a leading-zero count,
//    so that the CORDIC always works inside its convergence range, and
//    ln(m) = 2*atanh((f-1)/(f+1)) + e*ln(2).
//  * The grey level is g = clamp(255 + (255*20/DR_DB) * log10(m), 0, 255), rounded,
//    i.e. 0 dB (m = 1.0) is white and DR_DB below it is black; m = 0 gives 0.
//
// Interface: in_env is unsigned 1.15 (the envelope), out_pix an 8-bit grey level.
// Timing: one sample per clock; out_valid/out_pix follow in_valid by LATENCY = 22
// clocks (normalise 1, CORDIC 18, ln 1, log10 1, grey 1).
module log_compress
  import bmode_pkg::*;
#(
  parameter int unsigned DR_DB = 60           // displayed dynamic range in dB
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  env_t in_env,
  output logic out_valid,
  output pix_t out_pix
);

  localparam int unsigned CORDIC_LAT = 18;
  localparam longint      LN2_FX     = 45426;     // round(ln(2)    * 2^16)
  localparam longint      LOG10E_FX  = 28462;     // round(log10(e) * 2^16)
  localparam longint      GAIN_FX    = (longint'(255 * 20) * 65536 + longint'(DR_DB) / 2) / longint'(DR_DB);
  localparam longint      WHITE_FX   = longint'(255) << 32;   // 255 in Q.32

  // ---- stage 1: normalise -------------------------------------------------------
  logic [4:0]  lz;
  logic        v1, zero1;
  logic [15:0] f1;
  logic [4:0]  k1;

  always_comb begin
    lz = 5'd16;
    for (int b = 0; b < 16; b++)
      if (in_env[b]) lz = 5'(15 - b);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    zero1 <= (in_env == '0);
    f1    <= in_env << lz[3:0];
    k1    <= lz;
  end

  // ---- CORDIC: z = atanh((f-1)/(f+1)) -------------------------------------------
  logic               vc;
  logic signed [18:0] zc;
  logic signed [17:0] cx, cy;

  assign cx = 18'sd65536 + $signed({2'b00, f1});   // f + 1 in 2.16
  assign cy = $signed({2'b00, f1}) - 18'sd65536;   // f - 1 in 2.16

  cordic_atanh #(.ITER(16)) u_cordic (
    .clk, .rst_n,
    .in_valid  (v1),
    .in_x      (cx),
    .in_y      (cy),
    .out_valid (vc),
    .out_z     (zc)
  );

  // Exponent and zero flag travel alongside the CORDIC.
  logic [4:0] k_d    [CORDIC_LAT];
  logic       zero_d [CORDIC_LAT];
  always_ff @(posedge clk) begin
    k_d[0]    <= k1;
    zero_d[0] <= zero1;
    for (int s = 1; s < int'(CORDIC_LAT); s++) begin
      k_d[s]    <= k_d[s-1];
      zero_d[s] <= zero_d[s-1];
    end
  end

  // ---- stage 2: ln(m) = 2z + (1-k)*ln2, Q.16 --------------------------------------
  logic               v2, zero2;
  logic signed [23:0] ln2_q;
  logic signed [5:0]  e_c;
  always_comb e_c = 6'sd1 - $signed({1'b0, k_d[CORDIC_LAT-1]});

  always_ff @(posedge clk) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= vc;
    zero2 <= zero_d[CORDIC_LAT-1];
    ln2_q <= (24'(zc) <<< 1) + 24'(e_c) * 24'(LN2_FX);
  end

  // ---- stage 3: log10(m) = ln(m) * log10(e) ---------------------------------------
  logic               v3, zero3;
  logic signed [39:0] lg_prod;
  logic signed [23:0] log10_q;
  always_comb lg_prod = 40'(ln2_q) * 40'(LOG10E_FX);

  always_ff @(posedge clk) begin
    if (!rst_n) v3 <= 1'b0;
    else        v3 <= v2;
    zero3   <= zero2;
    log10_q <= 24'(lg_prod >>> 16);
  end

  // ---- stage 4: grey level ---------------------------------------------------------
  logic signed [47:0] g_fx;
  logic signed [31:0] g_int;
  always_comb begin
    // log10 (Q.16) times gain (Q.16) is Q.32; round to an integer grey level.
    g_fx  = 48'(WHITE_FX) + 48'(log10_q) * 48'(GAIN_FX) + (48'sd1 <<< 31);
    g_int = 32'(g_fx >>> 32);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= v3;
      if (zero3 || g_int < 0) out_pix <= '0;
      else if (g_int > 255)   out_pix <= 8'd255;
      else                    out_pix <= pix_t'(g_int);
    end
  end

endmodule
