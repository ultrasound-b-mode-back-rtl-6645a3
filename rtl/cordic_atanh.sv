// cordic_atanh: hyperbolic CORDIC in vectoring mode, z = atanh(y / x).
//
// Used by log compression to evaluate ln(m) = 2*atanh((m-1)/(m+1)). Each stage turns
// the vector (x, y) towards the x axis by a hyperbolic angle atanh(2^-i):
//   d = (y < 0) ? +1 : -1
//   x <= x + d*(y >>> i);  y <= y + d*(x >>> i);  z <= z - d*atanh(2^-i)
// so that z gathers atanh(y0/x0) as y goes to zero. Iterations i = 1..ITER are used,
// with i = 4 and i = 13 done twice, as hyperbolic CORDIC needs to converge. The
// iteration converges for |y/x| < 0.8 (the caller keeps |y/x| <= 1/3).
// Number formats follow the processor's CORDIC configuration: x and y are two's
// complement with 2 integer bits (incl. sign) and 16 fraction bits, the angle has
// 3 integer bits and 16 fraction bits. The processor uses a vendor core; the unrolled
// pipeline below, its guard bits and the rounded angle table are this design's own.
// ATANH_TAB[i-1] = round(atanh(2^-i) * 2^20): the pipeline carries 4 fraction bits
// more than its ports, and the angle is rounded back to 16 fraction bits at the end.
//
// Timing: one vector per clock; out_valid/out_z follow in_valid by ITER + 2 clocks
// (18 at the default) when ITER >= 13.
module cordic_atanh #(
  parameter int unsigned ITER = 16            // 1..16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [17:0] in_x,            // 2.16
  input  logic signed [17:0] in_y,            // 2.16
  output logic               out_valid,
  output logic signed [18:0] out_z            // 3.16
);

  localparam int unsigned FRAC = 16;
  localparam int unsigned G    = 4;           // extra fraction bits inside the pipeline
  localparam int unsigned DW   = FRAC + G + 4; // 2 integer bits + 2 guard bits
  localparam int unsigned ZW   = FRAC + G + 3;

  typedef int unsigned tab_t [16];
  localparam tab_t ATANH_TAB = '{
    575989, 267820, 131761, 65622, 32779, 16385, 8192, 4096,
    2048,   1024,   512,    256,   128,   64,    32,   16
  };

  // Stage count and the shift used in each stage (4 and 13 repeated).
  function automatic int unsigned n_stages(int unsigned iter);
    n_stages = iter + ((iter >= 4) ? 1 : 0) + ((iter >= 13) ? 1 : 0);
  endfunction

  function automatic int unsigned shift_of(int unsigned stage);
    int unsigned i, s;
    bit          rep;
    i = 1; s = 0; rep = 1'b0;
    while (s < stage) begin
      if ((i == 4 || i == 13) && !rep) rep = 1'b1;
      else begin i++; rep = 1'b0; end
      s++;
    end
    shift_of = i;
  endfunction

  localparam int unsigned NS = n_stages(ITER);

  logic signed [DW-1:0] x_q [NS+1];
  logic signed [DW-1:0] y_q [NS+1];
  logic signed [ZW-1:0] z_q [NS+1];
  logic                 v_q [NS+1];

  always_comb begin
    x_q[0] = DW'(in_x) <<< G;
    y_q[0] = DW'(in_y) <<< G;
    z_q[0] = '0;
    v_q[0] = in_valid;
  end

  for (genvar s = 0; s < NS; s++) begin : g_stage
    localparam int unsigned SH = shift_of(s);
    localparam logic signed [ZW-1:0] ANG = ZW'(ATANH_TAB[SH-1]);
    logic signed [DW-1:0] xs, ys;
    assign xs = x_q[s] >>> SH;
    assign ys = y_q[s] >>> SH;
    always_ff @(posedge clk) begin
      if (!rst_n) v_q[s+1] <= 1'b0;
      else        v_q[s+1] <= v_q[s];
      if (y_q[s] < 0) begin
        x_q[s+1] <= x_q[s] + ys;
        y_q[s+1] <= y_q[s] + xs;
        z_q[s+1] <= z_q[s] - ANG;
      end else begin
        x_q[s+1] <= x_q[s] - ys;
        y_q[s+1] <= y_q[s] - xs;
        z_q[s+1] <= z_q[s] + ANG;
      end
    end
  end

  assign out_valid = v_q[NS];
  logic signed [ZW-1:0] z_rnd;
  assign z_rnd     = z_q[NS] + ZW'(1 << (G - 1));
  assign out_z     = 19'(z_rnd >>> G);

endmodule
