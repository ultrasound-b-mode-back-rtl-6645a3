// cordic_sqrt: pipelined square root of the I^2 + Q^2 sum.
//
// Returns floor(sqrt(S)) of an IN_W-bit unsigned integer. With S the 2.30 sum of
// squares this is the envelope in unsigned 1.15 (the square root halves the number of
// fraction bits). The processor computes this with a vendor CORDIC core in square-root
// mode, whose insides it does not give; this design uses the equivalent digit-by-digit
// (non-restoring) method: one result bit per pipeline stage, each stage bringing down
// two bits of S into a partial remainder and subtracting the trial value 4*root+1.
//
// Timing: one sample per clock; out_valid/out_root follow in_valid by IN_W/2 clocks
// (16 at the default width).
module cordic_sqrt #(
  parameter int unsigned IN_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [IN_W-1:0]   in_data,
  output logic              out_valid,
  output logic [IN_W/2-1:0] out_root
);

  localparam int unsigned OUT_W = IN_W / 2;
  localparam int unsigned REM_W = OUT_W + 2;

  // Stage s (0..OUT_W) holds the state after s result bits.
  logic [IN_W-1:0]  rad_q  [OUT_W+1];
  logic [REM_W-1:0] rem_q  [OUT_W+1];
  logic [OUT_W-1:0] root_q [OUT_W+1];
  logic             vld_q  [OUT_W+1];

  always_comb begin
    rad_q[0]  = in_data;
    rem_q[0]  = '0;
    root_q[0] = '0;
    vld_q[0]  = in_valid;
  end

  for (genvar s = 0; s < OUT_W; s++) begin : g_stage
    logic [REM_W-1:0] rem_in, trial;
    always_comb begin
      rem_in = {rem_q[s][REM_W-3:0], rad_q[s][IN_W-1 - 2*s -: 2]};
      trial  = {root_q[s], 2'b01};
    end
    always_ff @(posedge clk) begin
      if (!rst_n) vld_q[s+1] <= 1'b0;
      else        vld_q[s+1] <= vld_q[s];
      rad_q[s+1] <= rad_q[s];
      if (rem_in >= trial) begin
        rem_q[s+1]  <= rem_in - trial;
        root_q[s+1] <= {root_q[s][OUT_W-2:0], 1'b1};
      end else begin
        rem_q[s+1]  <= rem_in;
        root_q[s+1] <= {root_q[s][OUT_W-2:0], 1'b0};
      end
    end
  end

  assign out_valid = vld_q[OUT_W];
  assign out_root  = root_q[OUT_W];

endmodule
