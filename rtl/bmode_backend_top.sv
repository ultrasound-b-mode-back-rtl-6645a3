// bmode_backend_top: ultrasound B-mode back end signal processor.
//
// Turns one frame of beamformed RF scan lines into an 8-bit log-compressed B-mode
// image (before scan conversion). The datapath is the processor's: input memory ->
// envelope detector (Hilbert FIR, squares, square root) -> envelope data out memory ->
// log compression -> output memory, with a controller FSM running the two passes.
// The frame defaults to 104 scan lines of 565 samples (58760 samples, 16-bit 1.15).
//
// Interface (this design's choice, the processor preloads the input memory from a
// file and hands the output memory to a display unit):
//   load_we/load_addr/load_data  write RF samples into the input memory (address =
//                                line*SAMPLES + sample); do so while busy is low
//   start                        begin a frame; busy stays high until done pulses
//   disp_addr -> disp_data       read grey levels from the output memory, one clock
//                                of latency, same address order as the input
// Timing: one sample per clock in both passes; a default frame takes
// 104*598 + 58760 clocks plus about 50 clocks of pipeline latency.
module bmode_backend_top
  import bmode_pkg::*;
#(
  parameter int unsigned SAMPLES = FRAME_SAMPLES,
  parameter int unsigned LINES   = FRAME_LINES,
  parameter int unsigned DR_DB   = 60,
  parameter int unsigned TOTAL   = SAMPLES * LINES,
  parameter int unsigned ADDR_W  = $clog2(TOTAL)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  sample_t           load_data,
  input  logic [ADDR_W-1:0] disp_addr,
  output pix_t              disp_data
);

  ctrl_state_t       state;
  logic              in_rd_en, env_rd_en;
  logic [ADDR_W-1:0] in_rd_addr, env_rd_addr, env_waddr, out_waddr;
  logic              det_valid, det_first, det_zero, det_out_valid;
  logic              env_we, lc_valid, lc_out_valid, out_we;
  sample_t           in_q, det_in;
  env_t              det_env, env_q;
  pix_t              lc_pix;

  bmode_controller #(
    .SAMPLES (SAMPLES),
    .LINES   (LINES),
    .HALF    (FIR_HALF),
    .TOTAL   (TOTAL),
    .ADDR_W  (ADDR_W)
  ) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .state,
    .in_rd_en, .in_rd_addr,
    .det_valid, .det_first, .det_zero,
    .det_out_valid,
    .env_we, .env_waddr,
    .env_rd_en, .env_rd_addr,
    .lc_valid, .lc_out_valid,
    .out_we, .out_waddr
  );

  // Input memory: RF frame, 16 bit x TOTAL.
  sdp_ram #(.WIDTH(SAMPLE_W), .DEPTH(TOTAL), .ADDR_W(ADDR_W)) u_in_mem (
    .clk,
    .we      (load_we && !busy),
    .wr_addr (load_addr),
    .wr_data (load_data),
    .rd_en   (in_rd_en),
    .rd_addr (in_rd_addr),
    .rd_data (in_q)
  );

  assign det_in = det_zero ? '0 : in_q;

  envelope_detector u_env (
    .clk, .rst_n,
    .in_valid  (det_valid),
    .in_first  (det_first),
    .in_data   (det_in),
    .out_valid (det_out_valid),
    .out_env   (det_env)
  );

  // Envelope data out memory, 16 bit x TOTAL.
  sdp_ram #(.WIDTH(ENV_W), .DEPTH(TOTAL), .ADDR_W(ADDR_W)) u_env_mem (
    .clk,
    .we      (env_we),
    .wr_addr (env_waddr),
    .wr_data (det_env),
    .rd_en   (env_rd_en),
    .rd_addr (env_rd_addr),
    .rd_data (env_q)
  );

  log_compress #(.DR_DB(DR_DB)) u_log (
    .clk, .rst_n,
    .in_valid  (lc_valid),
    .in_env    (env_q),
    .out_valid (lc_out_valid),
    .out_pix   (lc_pix)
  );

  // Output memory, 8 bit x TOTAL, read by the display side.
  sdp_ram #(.WIDTH(PIX_W), .DEPTH(TOTAL), .ADDR_W(ADDR_W)) u_out_mem (
    .clk,
    .we      (out_we),
    .wr_addr (out_waddr),
    .wr_data (lc_pix),
    .rd_en   (1'b1),
    .rd_addr (disp_addr),
    .rd_data (disp_data)
  );

endmodule
