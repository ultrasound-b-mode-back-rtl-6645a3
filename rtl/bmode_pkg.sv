// bmode_pkg: constants shared by the B-mode back end signal processor.
//
// Frame geometry (565 samples per scan line, 104 scan lines, 58760 samples) and the
// 16-bit 1.15 sample format follow the processor's specification. The Hilbert filter
// has 67 taps with a Hamming window. Its coefficients are
//   h[m] = 2/(pi*m) * (0.54 - 0.46*cos(2*pi*(m+33)/66))   for odd m, -33 <= m <= 33
//   h[m] = 0                                              for even m
// rounded to 1.15. Because h[-m] = -h[m], only the 17 values for m = 1, 3, ..., 33
// are stored (HILB_COEF[k] is h[2k+1]). The rounding to 1.15 is this design's choice.
package bmode_pkg;

  localparam int unsigned SAMPLE_W  = 16;      // 1.15 signed RF and I/Q samples
  localparam int unsigned ENV_W     = 16;      // unsigned 1.15 envelope
  localparam int unsigned PIX_W     = 8;       // grey level
  localparam int unsigned N_TAPS    = 67;      // Hilbert filter length
  localparam int unsigned FIR_HALF  = (N_TAPS - 1) / 2;   // group delay, 33
  localparam int unsigned N_COEF    = (FIR_HALF + 1) / 2;     // non-zero coefficients per side, 17
  localparam int unsigned FRAME_SAMPLES = 565;    // samples per scan line
  localparam int unsigned FRAME_LINES   = 104;    // scan lines per frame (-35 to +35 degrees)

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic        [ENV_W-1:0]    env_t;
  typedef logic        [PIX_W-1:0]    pix_t;

  typedef logic signed [15:0] coef_arr_t [N_COEF];

  localparam coef_arr_t HILB_COEF = '{
    16'sd20817, 16'sd6824, 16'sd3959, 16'sd2687, 16'sd1950, 16'sd1460,
    16'sd1108,  16'sd842,  16'sd636,  16'sd474,  16'sd347,  16'sd248,
    16'sd173,   16'sd118,  16'sd81,   16'sd59,   16'sd51
  };

  // Controller states.
  typedef enum logic [2:0] {
    ST_IDLE     = 3'd0,
    ST_ENV_RUN  = 3'd1,   // reading the input memory into the envelope detector
    ST_ENV_WAIT = 3'd2,   // waiting for the last envelope sample to be written
    ST_LOG_RUN  = 3'd3,   // reading the envelope memory into log compression
    ST_LOG_WAIT = 3'd4,   // waiting for the last grey level to be written
    ST_DONE     = 3'd5
  } ctrl_state_t;

endpackage
