// tb_bmode_backend_top: end-to-end test of the B-mode back end at its full size.
// A synthetic phantom frame of 104 scan lines x 565 samples (speckle, an anechoic
// cyst, a point target, depth attenuation) is loaded through the load port, the frame
// is processed, and the output memory is read back through the display port.
// Checked against the reference model: every envelope sample exactly, every grey
// level within one level, and the frame length in clocks (one sample per clock in
// both passes). The mechanisms of the design are counted and each must occur:
// per-line filter restart, zero flush of each line, dropped group-delay outputs, the
// two wait states, black and white clamping, and a load and a start that arrive
// while busy and must be ignored.
module tb_bmode_backend_top;
  import bmode_pkg::*;
  import bmode_ref_pkg::*;
  localparam int S = FRAME_SAMPLES, L = FRAME_LINES, T = S * L, H = FIR_HALF;
  localparam int AW = $clog2(T);
  localparam int DR = 60;

  logic clk = 0, rst_n = 0, start = 0, busy, done, load_we = 0;
  logic [AW-1:0] load_addr = '0, disp_addr = '0;
  sample_t load_data = '0;
  pix_t disp_data;
  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_line_start = 0, n_flush = 0, n_dropped = 0, n_env_wait = 0, n_log_wait = 0;
  int n_black = 0, n_white = 0, n_busy_load = 0, n_busy_start = 0, n_done = 0;

  bmode_backend_top dut (
    .clk, .rst_n, .start, .busy, .done,
    .load_we, .load_addr, .load_data,
    .disp_addr, .disp_data
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // mechanism counters, from the controller's visible behaviour
  always @(posedge clk) if (rst_n) begin
    if (dut.det_valid && dut.det_first) n_line_start++;
    if (dut.det_valid && dut.det_zero)  n_flush++;
    if (dut.det_out_valid && !dut.env_we) n_dropped++;
    if (dut.state == ST_ENV_WAIT) n_env_wait++;
    if (dut.state == ST_LOG_WAIT) n_log_wait++;
    if (done) n_done++;
  end

  int rf [][];
  int env_ref [][];
  int nsat_total = 0;

  initial begin
    longint t0, t1;
    phantom(S, L, rf);
    env_ref = new[L];
    for (int l = 0; l < L; l++) begin
      int ns;
      envelope_line(rf[l], env_ref[l], ns);
      nsat_total += ns;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // load the frame
    for (int l = 0; l < L; l++)
      for (int n = 0; n < S; n++) begin
        @(negedge clk);
        load_we = 1; load_addr = AW'(l * S + n); load_data = sample_t'(rf[l][n]);
      end
    @(negedge clk); load_we = 0;

    // run; try to overwrite sample 0 and to restart while busy
    start = 1; t0 = cycle;
    @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    load_we = 1; load_addr = '0; load_data = ~sample_t'(rf[0][0]); n_busy_load++;
    @(negedge clk); load_we = 0;
    start = 1; n_busy_start++;
    @(negedge clk); start = 0;
    wait (done);
    t1 = cycle;
    repeat (3) @(negedge clk);

    check(int'($signed(dut.u_in_mem.mem[0])) == rf[0][0], "load while busy was not ignored");
    check(n_done == 1, $sformatf("done pulsed %0d times", n_done));
    // frame length: L*(S+H) + T clocks of streaming plus the pipeline latencies
    check(t1 - t0 >= L * (S + H) + T + 44 && t1 - t0 <= L * (S + H) + T + 52,
          $sformatf("frame took %0d cycles", t1 - t0));
    $display("frame: %0d cycles for %0d samples", t1 - t0, T);

    // envelope memory, exact
    for (int l = 0; l < L; l++)
      for (int n = 0; n < S; n++)
        check(int'(dut.u_env_mem.mem[l * S + n]) == env_ref[l][n],
              $sformatf("env line %0d sample %0d: %0d exp %0d", l, n,
                        dut.u_env_mem.mem[l * S + n], env_ref[l][n]));

    // grey levels through the display port
    for (int l = 0; l < L; l++)
      for (int n = 0; n < S; n++) begin
        int g;
        @(negedge clk); disp_addr = AW'(l * S + n);
        @(posedge clk); #1;
        g = grey(env_ref[l][n], DR);
        if (disp_data == 0) n_black++;
        if (disp_data == 255) n_white++;
        check(int'(disp_data) - g <= 1 && g - int'(disp_data) <= 1,
              $sformatf("pixel line %0d sample %0d: %0d exp %0d", l, n, disp_data, g));
      end

    $display("mechanisms: line starts %0d, flush samples %0d, dropped outputs %0d, ENV_WAIT cycles %0d, LOG_WAIT cycles %0d, black %0d, white %0d, load while busy %0d, start while busy %0d, Q saturations %0d",
             n_line_start, n_flush, n_dropped, n_env_wait, n_log_wait, n_black, n_white,
             n_busy_load, n_busy_start, nsat_total);
    check(n_line_start == L, "filter restart per line");
    check(n_flush == L * H, "zero flush per line");
    check(n_dropped == L * H, "group-delay outputs dropped");
    check(n_env_wait > 0, "ENV_WAIT never entered");
    check(n_log_wait > 0, "LOG_WAIT never entered");
    check(n_black > 0, "black clamp never reached");
    check(n_white > 0, "white clamp never reached");
    check(n_busy_load > 0 && n_busy_start > 0, "busy guards never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
