// tb_bmode_controller: self-checking test of the controller FSM.
// The controller (7 samples x 3 lines, 3-sample group delay) drives models of the
// memories and of the two processing units; the units are modelled as pure delays
// (the envelope detector passes its input through after 22 cycles, log compression
// after 22), so the memories must end up holding a shifted copy of the input:
//   env[l*S + i] = (i + H < S) ? in[l*S + i + H] : 0,   out[a] = env[a][7:0].
// Also checked: line-start and zero-flush flags, the state order, that start is
// ignored while busy, one done pulse per frame, and the frame length in cycles.
module tb_bmode_controller;
  import bmode_pkg::*;
  localparam int S = 7, L = 3, H = 3, T = S * L, AW = 5, DL = 22, LL = 22;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  ctrl_state_t state;
  logic in_rd_en, det_valid, det_first, det_zero, det_out_valid, env_we, env_rd_en;
  logic lc_valid, lc_out_valid, out_we;
  logic [AW-1:0] in_rd_addr, env_waddr, env_rd_addr, out_waddr;
  int checks = 0, failures = 0;
  int n_first = 0, n_zero = 0, n_done = 0;
  longint cycle = 0;

  bmode_controller #(.SAMPLES(S), .LINES(L), .HALF(H), .TOTAL(T), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // memory and unit models
  int in_mem [T], env_mem [T], out_mem [T];
  int in_q, env_q;
  logic det_v [DL], lc_v [LL];
  int   det_d [DL], lc_d [LL];
  always_ff @(posedge clk) begin
    if (in_rd_en)  in_q  <= in_mem[in_rd_addr];
    if (env_rd_en) env_q <= env_mem[env_rd_addr];
    if (env_we)    env_mem[env_waddr] <= det_d[DL-1];
    if (out_we)    out_mem[out_waddr] <= lc_d[LL-1] & 255;
    det_v[0] <= rst_n && det_valid; det_d[0] <= det_zero ? 0 : in_q;
    lc_v[0]  <= rst_n && lc_valid;  lc_d[0]  <= env_q;
    for (int k = 1; k < DL; k++) begin det_v[k] <= det_v[k-1]; det_d[k] <= det_d[k-1]; end
    for (int k = 1; k < LL; k++) begin lc_v[k]  <= lc_v[k-1];  lc_d[k]  <= lc_d[k-1];  end
  end
  assign det_out_valid = det_v[DL-1];
  assign lc_out_valid  = lc_v[LL-1];

  always @(posedge clk) if (rst_n) begin
    if (det_valid && det_first) n_first++;
    if (det_valid && det_zero)  n_zero++;
    if (done) n_done++;
  end

  // state order
  ctrl_state_t prev;
  always @(posedge clk) begin
    prev <= state;
    if (rst_n && prev != state) begin
      checks++;
      if (!((prev == ST_IDLE && state == ST_ENV_RUN) || (prev == ST_ENV_RUN && state == ST_ENV_WAIT) ||
            (prev == ST_ENV_WAIT && state == ST_LOG_RUN) || (prev == ST_LOG_RUN && state == ST_LOG_WAIT) ||
            (prev == ST_LOG_WAIT && state == ST_DONE) || (prev == ST_DONE && state == ST_IDLE))) begin
        failures++; $display("FAIL state %s -> %s", prev.name(), state.name());
      end
    end
  end

  task automatic run_frame(int seed);
    longint t0, t1;
    foreach (in_mem[a]) in_mem[a] = (a * 37 + seed) % 1000 + 1;
    foreach (env_mem[a]) env_mem[a] = -1;
    n_first = 0; n_zero = 0; n_done = 0;
    @(negedge clk); start = 1; t0 = cycle;
    @(negedge clk); start = 0;
    check(busy, "busy after start");
    repeat (10) @(negedge clk);
    start = 1;                    // ignored while busy
    @(negedge clk); start = 0;
    wait (done);
    t1 = cycle;
    repeat (2) @(negedge clk);
    check(!busy, "idle after done");
    for (int l = 0; l < L; l++)
      for (int i = 0; i < S; i++) begin
        int e = (i + H < S) ? in_mem[l * S + i + H] : 0;
        check(env_mem[l * S + i] == e, $sformatf("env[%0d][%0d]=%0d exp %0d", l, i, env_mem[l*S+i], e));
        check(out_mem[l * S + i] == (e & 255), $sformatf("out[%0d][%0d]", l, i));
      end
    check(n_first == L, $sformatf("line starts %0d", n_first));
    check(n_zero == L * H, $sformatf("flush samples %0d", n_zero));
    check(n_done == 1, "one done pulse");
    // frame length: both passes plus the two unit latencies and the memory reads
    check(t1 - t0 >= L * (S + H) + T + DL + LL && t1 - t0 <= L * (S + H) + T + DL + LL + 6,
          $sformatf("frame took %0d cycles", t1 - t0));
    repeat (5) @(negedge clk);
    check(!busy && n_done == 1, "stays idle");
  endtask

  initial begin
    foreach (det_v[k]) det_v[k] = 0;
    foreach (lc_v[k]) lc_v[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(5);
    run_frame(11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
