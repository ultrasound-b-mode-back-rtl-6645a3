// tb_hilbert_fir: self-checking test of the 67-tap Hilbert FIR.
// The reference computes the filter directly from its definition: coefficients from
// h[m] = 2/(pi*m) * Hamming(m) rounded to 1.15, the full 67-tap convolution with a
// history cleared at each line start, the 2.30 sum shifted right by 15 and saturated.
// Checks I, Q and a fixed 3-clock latency for random lines with gaps in in_valid, a
// sine burst, and a full-scale step that drives Q into saturation.
module tb_hilbert_fir;
  import bmode_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0;
  sample_t in_data = '0, out_i, out_q;
  logic out_valid;
  int checks = 0, failures = 0, sat_seen = 0;
  longint cycle = 0;

  int    coef [-33:33];
  int    hist [67];
  int    exp_i [$], exp_q [$];
  longint exp_t [$];

  hilbert_fir dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // Reference: push one sample, compute I and Q.
  task automatic model_push(int x, bit first);
    longint acc = 0;
    for (int k = 66; k > 0; k--) hist[k] = first ? 0 : hist[k-1];
    hist[0] = x;
    for (int j = 0; j < 67; j++) acc += longint'(coef[j-33]) * hist[j];
    exp_i.push_back(hist[33]);
    exp_q.push_back(sat16(acc >>> 15));
    exp_t.push_back(cycle + 4);   // latency 4 cycles
    if ((acc >>> 15) > 32767 || (acc >>> 15) < -32768) sat_seen++;
  endtask

  task automatic send(int x, bit first);
    @(negedge clk);
    in_valid = 1; in_first = first; in_data = sample_t'(x);
    model_push(x, first);
    @(negedge clk);
    in_valid = 0; in_first = 0;
  endtask

  // Send without the idle cycle in between (back to back).
  task automatic send_b2b(int x, bit first);
    in_valid = 1; in_first = first; in_data = sample_t'(x);
    model_push(x, first);
    @(negedge clk);
    in_valid = 0; in_first = 0;
  endtask

  // Output checker.
  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        int ei, eq;
        longint et;
        ei = exp_i.pop_front(); eq = exp_q.pop_front(); et = exp_t.pop_front();
        if (int'(out_i) != ei || int'(out_q) != eq || cycle != et) begin
          failures++;
          $display("FAIL t=%0d: I=%0d Q=%0d (exp %0d %0d at t=%0d)", cycle, out_i, out_q, ei, eq, et);
        end
      end
    end
  end

  initial begin
    for (int m = -33; m <= 33; m++) begin
      real w;
      w = 0.54 - 0.46 * $cos(2.0 * 3.14159265358979 * (m + 33) / 66.0);
      coef[m] = (m % 2 == 0) ? 0 : int'($floor(2.0 / (3.14159265358979 * m) * w * 32768.0 + 0.5));
    end
    foreach (hist[k]) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // random lines with random gaps
    for (int l = 0; l < 4; l++)
      for (int n = 0; n < 150; n++) begin
        int x;
        x = int'($signed(16'($urandom)));
        if ($urandom_range(3) == 0) @(negedge clk);
        send_b2b(x, n == 0);
      end
    // sine burst, 2.5 MHz at 40 MHz sampling
    for (int n = 0; n < 200; n++)
      send_b2b(int'($floor(20000.0 * $sin(2.0 * 3.14159265358979 * n / 16.0) + 0.5)), n == 0);
    // full-scale step: Q saturates
    for (int n = 0; n < 100; n++) send(n < 50 ? 32767 : -32768, n == 0);
    for (int n = 0; n < 100; n++) send(n < 50 ? -32768 : 32767, n == 0);
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
