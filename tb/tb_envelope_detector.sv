// tb_envelope_detector: self-checking test of the envelope detector.
// Random scan lines, phantom-like lines and a saturating full-scale step line are
// fed, each followed by 33 zero samples and started with in_first, with random gaps.
// Output j >= 33 of a line must equal the reference envelope of sample j-33 exactly;
// every output must arrive 22 cycles after its input.
module tb_envelope_detector;
  import bmode_pkg::*;
  import bmode_ref_pkg::*;
  localparam int LAT = 22;
  localparam int LEN = 120;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, out_valid;
  sample_t in_data = '0;
  env_t out_env;
  int checks = 0, failures = 0, total_sat = 0;
  longint cycle = 0;
  int     exp_e [$];      // -1: output not compared (group delay)
  longint exp_t [$];

  envelope_detector dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid) begin
      int ee;
      longint et;
      checks++;
      if (exp_e.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        ee = exp_e.pop_front(); et = exp_t.pop_front();
        if ((ee >= 0 && int'(out_env) != ee) || cycle != et) begin
          failures++;
          $display("FAIL t=%0d env=%0d expected %0d at t=%0d", cycle, out_env, ee, et);
        end
      end
    end
  end

  task automatic send_line(int x []);
    int env [];
    int ns;
    envelope_line(x, env, ns);
    total_sat += ns;
    for (int j = 0; j < x.size() + 33; j++) begin
      if ($urandom_range(5) == 0) @(negedge clk);
      in_valid = 1; in_first = (j == 0);
      in_data  = (j < x.size()) ? sample_t'(x[j]) : '0;
      exp_e.push_back(j >= 33 ? env[j - 33] : -1);
      exp_t.push_back(cycle + LAT);
      @(negedge clk);
      in_valid = 0; in_first = 0;
    end
  endtask

  initial begin
    int x [];
    int rf [][];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    x = new[LEN];
    for (int l = 0; l < 3; l++) begin
      foreach (x[j]) x[j] = int'($signed(16'($urandom)));
      send_line(x);
    end
    phantom(LEN, 4, rf);
    for (int l = 0; l < 4; l++) send_line(rf[l]);
    foreach (x[j]) x[j] = (j < LEN / 2) ? 32767 : -32768;
    send_line(x);
    repeat (30) @(negedge clk);
    checks++;
    if (exp_e.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    checks++;
    if (total_sat == 0) begin failures++; $display("FAIL Q saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
