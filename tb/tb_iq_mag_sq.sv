// tb_iq_mag_sq: self-checking test of the sum of squares I^2 + Q^2.
// Random and corner-case 1.15 pairs (including -1.0, which gives the largest sum,
// 2.0) are fed back to back and with gaps; each result is compared with the sum
// computed in 64-bit arithmetic and must appear 2 cycles after its input.
module tb_iq_mag_sq;
  import bmode_pkg::*;
  localparam int LAT = 2;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t in_i = '0, in_q = '0;
  logic [31:0] out_sum;
  int checks = 0, failures = 0;
  longint cycle = 0;
  longint exp_v [$], exp_t [$];

  iq_mag_sq dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid) begin
      longint ev, et;
      checks++;
      if (exp_v.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        ev = exp_v.pop_front(); et = exp_t.pop_front();
        if (longint'(out_sum) != ev || cycle != et) begin
          failures++;
          $display("FAIL t=%0d sum=%0d expected %0d at t=%0d", cycle, out_sum, ev, et);
        end
      end
    end
  end

  task automatic send(int i, int q);
    in_valid = 1; in_i = sample_t'(i); in_q = sample_t'(q);
    exp_v.push_back(longint'(i) * i + longint'(q) * q);
    exp_t.push_back(cycle + LAT);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    send(-32768, -32768);
    send(32767, -32768);
    send(0, 0);
    send(1, -1);
    send(-32768, 0);
    for (int n = 0; n < 2000; n++) begin
      if ($urandom_range(4) == 0) @(negedge clk);
      send(int'($signed(16'($urandom))), int'($signed(16'($urandom))));
    end
    repeat (5) @(negedge clk);
    checks++;
    if (exp_v.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
