// tb_cordic_atanh: self-checking test of the hyperbolic CORDIC.
// Vectors with x in [1, 2) and |y/x| up to 0.6 (the log compressor uses at most 1/3)
// are fed back to back and with gaps. The angle must match atanh(y/x), computed in
// floating point, within 2 LSB of 2^-16, and arrive 18 cycles after its input.
module tb_cordic_atanh;
  localparam int LAT = 18;
  localparam int TOL = 2;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [17:0] in_x = '0, in_y = '0;
  logic signed [18:0] out_z;
  int checks = 0, failures = 0;
  longint cycle = 0;
  real    exp_z [$];
  longint exp_t [$];

  cordic_atanh #(.ITER(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real atanh_r(real r);
    return 0.5 * $ln((1.0 + r) / (1.0 - r));
  endfunction

  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid) begin
      real ez;
      longint et;
      checks++;
      if (exp_z.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        ez = exp_z.pop_front(); et = exp_t.pop_front();
        if (real'(out_z) - ez * 65536.0 > TOL || ez * 65536.0 - real'(out_z) > TOL || cycle != et) begin
          failures++;
          $display("FAIL t=%0d z=%0d expected %f at t=%0d", cycle, out_z, ez * 65536.0, et);
        end
      end
    end
  end

  task automatic send(int x, int y);
    in_valid = 1; in_x = 18'(x); in_y = 18'(y);
    exp_z.push_back(atanh_r(real'(y) / real'(x)));
    exp_t.push_back(cycle + LAT);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int x, y;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    send(65536, 0);
    send(131071, -43690);
    send(98304, -32768);
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(4) == 0) @(negedge clk);
      x = 65536 + int'($urandom_range(65535));
      y = int'($urandom_range(x * 6 / 10)) * (($urandom_range(1) == 1) ? 1 : -1);
      send(x, y);
    end
    repeat (25) @(negedge clk);
    checks++;
    if (exp_z.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
