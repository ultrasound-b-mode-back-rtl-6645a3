// tb_log_compress: self-checking test of the log compression unit.
// Envelope values (unsigned 1.15) over the whole 16-bit range, including 0, 1, every
// power of two and 1.0, are compressed; each grey level must equal
//   clamp(round(255 + (255*20/60) * log10(m / 32768)), 0, 255)   (0 for m = 0)
// within one grey level, and arrive 22 cycles after its input. Both clamps (black
// below -60 dB, white above 0 dB) must be reached.
module tb_log_compress;
  import bmode_pkg::*;
  localparam int LAT = 22;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  env_t in_env = '0;
  pix_t out_pix;
  int checks = 0, failures = 0, n_black = 0, n_white = 0;
  longint cycle = 0;
  int     exp_p [$];
  longint exp_t [$];

  log_compress #(.DR_DB(60)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int grey(int m);
    real g;
    if (m == 0) return 0;
    g = 255.0 + (255.0 * 20.0 / 60.0) * $log10(real'(m) / 32768.0);
    if (g < 0.0) return 0;
    if (g > 255.0) return 255;
    return int'($floor(g + 0.5));
  endfunction

  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid) begin
      int ep;
      longint et;
      checks++;
      if (exp_p.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        ep = exp_p.pop_front(); et = exp_t.pop_front();
        if (out_pix == 0) n_black++;
        if (out_pix == 255) n_white++;
        if ((int'(out_pix) - ep > 1) || (ep - int'(out_pix) > 1) || cycle != et) begin
          failures++;
          $display("FAIL t=%0d pix=%0d expected %0d at t=%0d", cycle, out_pix, ep, et);
        end
      end
    end
  end

  task automatic send(int m);
    in_valid = 1; in_env = env_t'(m);
    exp_p.push_back(grey(m));
    exp_t.push_back(cycle + LAT);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    send(0); send(1); send(32768); send(46341); send(65535);
    for (int b = 0; b < 16; b++) begin send(1 << b); send((1 << b) + 1); end
    for (int m = 0; m < 65536; m += 37) send(m);
    for (int n = 0; n < 2000; n++) begin
      if ($urandom_range(4) == 0) @(negedge clk);
      send(int'($urandom_range(65535)) >> $urandom_range(15));
    end
    repeat (30) @(negedge clk);
    checks++;
    if (exp_p.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    checks++;
    if (n_black == 0 || n_white == 0) begin failures++; $display("FAIL clamps not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
