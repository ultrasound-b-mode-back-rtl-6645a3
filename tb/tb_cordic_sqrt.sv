// tb_cordic_sqrt: self-checking test of the pipelined square root.
// Feeds corner values (0, 1, perfect squares and their neighbours, 2^31, all ones)
// and random 32-bit values, back to back and with gaps. Each result r must satisfy
// r*r <= S < (r+1)*(r+1) and appear 16 cycles after its input.
module tb_cordic_sqrt;
  localparam int LAT = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] in_data = '0;
  logic [15:0] out_root;
  int checks = 0, failures = 0;
  longint cycle = 0;
  longint exp_s [$], exp_t [$];

  cordic_sqrt #(.IN_W(32)) dut (.*);

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
      longint s, et, r;
      checks++;
      if (exp_s.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        s = exp_s.pop_front(); et = exp_t.pop_front(); r = longint'(out_root);
        if (!(r * r <= s && s < (r + 1) * (r + 1)) || cycle != et) begin
          failures++;
          $display("FAIL t=%0d sqrt(%0d)=%0d (due t=%0d)", cycle, s, r, et);
        end
      end
    end
  end

  task automatic send(longint s);
    in_valid = 1; in_data = 32'(s);
    exp_s.push_back(s & 64'hffff_ffff);
    exp_t.push_back(cycle + LAT);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    send(0); send(1); send(2); send(3); send(4);
    send(64'h8000_0000); send(64'hffff_ffff);
    for (int k = 1; k < 65536; k += 997) begin
      send(longint'(k) * k - 1); send(longint'(k) * k); send(longint'(k) * k + 1);
    end
    for (int n = 0; n < 2000; n++) begin
      if ($urandom_range(4) == 0) @(negedge clk);
      send(longint'($urandom));
    end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_s.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
