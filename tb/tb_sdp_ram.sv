// tb_sdp_ram: self-checking test of the simple dual-port RAM.
// Fills a small RAM with random words, reads every address back and checks the data
// arrives exactly one clock after the read, that rd_data holds while rd_en is low,
// that a read of the word being written returns the old word, and that writes to
// addresses past DEPTH are ignored.
module tb_sdp_ram;
  localparam int W = 12, D = 37, AW = 6;
  logic clk = 0, we = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0]  wr_data = '0, rd_data;
  logic [W-1:0]  model [D];
  int checks = 0, failures = 0;

  sdp_ram #(.WIDTH(W), .DEPTH(D), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // write every word
    for (int a = 0; a < D; a++) begin
      model[a] = W'($urandom);
      @(negedge clk); we = 1; wr_addr = AW'(a); wr_data = model[a];
    end
    @(negedge clk); we = 0;
    // write past the end: must not alias onto a stored word
    @(negedge clk); we = 1; wr_addr = AW'(D + 3); wr_data = ~model[3];
    @(negedge clk); we = 0;
    // read back, one clock latency
    for (int a = 0; a < D; a++) begin
      @(negedge clk); rd_en = 1; rd_addr = AW'(a);
      @(posedge clk); #1;
      check(rd_data, model[a], $sformatf("read addr %0d", a));
    end
    // hold while rd_en is low
    @(negedge clk); rd_en = 0; rd_addr = 0;
    repeat (3) @(posedge clk);
    #1 check(rd_data, model[D-1], "hold with rd_en low");
    // read during write of the same address: old data
    @(negedge clk); rd_en = 1; rd_addr = 5; we = 1; wr_addr = 5; wr_data = ~model[5];
    @(posedge clk); #1 check(rd_data, model[5], "read-before-write");
    model[5] = ~model[5];
    @(negedge clk); we = 0;
    @(posedge clk); #1 check(rd_data, model[5], "new data after write");
    // random mixed traffic
    for (int n = 0; n < 500; n++) begin
      int ra, wa;
      @(negedge clk);
      ra = $urandom_range(D-1); wa = $urandom_range(D-1);
      rd_en = 1; rd_addr = AW'(ra);
      we = ($urandom_range(1) == 1) && (wa != ra); wr_addr = AW'(wa); wr_data = W'($urandom);
      @(posedge clk); #1;
      check(rd_data, model[ra], "random read");
      if (we) model[wa] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
