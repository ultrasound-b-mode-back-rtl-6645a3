// sdp_ram: simple dual-port block RAM.
//
// One synchronous write port and one synchronous read port with a registered output,
// the behaviour of an FPGA block RAM. The B-mode processor uses three of these: the
// input memory holding one RF frame (16 bit x 58760), the envelope data out memory
// (16 bit x 58760) and the output memory of 8-bit grey levels (8 bit x 58760). The
// frame size is the processor's; the port arrangement and one-cycle read latency are
// this design's choice.
//
// Timing: rd_data holds mem[rd_addr] one clock after rd_en. It keeps its value while
// rd_en is low. A read of the address being written returns the old word.
module sdp_ram #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned DEPTH  = 58760,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WIDTH-1:0]  wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WIDTH-1:0]  rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (wr_addr < ADDR_W'(DEPTH)))
      mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      rd_data <= (rd_addr < ADDR_W'(DEPTH)) ? mem[rd_addr] : '0;
  end

endmodule
