// pixel_mem: one pixel memory, DEPTH words of WIDTH bits (64 x 8 by default).
//
// The array is written on the rising clock edge while the active-low write
// enable we_n is low, at the word given by addr. Reading is through an output
// register: when rd_enable is high, the word at addr is copied into rd_data on
// the rising edge, so data appears one cycle after its address; while
// rd_enable is low rd_data holds its last value. The output register is
// cleared by the synchronous, active-high reset; the array itself is not
// reset. A write and a read of the same word in one cycle return the old word.
//
// Following the original description: 64 words addressed by addr(5:0), 8-bit pixel data, a
// write enable that is active at low level, a read-enable signal (rd_enable)
// and the registered data outputs with clock enable of the parallel memory
// view. The read-before-write order and the reset of the output register are
// this design's own choices.
module pixel_mem #(
  parameter int unsigned WIDTH  = matmul_pkg::DATA_W,
  parameter int unsigned ADDR_W = matmul_pkg::ADDR_W,
  parameter int unsigned DEPTH  = 2 ** ADDR_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we_n,       // write enable, active low
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wr_data,
  input  logic              rd_enable,  // load the output register
  output logic [WIDTH-1:0]  rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!we_n) mem[addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst)            rd_data <= '0;
    else if (rd_enable) rd_data <= mem[addr];
  end

endmodule
