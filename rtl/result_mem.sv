// result_mem: distributed memory for the result matrix, DEPTH x WIDTH.
//
// One write port, used by the control unit to store finished result elements
// (wr_en active high, written on the rising edge), and one independent read
// port for the host: with rd_enable high, the word at rd_addr is loaded into
// rd_data on the rising edge, one cycle of latency. rd_data is cleared by the
// synchronous, active-high reset; the array is not. Element Y[i][j] of matrix
// pair m is stored at word m*N*N + i*N + j.
//
// Following the original description: a memory that receives the added results from the FIFO
// ("store in distributed memory"). Its width, the separate read port and the
// layout are this design's own choices.
module result_mem #(
  parameter int unsigned WIDTH  = matmul_pkg::ACC_W,
  parameter int unsigned ADDR_W = matmul_pkg::ADDR_W,
  parameter int unsigned DEPTH  = 2 ** ADDR_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WIDTH-1:0]  wr_data,
  input  logic              rd_enable,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WIDTH-1:0]  rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst)            rd_data <= '0;
    else if (rd_enable) rd_data <= mem[rd_addr];
  end

endmodule
