// processing_element: one row of the result, computed in isolation.
//
// A processing element (PE) holds a shift-and-add multiplier, the
// accumulating adder and a FIFO of partial sums, one entry per result column.
// For row i it is given, one at a time, A[i][k] on `a` and B[k][j] on `b`,
// with k as the outer and j as the inner loop. For each pair the controller
//   1. pulses `start`; the multiplier raises `stop` W+2 cycles later;
//   2. pulses `acc_en`: the adder adds the product to the partial sum of
//      column j at the FIFO head (or to zero when `first`, i.e. k = 0), the
//      head is popped and the new sum pushed to the tail.
// The FIFO thus cycles through the N columns once per k, and after the last k
// it holds Y[i][0] .. Y[i][N-1] in order on `result`; `drain` pops them one
// per cycle. PEs exchange no data with each other.
//
// Following the original description: the PE as a multiplier with an adder that works on its
// own, and the FIFO that accumulates multiplier outputs for cyclic addition,
// with the FIFO output looping back. The loop order and the control pulses
// are this design's own choices.
module processing_element #(
  parameter int unsigned W     = matmul_pkg::DATA_W,
  parameter int unsigned N     = matmul_pkg::MAT_N,
  parameter int unsigned ACC_W = matmul_pkg::ACC_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [W-1:0]    a,
  input  logic signed [W-1:0]    b,
  input  logic                   start,   // begin a multiplication
  input  logic                   acc_en,  // add the product, cycle the FIFO
  input  logic                   first,   // first product of each column
  input  logic                   drain,   // pop one finished result
  output logic                   stop,    // product ready
  output logic                   busy,
  output logic signed [ACC_W-1:0] result, // FIFO head
  output logic                   empty,
  output logic                   full
);

  logic signed [2*W-1:0]  product;
  logic signed [ACC_W-1:0] sum;
  logic                   pop;

  shift_add_mult #(.W(W)) u_mult (
    .clk    (clk),
    .rst    (rst),
    .start  (start),
    .a      (a),
    .b      (b),
    .product(product),
    .stop   (stop),
    .busy   (busy)
  );

  pe_adder #(.PROD_W(2 * W), .ACC_W(ACC_W)) u_adder (
    .first  (first),
    .product(product),
    .partial(result),
    .sum    (sum)
  );

  assign pop = (acc_en && !first) || drain;

  sum_fifo #(.WIDTH(ACC_W), .DEPTH(N)) u_fifo (
    .clk  (clk),
    .rst  (rst),
    .push (acc_en),
    .din  (sum),
    .pop  (pop),
    .dout (result),
    .empty(empty),
    .full (full),
    .level()
  );

endmodule
