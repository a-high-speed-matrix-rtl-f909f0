// pe_adder: the accumulating adder of a processing element.
//
// It adds one signed product to the running partial sum of a result element:
// sum = partial + product, where `partial` is the value that comes back out
// of the element's FIFO. For the first product of a result element (`first`
// high) there is no partial sum yet and the product passes through alone.
// The product is sign-extended to the accumulator width, which has enough
// guard bits for N products, so the sum cannot overflow. Purely
// combinational; the FIFO that follows registers the result.
//
// Following the original description: an adder that sums the multiplier outputs. The
// `first` input and the widths are this design's own choices.
module pe_adder #(
  parameter int unsigned PROD_W = matmul_pkg::PROD_W,
  parameter int unsigned ACC_W  = matmul_pkg::ACC_W
) (
  input  logic                     first,    // no partial sum: start anew
  input  logic signed [PROD_W-1:0] product,
  input  logic signed [ACC_W-1:0]  partial,
  output logic signed [ACC_W-1:0]  sum
);

  logic signed [ACC_W-1:0] addend;

  always_comb begin
    addend = first ? '0 : partial;
    sum    = addend + ACC_W'(product);
  end

endmodule
