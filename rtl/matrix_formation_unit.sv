// matrix_formation_unit: the matrix arrangement of processing elements.
//
// N processing elements side by side, one per row of the result. They share
// the control pulses (`start`, `acc_en`, `first`) and the B operand, which is
// broadcast, while each PE gets its own A operand a[i] from its own memory
// bank. All PEs therefore run in lock step and produce a whole column of
// products per multiplication. `stop` is high when every PE has its product.
// For the write-back, `drain_row` names the PE whose FIFO head is shown on
// `result` and popped by `drain`.
//
// Following the original description: a matrix arrangement of multiplier units sized to the
// matrix, and PEs without intercommunication. The row-per-PE split, the
// broadcast B and the drain selection are this design's own choices.
module matrix_formation_unit #(
  parameter int unsigned W     = matmul_pkg::DATA_W,
  parameter int unsigned N     = matmul_pkg::MAT_N,
  parameter int unsigned ACC_W = matmul_pkg::ACC_W,
  localparam int unsigned RC_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic        [W-1:0]     a [N],   // A[i][k] for each row i
  input  logic        [W-1:0]     b,       // B[k][j], shared
  input  logic                    start,
  input  logic                    acc_en,
  input  logic                    first,
  input  logic                    drain,
  input  logic [RC_W-1:0]         drain_row,
  output logic                    stop,
  output logic                    busy,
  output logic signed [ACC_W-1:0] result,
  output logic                    empty    // FIFO of drain_row is empty
);

  logic [N-1:0]            pe_stop, pe_busy, pe_empty;
  logic signed [ACC_W-1:0] pe_result [N];

  for (genvar i = 0; i < N; i++) begin : g_pe
    processing_element #(.W(W), .N(N), .ACC_W(ACC_W)) u_pe (
      .clk   (clk),
      .rst   (rst),
      .a     (a[i]),
      .b     (b),
      .start (start),
      .acc_en(acc_en),
      .first (first),
      .drain (drain && (drain_row == RC_W'(i))),
      .stop  (pe_stop[i]),
      .busy  (pe_busy[i]),
      .result(pe_result[i]),
      .empty (pe_empty[i]),
      .full  ()
    );
  end

  assign stop   = &pe_stop;
  assign busy   = |pe_busy;
  assign result = pe_result[drain_row];
  assign empty  = pe_empty[drain_row];

endmodule
