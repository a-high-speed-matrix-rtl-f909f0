// row_col_counter: element, row, column and matrix counters.
//
// The element counter `count` walks 0 .. N*N-1, one step per `inc`. It is
// split into `rowcount` (count / N) and `colcount` (count mod N), kept as two
// separate counters so no division is needed: colcount steps every `inc` and
// wraps at N-1, when rowcount steps; after N*N-1 all three return to zero.
// `last` is high while count is N*N-1. The
// matrix counter `matcount` selects which matrix pair in memory is worked on;
// it steps on `mat_inc`. `mat_clr` clears all counters. Everything is synchronous to clk; `rst` is active high.
//
// Following the original description: row, column and matrix counters, and the widths seen in
// its timing simulation (a 4-bit count, 2-bit row and column counts for a 3x3
// matrix). How the counters step and clear is this design's own choice.
module row_col_counter #(
  parameter int unsigned N     = matmul_pkg::MAT_N,
  parameter int unsigned MAT_W = 3,
  localparam int unsigned RC_W  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CNT_W = $clog2(N * N + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             inc,       // step to the next element
  input  logic             mat_clr,   // clear every counter
  input  logic             mat_inc,   // step to the next matrix pair
  output logic [CNT_W-1:0] count,
  output logic [RC_W-1:0]  rowcount,
  output logic [RC_W-1:0]  colcount,
  output logic [MAT_W-1:0] matcount,
  output logic             last
);

  logic col_wrap;
  assign col_wrap = (colcount == RC_W'(N - 1));
  assign last     = (count == CNT_W'(N * N - 1));

  always_ff @(posedge clk) begin
    if (rst || mat_clr) begin
      count    <= '0;
      rowcount <= '0;
      colcount <= '0;
    end else if (inc) begin
      count <= last ? '0 : count + 1'b1;
      if (col_wrap) begin
        colcount <= '0;
        rowcount <= (rowcount == RC_W'(N - 1)) ? '0 : rowcount + 1'b1;
      end else begin
        colcount <= colcount + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || mat_clr) matcount <= '0;
    else if (mat_inc)   matcount <= matcount + 1'b1;
  end

endmodule
