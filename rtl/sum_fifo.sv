// sum_fifo: first-in first-out buffer of partial sums, DEPTH x WIDTH.
//
// A circular buffer with a write and a read pointer and an occupancy counter.
// The oldest entry is always visible on `dout` (first-word fall-through), so
// a reader can use it and `pop` it in the same cycle. `push` and `pop` may be
// high together, also when the FIFO is full: the head leaves and the new
// entry joins the tail in one cycle. This is what the cyclic addition uses:
// a partial sum comes out, has a product added, and goes back in at the end.
// Pushing into a full FIFO without popping, or popping an empty one, is an
// error and is flagged by assertions. Synchronous, active-high reset empties it.
//
// Following the original description: a FIFO that accumulates the multiplier outputs for
// cyclic addition and sits between the adder and the result memory. Its depth
// (one entry per result column) and the fall-through read are this design's
// own choices.
module sum_fifo #(
  parameter int unsigned WIDTH = matmul_pkg::ACC_W,
  parameter int unsigned DEPTH = matmul_pkg::MAT_N,
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CNT_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [CNT_W-1:0] level
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty = (level == '0);
  assign full  = (level == CNT_W'(DEPTH));
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      unique case ({push, pop})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
    end
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (rst) push && !pop |-> !full)
    else $error("sum_fifo: push into a full FIFO");
  a_no_underflow : assert property (@(posedge clk) disable iff (rst) pop |-> !empty)
    else $error("sum_fifo: pop from an empty FIFO");

endmodule
