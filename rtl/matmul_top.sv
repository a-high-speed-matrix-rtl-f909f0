// matmul_top: matrix multiplier Y = A x B for N x N matrices of 8-bit
// signed elements, built from shift-and-add multipliers.
//
// Structure (input memories -> multipliers -> adders -> FIFOs -> result
// memory, with counters and a control unit beside them):
//   u_amem   parallel_mem_unit, one 64 x 8 bank per row of A
//   u_bmem   pixel_mem, 64 x 8, matrix B in row-major order
//   u_cnt    row_col_counter: element, row, column and matrix counters
//   u_ctrl   control_unit: the state machine that sequences everything
//   u_mfu    matrix_formation_unit: N processing elements, one per row of Y
//   u_res    result_mem: Y in row-major order, ACC_W bits per element
//
// Host interface. While `busy` is low the host loads matrices through the
// load port: ld_we_n low writes ld_data at ld_addr into matrix A (ld_target
// 0, bank ld_row) or B (ld_target 1). Matrix pair m uses A words m*N .. m*N+N-1
// of each bank (A[i][k] at word m*N+k of bank i), B words m*N*N + k*N + j and
// result words m*N*N + i*N + j. `start` (held for one cycle while idle)
// multiplies pairs 0 .. mat_last; `stop` pulses one cycle when the results
// are in the result memory, which the host reads through rd_enable/rd_addr
// with one cycle of latency, at any time. Writes on the load port are ignored
// while busy. With the defaults (N = 3, 64 words) up to 7 pairs fit.
// count, rowcount, colcount and matcount show the counters for observation.
//
// Timing: a run of P pairs takes P*N*N*(W+5) + 2 cycles from the cycle in
// which `start` is sampled to the cycle in which `stop` is high (P*117 + 2
// with the defaults). The first result is written N*N*(W+4) + 2 cycles after
// start. Reset is synchronous and active high.
//
// Following the original description: the block structure, the 8-bit operands and 16-bit
// products, the shift-and-add multiplier with Start/Stop, the 64-word memories
// with addr(5:0) and an active-low write enable, the counters and the 3x3
// size. The host ports, the memory layout, the accumulator width and the
// schedule are this design's own.
module matmul_top #(
  parameter int unsigned N      = matmul_pkg::MAT_N,
  parameter int unsigned W      = matmul_pkg::DATA_W,
  parameter int unsigned ADDR_W = matmul_pkg::ADDR_W,
  parameter int unsigned ACC_W  = 2 * W + $clog2(N),
  parameter int unsigned MAT_W  = 3,
  localparam int unsigned RC_W  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CNT_W = $clog2(N * N + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [MAT_W-1:0]  mat_last,
  output logic              busy,
  output logic              stop,
  // load port
  input  logic              ld_we_n,
  input  logic              ld_target,  // 0: A, 1: B
  input  logic [RC_W-1:0]   ld_row,
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [W-1:0]      ld_data,
  // result read port
  input  logic              rd_enable,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [ACC_W-1:0]  rd_data,
  // counters, for observation
  output logic [CNT_W-1:0]  count,
  output logic [RC_W-1:0]   rowcount,
  output logic [RC_W-1:0]   colcount,
  output logic [MAT_W-1:0]  matcount
);

  logic              cnt_inc, mat_clr, mat_inc, last;
  logic              mem_rd;
  logic [ADDR_W-1:0] a_addr, b_addr, res_addr;
  logic              mul_start, mul_stop, mul_busy;
  logic              acc_en, first, drain, res_we;
  logic [RC_W-1:0]   drain_row;
  logic              drain_empty;
  logic [ACC_W-1:0]  result;

  logic              a_we_n, b_we_n;
  logic [ADDR_W-1:0] a_mem_addr, b_mem_addr;
  logic [W-1:0]      a_col [N];
  logic [W-1:0]      b_elem;

  // The load port owns the input memories while idle, the controller while busy.
  assign a_we_n     = ld_we_n || busy || (ld_target != matmul_pkg::LD_A);
  assign b_we_n     = ld_we_n || busy || (ld_target != matmul_pkg::LD_B);
  assign a_mem_addr = busy ? a_addr : ld_addr;
  assign b_mem_addr = busy ? b_addr : ld_addr;

  parallel_mem_unit #(.NBANK(N), .WIDTH(W), .ADDR_W(ADDR_W)) u_amem (
    .clk      (clk),
    .rst      (rst),
    .we_n     (a_we_n),
    .wr_bank  (ld_row),
    .addr     (a_mem_addr),
    .wr_data  (ld_data),
    .rd_enable(mem_rd),
    .rd_data  (a_col)
  );

  pixel_mem #(.WIDTH(W), .ADDR_W(ADDR_W)) u_bmem (
    .clk      (clk),
    .rst      (rst),
    .we_n     (b_we_n),
    .addr     (b_mem_addr),
    .wr_data  (ld_data),
    .rd_enable(mem_rd),
    .rd_data  (b_elem)
  );

  row_col_counter #(.N(N), .MAT_W(MAT_W)) u_cnt (
    .clk     (clk),
    .rst     (rst),
    .inc     (cnt_inc),
    .mat_clr (mat_clr),
    .mat_inc (mat_inc),
    .count   (count),
    .rowcount(rowcount),
    .colcount(colcount),
    .matcount(matcount),
    .last    (last)
  );

  control_unit #(.N(N), .ADDR_W(ADDR_W), .MAT_W(MAT_W)) u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .start    (start),
    .mat_last (mat_last),
    .busy     (busy),
    .stop     (stop),
    .cnt_inc  (cnt_inc),
    .mat_clr  (mat_clr),
    .mat_inc  (mat_inc),
    .count    (count),
    .rowcount (rowcount),
    .matcount (matcount),
    .last     (last),
    .mem_rd   (mem_rd),
    .a_addr   (a_addr),
    .b_addr   (b_addr),
    .mul_start(mul_start),
    .mul_stop (mul_stop),
    .acc_en   (acc_en),
    .first    (first),
    .drain    (drain),
    .drain_row(drain_row),
    .res_we   (res_we),
    .res_addr (res_addr)
  );

  matrix_formation_unit #(.W(W), .N(N), .ACC_W(ACC_W)) u_mfu (
    .clk      (clk),
    .rst      (rst),
    .a        (a_col),
    .b        (b_elem),
    .start    (mul_start),
    .acc_en   (acc_en),
    .first    (first),
    .drain    (drain),
    .drain_row(drain_row),
    .stop     (mul_stop),
    .busy     (mul_busy),
    .result   (result),
    .empty    (drain_empty)
  );

  result_mem #(.WIDTH(ACC_W), .ADDR_W(ADDR_W)) u_res (
    .clk      (clk),
    .rst      (rst),
    .wr_en    (res_we),
    .wr_addr  (res_addr),
    .wr_data  (result),
    .rd_enable(rd_enable),
    .rd_addr  (rd_addr),
    .rd_data  (rd_data)
  );

  a_drain_has_data : assert property (@(posedge clk) disable iff (rst) drain |-> !drain_empty)
    else $error("matmul_top: result written from an empty FIFO");
  a_mult_idle_at_start : assert property (@(posedge clk) disable iff (rst) mul_start |-> !mul_busy)
    else $error("matmul_top: multiplier started while busy");

endmodule
