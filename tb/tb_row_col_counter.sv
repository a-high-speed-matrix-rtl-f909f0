// tb_row_col_counter: self-checking test of the element, row, column and
// matrix counters for a 3x3 matrix.
//
// Steps the counters through several matrices with random idle cycles and
// compares count, rowcount, colcount, last and matcount with a reference
// count, and checks that mat_clr clears them all.
module tb_row_col_counter;
  localparam int N = 3, MAT_W = 3;

  logic clk = 1'b0, rst = 1'b1;
  logic inc = 1'b0, mat_clr = 1'b0, mat_inc = 1'b0;
  logic [3:0] count;
  logic [1:0] rowcount, colcount;
  logic [MAT_W-1:0] matcount;
  logic last;
  int checks = 0, failures = 0;
  int ref_count = 0, ref_mat = 0;

  always #5 clk = ~clk;

  row_col_counter #(.N(N), .MAT_W(MAT_W)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (count != 4'(ref_count) || rowcount != 2'(ref_count / N) ||
        colcount != 2'(ref_count % N) || last != (ref_count == N * N - 1) ||
        matcount != MAT_W'(ref_mat)) begin
      failures++;
      $display("count %0d row %0d col %0d last %0d mat %0d, expected element %0d matrix %0d",
               count, rowcount, colcount, last, matcount, ref_count, ref_mat);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1 compare();
    for (int step = 0; step < 200; step++) begin
      inc     <= ($urandom % 4) != 0;
      mat_inc <= ($urandom % 7) == 0;
      @(posedge clk);
      if (inc)     ref_count = (ref_count + 1) % (N * N);
      if (mat_inc) ref_mat   = (ref_mat + 1) % (1 << MAT_W);
      #1 compare();
    end
    inc <= 1'b0; mat_inc <= 1'b0; mat_clr <= 1'b1;
    @(posedge clk);
    mat_clr <= 1'b0;
    ref_count = 0; ref_mat = 0;
    #1 compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
