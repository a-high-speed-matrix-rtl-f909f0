// tb_matrix_formation_unit: self-checking test of the PE array.
//
// Gives the three PEs a column A[*][k] and a shared B[k][j] per step, in the
// control unit's order, then drains PE 0, 1, 2 in turn and compares every
// result with Y = A x B worked out in the testbench. Also checks that the
// combined `stop` comes W+2 cycles after `start`.
module tb_matrix_formation_unit;
  localparam int W = 8, N = 3, ACC_W = 18;

  logic clk = 1'b0, rst = 1'b1;
  logic [W-1:0] a [N];
  logic [W-1:0] b = '0;
  logic start = 1'b0, acc_en = 1'b0, first = 1'b0, drain = 1'b0;
  logic [1:0] drain_row = '0;
  logic stop, busy, empty;
  logic signed [ACC_W-1:0] result;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  matrix_formation_unit #(.W(W), .N(N), .ACC_W(ACC_W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int am [N][N], input int bm [N][N]);
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++) begin
        int cycles = 0;
        for (int i = 0; i < N; i++) a[i] <= W'(am[i][k]);
        b <= W'(bm[k][j]); start <= 1'b1;
        @(posedge clk);
        start <= 1'b0;
        do begin
          @(posedge clk);
          cycles++;
        end while (!stop && cycles < 40);
        checks++;
        if (cycles != W + 2) begin
          failures++;
          $display("latency %0d, expected %0d", cycles, W + 2);
        end
        acc_en <= 1'b1; first <= (k == 0);
        @(posedge clk);
        acc_en <= 1'b0; first <= 1'b0;
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int y = 0;
        for (int k = 0; k < N; k++) y += am[i][k] * bm[k][j];
        drain_row <= 2'(i);
        #1;
        checks++;
        if (int'(result) != y || empty) begin
          failures++;
          $display("Y[%0d][%0d] = %0d (empty %0d), expected %0d", i, j, result, empty, y);
        end
        drain <= 1'b1;
        @(posedge clk);
        drain <= 1'b0;
      end
  endtask

  initial begin
    int am [N][N];
    int bm [N][N];
    foreach (a[i]) a[i] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int t = 0; t < 20; t++) begin
      foreach (am[i, k]) am[i][k] = $urandom_range(0, 255) - 128;
      foreach (bm[k, j]) bm[k][j] = $urandom_range(0, 255) - 128;
      run(am, bm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
