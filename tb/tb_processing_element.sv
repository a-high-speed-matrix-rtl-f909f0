// tb_processing_element: self-checking test of one processing element.
//
// For random signed 3-element rows a and 3x3 matrices B it drives the PE the
// way the control unit does (for k, for j: start, wait for stop, acc_en with
// first while k = 0), then drains the FIFO and checks that it returns
// sum_k a[k]*B[k][j] for j = 0, 1, 2 in order and is then empty. It also
// checks the W+2 cycle multiplier latency.
module tb_processing_element;
  localparam int W = 8, N = 3, ACC_W = 18;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [W-1:0] a = '0, b = '0;
  logic start = 1'b0, acc_en = 1'b0, first = 1'b0, drain = 1'b0;
  logic stop, busy, empty, full;
  logic signed [ACC_W-1:0] result;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  processing_element #(.W(W), .N(N), .ACC_W(ACC_W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_row(input int av [N], input int bv [N][N]);
    int y [N];
    for (int j = 0; j < N; j++) begin
      y[j] = 0;
      for (int k = 0; k < N; k++) y[j] += av[k] * bv[k][j];
    end
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++) begin
        int cycles = 0;
        a <= W'(av[k]); b <= W'(bv[k][j]); start <= 1'b1;
        @(posedge clk);
        start <= 1'b0;
        do begin
          @(posedge clk);
          cycles++;
        end while (!stop && cycles < 40);
        checks++;
        if (cycles != W + 2) begin
          failures++;
          $display("multiplier latency %0d, expected %0d", cycles, W + 2);
        end
        acc_en <= 1'b1; first <= (k == 0);
        @(posedge clk);
        acc_en <= 1'b0; first <= 1'b0;
      end
    #1;
    checks++;
    if (!full) begin
      failures++;
      $display("FIFO not full after the last product");
    end
    for (int j = 0; j < N; j++) begin
      checks++;
      if (int'(result) != y[j]) begin
        failures++;
        $display("Y[%0d] = %0d, expected %0d", j, result, y[j]);
      end
      drain <= 1'b1;
      @(posedge clk);
      drain <= 1'b0;
      #1;
    end
    checks++;
    if (!empty) begin
      failures++;
      $display("FIFO not empty after draining");
    end
  endtask

  initial begin
    int av [N];
    int bv [N][N];
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // extreme case: all products are (-128)*(-128)
    foreach (av[k]) av[k] = -128;
    foreach (bv[k, j]) bv[k][j] = -128;
    run_row(av, bv);
    for (int t = 0; t < 30; t++) begin
      foreach (av[k]) av[k] = $urandom_range(0, 255) - 128;
      foreach (bv[k, j]) bv[k][j] = $urandom_range(0, 255) - 128;
      run_row(av, bv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
