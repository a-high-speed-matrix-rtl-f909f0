// tb_matmul_top: end-to-end test of the matrix multiplier at its default
// size (3x3 matrices, 8-bit elements, 64-word memories).
//
// The host side loads matrix pairs through the load port (active-low write
// enable), starts a run, waits for `stop`, reads every result element back
// through the result read port and compares it with Y = A x B computed here.
// Runs: one pair of small positive matrices, seven pairs of random signed
// matrices (the memories full), one pair of all -128 (largest sums), and one
// run during which the host tries to overwrite the operands, which must be
// ignored. Each run's cycle count is checked against P*N*N*(W+5) + 2.
// It also counts how often each mechanism happened and fails if one never
// did: multiplier start/stop, test-add-shift with a negative multiplier
// (subtract step), cyclic FIFO accumulation (pop and push in one cycle),
// result write-back from the FIFOs, the matrix counter stepping to the next
// pair, and a load-port write ignored while busy.
module tb_matmul_top;
  localparam int N = 3, W = 8, ADDR_W = 6, ACC_W = 18, MAT_W = 3;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [MAT_W-1:0] mat_last = '0;
  logic busy, stop;
  logic ld_we_n = 1'b1, ld_target = 1'b0;
  logic [1:0] ld_row = '0;
  logic [ADDR_W-1:0] ld_addr = '0, rd_addr = '0;
  logic [W-1:0] ld_data = '0;
  logic rd_enable = 1'b0;
  logic [ACC_W-1:0] rd_data;
  logic [3:0] count;
  logic [1:0] rowcount, colcount;
  logic [MAT_W-1:0] matcount;
  int checks = 0, failures = 0;

  int am [7][N][N];
  int bm [7][N][N];

  // mechanism counters
  int n_mult = 0, n_neg_mult = 0, n_cyclic = 0, n_writeback = 0, n_next_mat = 0, n_ignored = 0;

  always #5 clk = ~clk;

  matmul_top dut (.*);

  always @(posedge clk) if (!rst) begin
    if (dut.mul_start) n_mult++;
    if (dut.mul_start && dut.b_elem[W-1]) n_neg_mult++;
    if (dut.acc_en && !dut.first) n_cyclic++;
    if (dut.res_we) n_writeback++;
    if (dut.mat_inc) n_next_mat++;
    if (busy && !ld_we_n) n_ignored++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input bit tgt, input int row, input int addr, input int data);
    ld_target <= tgt; ld_row <= 2'(row); ld_addr <= ADDR_W'(addr); ld_data <= W'(data);
    ld_we_n <= 1'b0;
    @(posedge clk);
  endtask

  task automatic load_pair(input int m);
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) load(1'b0, i, m * N + k, am[m][i][k]);
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++) load(1'b1, 0, m * N * N + k * N + j, bm[m][k][j]);
    ld_we_n <= 1'b1;
    @(posedge clk);
  endtask

  task automatic run(input int pairs, input bit meddle);
    int cycles = 0;
    mat_last <= MAT_W'(pairs - 1); start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do begin
      if (meddle && busy && cycles < 40) begin
        ld_target <= 1'($urandom); ld_row <= 2'($urandom_range(0, N - 1));
        ld_addr <= ADDR_W'($urandom_range(0, N * N - 1)); ld_data <= W'($urandom);
        ld_we_n <= 1'b0;
      end else ld_we_n <= 1'b1;
      @(posedge clk);
      cycles++;
    end while (!stop && cycles < 2000);
    ld_we_n <= 1'b1;
    checks++;
    if (cycles != pairs * N * N * (W + 5) + 2) begin
      failures++;
      $display("%0d pairs took %0d cycles, expected %0d", pairs, cycles, pairs * N * N * (W + 5) + 2);
    end
    for (int m = 0; m < pairs; m++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          int y = 0;
          for (int k = 0; k < N; k++) y += am[m][i][k] * bm[m][k][j];
          rd_addr <= ADDR_W'(m * N * N + i * N + j); rd_enable <= 1'b1;
          @(posedge clk);
          rd_enable <= 1'b0;
          #1;
          checks++;
          if (int'($signed(rd_data)) != y) begin
            failures++;
            $display("pair %0d Y[%0d][%0d] = %0d, expected %0d", m, i, j, $signed(rd_data), y);
          end
        end
  endtask

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end else $display("%s: %0d", what, n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // small positive matrices: A[i][k] = 3i+k+1, B[k][j] = k+j
    foreach (am[0][i, k]) am[0][i][k] = 3 * i + k + 1;
    foreach (bm[0][k, j]) bm[0][k][j] = k + j;
    load_pair(0);
    run(1, 1'b0);
    // seven random signed pairs fill the memories
    for (int m = 0; m < 7; m++) begin
      foreach (am[m][i, k]) am[m][i][k] = $urandom_range(0, 255) - 128;
      foreach (bm[m][k, j]) bm[m][k][j] = $urandom_range(0, 255) - 128;
      load_pair(m);
    end
    run(7, 1'b0);
    // operands changed by the host while busy must not matter
    run(2, 1'b1);
    // extremes: every product (-128)*(-128), the largest sum
    foreach (am[0][i, k]) am[0][i][k] = -128;
    foreach (bm[0][k, j]) bm[0][k][j] = -128;
    load_pair(0);
    run(1, 1'b0);
    need(n_mult, "multiplications started");
    need(n_neg_mult, "multiplications with a negative multiplier");
    need(n_cyclic, "cyclic FIFO additions");
    need(n_writeback, "results written back");
    need(n_next_mat, "steps to the next matrix pair");
    need(n_ignored, "load-port writes ignored while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
