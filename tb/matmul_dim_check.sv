// matmul_dim_check: drives one matmul_top of size N x N through random runs.
//
// Helper of tb_matmul_dims. It loads as many random signed matrix pairs as
// the 64-word memories hold (64 / (N*N)), runs them in one go, checks every
// result against Y = A x B and the run's cycle count against
// P*N*N*(W+5) + 2, and repeats this RUNS times. It raises `done` when
// finished and reports its counts on `checks` and `failures`.
module matmul_dim_check #(
  parameter int N    = 2,
  parameter int RUNS = 3
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int W = 8, ADDR_W = 6, MAT_W = 3;
  localparam int ACC_W = 2 * W + $clog2(N);
  localparam int RC_W = (N > 1) ? $clog2(N) : 1;
  localparam int CNT_W = $clog2(N * N + 1);
  localparam int PAIRS = ((1 << ADDR_W) / (N * N) > 7) ? 7 : (1 << ADDR_W) / (N * N);

  logic start = 1'b0, busy, stop;
  logic [MAT_W-1:0] mat_last = '0;
  logic ld_we_n = 1'b1, ld_target = 1'b0;
  logic [RC_W-1:0] ld_row = '0;
  logic [ADDR_W-1:0] ld_addr = '0, rd_addr = '0;
  logic [W-1:0] ld_data = '0;
  logic rd_enable = 1'b0;
  logic [ACC_W-1:0] rd_data;
  logic [CNT_W-1:0] count;
  logic [RC_W-1:0] rowcount, colcount;
  logic [MAT_W-1:0] matcount;

  int am [PAIRS][N][N];
  int bm [PAIRS][N][N];

  matmul_top #(.N(N), .W(W), .ADDR_W(ADDR_W), .ACC_W(ACC_W), .MAT_W(MAT_W)) dut (.*);

  task automatic load(input bit tgt, input int row, input int addr, input int data);
    ld_target <= tgt; ld_row <= RC_W'(row); ld_addr <= ADDR_W'(addr); ld_data <= W'(data);
    ld_we_n <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    @(negedge rst);
    @(posedge clk);
    for (int r = 0; r < RUNS; r++) begin
      automatic int cycles = 0;
      for (int m = 0; m < PAIRS; m++) begin
        foreach (am[m][i, k]) am[m][i][k] = (r == 0) ? -128 : $urandom_range(0, 255) - 128;
        foreach (bm[m][k, j]) bm[m][k][j] = (r == 0) ? -128 : $urandom_range(0, 255) - 128;
        for (int i = 0; i < N; i++)
          for (int k = 0; k < N; k++) load(1'b0, i, m * N + k, am[m][i][k]);
        for (int k = 0; k < N; k++)
          for (int j = 0; j < N; j++) load(1'b1, 0, m * N * N + k * N + j, bm[m][k][j]);
      end
      ld_we_n <= 1'b1;
      @(posedge clk);
      mat_last <= MAT_W'(PAIRS - 1); start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      do begin
        @(posedge clk);
        cycles++;
      end while (!stop && cycles < 5000);
      checks++;
      if (cycles != PAIRS * N * N * (W + 5) + 2) begin
        failures++;
        $display("N=%0d: %0d pairs took %0d cycles, expected %0d", N, PAIRS, cycles,
                 PAIRS * N * N * (W + 5) + 2);
      end
      for (int m = 0; m < PAIRS; m++)
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            automatic int y = 0;
            for (int k = 0; k < N; k++) y += am[m][i][k] * bm[m][k][j];
            rd_addr <= ADDR_W'(m * N * N + i * N + j); rd_enable <= 1'b1;
            @(posedge clk);
            rd_enable <= 1'b0;
            #1;
            checks++;
            if (int'($signed(rd_data)) != y) begin
              failures++;
              $display("N=%0d pair %0d Y[%0d][%0d] = %0d, expected %0d", N, m, i, j,
                       $signed(rd_data), y);
            end
          end
    end
    done = 1'b1;
  end
endmodule
