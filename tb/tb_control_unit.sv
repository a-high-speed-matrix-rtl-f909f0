// tb_control_unit: self-checking test of the control state machine.
//
// The control unit runs with the real counters; the processing elements are
// replaced by a delay that raises mul_stop W+2 cycles after mul_start, as the
// shift-and-add multiplier does. The testbench records every memory read,
// accumulate and result write and compares them, in order, with the schedule
// worked out here (k outer, j inner, then drain row by row), for runs of one,
// three and seven matrix pairs, and checks the cycle count from start to stop.
module tb_control_unit;
  localparam int N = 3, ADDR_W = 6, MAT_W = 3, W = 8;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [MAT_W-1:0] mat_last = '0;
  logic busy, stop, cnt_inc, mat_clr, mat_inc, last;
  logic [3:0] count;
  logic [1:0] rowcount, colcount, drain_row;
  logic [MAT_W-1:0] matcount;
  logic mem_rd, mul_start, mul_stop, acc_en, first, drain, res_we;
  logic [ADDR_W-1:0] a_addr, b_addr, res_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_unit #(.N(N), .ADDR_W(ADDR_W), .MAT_W(MAT_W)) dut (.*);
  row_col_counter #(.N(N), .MAT_W(MAT_W)) u_cnt (
    .clk, .rst, .inc(cnt_inc), .mat_clr, .mat_inc,
    .count, .rowcount, .colcount, .matcount, .last
  );

  // stand-in for the multipliers: stop W+2 cycles after start
  int delay = 0;
  always_ff @(posedge clk) begin
    if (rst) delay <= 0;
    else if (mul_start) delay <= W + 2;
    else if (delay > 0) delay <= delay - 1;
  end
  assign mul_stop = (delay == 1);

  // observed events, as strings, in order
  string seen [$];
  always @(posedge clk) if (!rst) begin
    if (mem_rd) seen.push_back($sformatf("rd a%0d b%0d", a_addr, b_addr));
    if (acc_en) seen.push_back($sformatf("acc first%0d", first));
    if (res_we) seen.push_back($sformatf("wr %0d row%0d drain%0d", res_addr, drain_row, drain));
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int pairs);
    string want [$];
    int cycles = 0;
    for (int m = 0; m < pairs; m++) begin
      for (int k = 0; k < N; k++)
        for (int j = 0; j < N; j++) begin
          want.push_back($sformatf("rd a%0d b%0d", m * N + k, m * N * N + k * N + j));
          want.push_back($sformatf("acc first%0d", k == 0));
        end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          want.push_back($sformatf("wr %0d row%0d drain1", m * N * N + i * N + j, i));
    end
    seen.delete();
    mat_last <= MAT_W'(pairs - 1); start <= 1'b1;
    @(posedge clk);
    start <= 1'b0; mat_last <= '0;
    do begin
      @(posedge clk);
      cycles++;
    end while (!stop && cycles < 5000);
    #1;
    checks++;
    if (cycles != pairs * N * N * (W + 5) + 2) begin
      failures++;
      $display("%0d pairs took %0d cycles, expected %0d", pairs, cycles, pairs * N * N * (W + 5) + 2);
    end
    checks++;
    if (seen.size() != want.size()) begin
      failures++;
      $display("%0d events, expected %0d", seen.size(), want.size());
    end
    for (int e = 0; e < want.size() && e < seen.size(); e++) begin
      checks++;
      if (seen[e] != want[e]) begin
        failures++;
        $display("event %0d: '%s', expected '%s'", e, seen[e], want[e]);
      end
    end
    @(posedge clk);
    checks++;
    if (busy) begin
      failures++;
      $display("still busy after stop");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    run(1);
    run(3);
    run(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
