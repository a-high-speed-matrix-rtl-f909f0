// tb_shift_add_mult: self-checking test of the shift-and-add multiplier.
//
// Multiplies all corner operands (0, 1, -1, max, min and neighbours) with
// each other and then random signed pairs, comparing the 16-bit product with
// the product worked out by the simulator, and checks that `stop` comes
// exactly W+2 cycles after `start` and that `busy` is high in between.
module tb_shift_add_mult;
  localparam int W = 8;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic signed [W-1:0]   a = '0, b = '0;
  logic signed [2*W-1:0] product;
  logic stop, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  shift_add_mult #(.W(W)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic signed [W-1:0] x, input logic signed [W-1:0] y);
    int cycles = 0;
    logic signed [2*W-1:0] expect_p;
    expect_p = (2*W)'(int'(x) * int'(y));
    a <= x; b <= y; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do begin
      @(posedge clk);
      cycles++;
      if (!stop && !busy) begin
        failures++;
        $display("busy low while multiplying %0d * %0d", x, y);
      end
    end while (!stop && cycles < 50);
    checks++;
    if (product !== expect_p) begin
      failures++;
      $display("product %0d * %0d = %0d, expected %0d", x, y, product, expect_p);
    end
    checks++;
    if (cycles != W + 2) begin
      failures++;
      $display("latency %0d cycles, expected %0d", cycles, W + 2);
    end
    @(posedge clk);
  endtask

  initial begin
    logic signed [W-1:0] corner [8];
    corner = '{8'sd0, 8'sd1, -8'sd1, 8'sd127, -8'sd128, 8'sd2, -8'sd127, 8'sd85};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    foreach (corner[i]) foreach (corner[j]) run(corner[i], corner[j]);
    repeat (2000) run(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
