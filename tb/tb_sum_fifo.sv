// tb_sum_fifo: self-checking test of the partial-sum FIFO (depth 3).
//
// Runs random push/pop traffic that never overflows or underflows against a
// queue model, checking dout, empty, full and level every cycle, including
// simultaneous push and pop on a full FIFO (the cyclic-addition case).
module tb_sum_fifo;
  localparam int WIDTH = 18, DEPTH = 3;

  logic clk = 1'b0, rst = 1'b1;
  logic push = 1'b0, pop = 1'b0;
  logic [WIDTH-1:0] din = '0, dout;
  logic empty, full;
  logic [1:0] level;
  logic [WIDTH-1:0] q [$];
  int checks = 0, failures = 0, full_cycles = 0;

  always #5 clk = ~clk;

  sum_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || level != 2'(q.size()) ||
        (q.size() != 0 && dout != q[0])) begin
      failures++;
      $display("size %0d: empty %0d full %0d level %0d dout %h", q.size(), empty, full, level, dout);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1 compare();
    for (int i = 0; i < 3000; i++) begin
      logic do_push, do_pop;
      logic [WIDTH-1:0] d;
      do_pop  = (q.size() != 0) && ($urandom % 2);
      do_push = ((q.size() < DEPTH) || do_pop) && ($urandom % 3 != 0);
      d = WIDTH'($urandom);
      if (do_push && do_pop && q.size() == DEPTH) full_cycles++;
      push <= do_push; pop <= do_pop; din <= d;
      @(posedge clk);
      if (do_pop)  void'(q.pop_front());
      if (do_push) q.push_back(d);
      #1 compare();
    end
    checks++;
    if (full_cycles == 0) begin
      failures++;
      $display("push and pop on a full FIFO never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
