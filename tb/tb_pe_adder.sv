// tb_pe_adder: self-checking test of the accumulating adder.
//
// Applies random and extreme signed products and partial sums, with and
// without `first`, and compares the sum with integer arithmetic.
module tb_pe_adder;
  localparam int PROD_W = 16, ACC_W = 18;

  logic clk = 1'b0;
  logic first;
  logic signed [PROD_W-1:0] product;
  logic signed [ACC_W-1:0]  partial, sum;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe_adder #(.PROD_W(PROD_W), .ACC_W(ACC_W)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input bit f, input int p, input int s);
    int expect_s;
    first = f; product = PROD_W'(p); partial = ACC_W'(s);
    #1;
    expect_s = (f ? 0 : s) + p;
    checks++;
    if (int'(sum) != expect_s) begin
      failures++;
      $display("first %0d product %0d partial %0d: sum %0d expected %0d", f, p, s, sum, expect_s);
    end
  endtask

  initial begin
    apply(0, -16384, -32768);
    apply(0, 16384, 32768);
    apply(1, -16384, 12345);
    apply(0, -1, 0);
    for (int i = 0; i < 2000; i++)
      apply(1'($urandom), $urandom_range(0, 32768) - 16384, $urandom_range(0, 65536) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
