// tb_matmul_dims: the matrix multiplier at other matrix sizes.
//
// The design is parameterised by the matrix dimension N. This testbench
// builds it for 2x2 (7 pairs per run) and 4x4 (4 pairs per run) matrices and
// runs random signed pairs and all-(-128) pairs through each, checking every
// result and the cycle count of each run.
module tb_matmul_dims;
  logic clk = 1'b0, rst = 1'b1;
  logic done2, done4;
  int checks2, failures2, checks4, failures4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  matmul_dim_check #(.N(2), .RUNS(3)) u_n2 (.clk, .rst, .done(done2), .checks(checks2), .failures(failures2));
  matmul_dim_check #(.N(4), .RUNS(3)) u_n4 (.clk, .rst, .done(done4), .checks(checks4), .failures(failures4));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (done2 && done4);
    checks = checks2 + checks4;
    failures = failures2 + failures4;
    $display("2x2: %0d checks, 4x4: %0d checks", checks2, checks4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
