// tb_parallel_mem_unit: self-checking test of the three parallel banks.
//
// Writes different random data into each bank at every address through the
// bank select, then reads every address once and checks that all banks return
// their own word in the same cycle, so a write went only to its bank.
module tb_parallel_mem_unit;
  localparam int NBANK = 3, WIDTH = 8, ADDR_W = 6, DEPTH = 64;

  logic clk = 1'b0, rst = 1'b1;
  logic we_n = 1'b1, rd_enable = 1'b0;
  logic [1:0]        wr_bank = '0;
  logic [ADDR_W-1:0] addr = '0;
  logic [WIDTH-1:0]  wr_data = '0;
  logic [WIDTH-1:0]  rd_data [NBANK];
  logic [WIDTH-1:0]  model [NBANK][DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  parallel_mem_unit #(.NBANK(NBANK), .WIDTH(WIDTH), .ADDR_W(ADDR_W)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int b = 0; b < NBANK; b++)
      for (int i = 0; i < DEPTH; i++) begin
        model[b][i] = WIDTH'($urandom);
        wr_bank <= 2'(b); addr <= ADDR_W'(i); wr_data <= model[b][i]; we_n <= 1'b0;
        @(posedge clk);
      end
    we_n <= 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      addr <= ADDR_W'(i); rd_enable <= 1'b1;
      @(posedge clk);
      rd_enable <= 1'b0;
      #1;
      for (int b = 0; b < NBANK; b++) begin
        checks++;
        if (rd_data[b] !== model[b][i]) begin
          failures++;
          $display("bank %0d word %0d: got %h expected %h", b, i, rd_data[b], model[b][i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
