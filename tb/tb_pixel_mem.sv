// tb_pixel_mem: self-checking test of the 64 x 8 pixel memory.
//
// Fills every word with random data through the active-low write enable,
// reads every word back (one cycle of latency), checks that a high we_n
// writes nothing, that rd_data holds while rd_enable is low, and that a read
// of a word written in the same cycle returns the old word.
module tb_pixel_mem;
  localparam int WIDTH = 8, ADDR_W = 6, DEPTH = 64;

  logic clk = 1'b0, rst = 1'b1;
  logic we_n = 1'b1, rd_enable = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic [WIDTH-1:0]  wr_data = '0, rd_data;
  logic [WIDTH-1:0]  model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pixel_mem #(.WIDTH(WIDTH), .ADDR_W(ADDR_W)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, rd_data, exp);
    end
  endtask

  task automatic read(input int ad);
    addr <= ADDR_W'(ad); rd_enable <= 1'b1; we_n <= 1'b1;
    @(posedge clk);
    rd_enable <= 1'b0;
    #1 check(model[ad], $sformatf("read word %0d", ad));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1 check('0, "after reset");
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = WIDTH'($urandom);
      addr <= ADDR_W'(i); wr_data <= model[i]; we_n <= 1'b0;
      @(posedge clk);
    end
    we_n <= 1'b1;
    for (int i = 0; i < DEPTH; i++) read(i);
    // we_n high: nothing written
    addr <= 6'd5; wr_data <= ~model[5]; we_n <= 1'b1;
    @(posedge clk);
    read(5);
    // rd_enable low: output holds
    addr <= 6'd9;
    repeat (2) @(posedge clk);
    #1 check(model[5], "hold with rd_enable low");
    // write and read the same word in one cycle: old word returned
    addr <= 6'd7; wr_data <= ~model[7]; we_n <= 1'b0; rd_enable <= 1'b1;
    @(posedge clk);
    we_n <= 1'b1; rd_enable <= 1'b0;
    #1 check(model[7], "read during write");
    model[7] = ~model[7];
    read(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
