// tb_result_mem: self-checking test of the result memory.
//
// Writes random 18-bit words at every address through the write port while
// reading other words through the read port, then reads all words back and
// checks them and the one-cycle read latency.
module tb_result_mem;
  localparam int WIDTH = 18, ADDR_W = 6, DEPTH = 64;

  logic clk = 1'b0, rst = 1'b1;
  logic wr_en = 1'b0, rd_enable = 1'b0;
  logic [ADDR_W-1:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0]  wr_data = '0, rd_data;
  logic [WIDTH-1:0]  model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  result_mem #(.WIDTH(WIDTH), .ADDR_W(ADDR_W)) dut (.*);

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
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = WIDTH'($urandom);
      wr_addr <= ADDR_W'(i); wr_data <= model[i]; wr_en <= 1'b1;
      rd_addr <= ADDR_W'(i / 2); rd_enable <= (i > 1);
      @(posedge clk);
      #1;
      if (i > 1) begin
        checks++;
        if (rd_data !== model[i / 2]) begin
          failures++;
          $display("read word %0d during writes: got %h expected %h", i / 2, rd_data, model[i / 2]);
        end
      end
    end
    wr_en <= 1'b0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      rd_addr <= ADDR_W'(i); rd_enable <= 1'b1;
      @(posedge clk);
      #1;
      checks++;
      if (rd_data !== model[i]) begin
        failures++;
        $display("read word %0d: got %h expected %h", i, rd_data, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
