// parallel_mem_unit: NBANK pixel memories side by side, read in parallel.
//
// Bank i holds row i of matrix A: element A[i][k] of matrix pair m sits at
// word m*NBANK + k of bank i. All banks share one address bus, so a single
// read (rd_enable high) returns a whole column of A, A[0][k] .. A[NBANK-1][k],
// one cycle later on rd_data[0..NBANK-1], and each processing element gets
// its own operand without talking to the others. A write goes to the one bank
// named by wr_bank, when the active-low we_n is low; the other banks see their
// write enable held inactive.
//
// Following the original description: three memory banks with addr(5:0), each followed by an
// 8-bit data register with clock enable, and the active-low write enable. The
// row-per-bank layout and the shared address are this design's own choices.
module parallel_mem_unit #(
  parameter int unsigned NBANK  = matmul_pkg::MAT_N,
  parameter int unsigned WIDTH  = matmul_pkg::DATA_W,
  parameter int unsigned ADDR_W = matmul_pkg::ADDR_W,
  localparam int unsigned BSEL_W = (NBANK > 1) ? $clog2(NBANK) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we_n,       // write enable, active low
  input  logic [BSEL_W-1:0] wr_bank,    // bank written when we_n is low
  input  logic [ADDR_W-1:0] addr,       // shared by all banks
  input  logic [WIDTH-1:0]  wr_data,
  input  logic              rd_enable,
  output logic [WIDTH-1:0]  rd_data [NBANK]
);

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic bank_we_n;
    assign bank_we_n = we_n || (wr_bank != BSEL_W'(b));

    pixel_mem #(
      .WIDTH (WIDTH),
      .ADDR_W(ADDR_W)
    ) u_mem (
      .clk      (clk),
      .rst      (rst),
      .we_n     (bank_we_n),
      .addr     (addr),
      .wr_data  (wr_data),
      .rd_enable(rd_enable),
      .rd_data  (rd_data[b])
    );
  end

endmodule
