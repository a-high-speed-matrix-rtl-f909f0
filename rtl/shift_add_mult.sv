// shift_add_mult: serial-parallel signed multiplier, shift-and-add method.
//
// The multiplicand is used in parallel; the multiplier is consumed one bit per
// clock, least significant bit first. A small state machine runs it:
//   M_IDLE  waits for `start`;
//   M_INIT  loads multiplicand and multiplier into registers and clears the
//           upper half of the product register;
//   M_SHIFT tests the LSB of the multiplier register: if it is 1 the
//           multiplicand is added to the upper half (test, add and shift),
//           otherwise nothing is added (test and shift); then the whole product
//           register shifts right by one. After W such steps the machine
//           returns to M_IDLE and raises `stop` for one cycle.
// Operands are two's complement. The weight of the multiplier's sign bit is
// negative, so in the last step the multiplicand is subtracted instead of
// added, and the shift is arithmetic. `product` holds the full 2W-bit signed
// result from the `stop` cycle until the next `start`.
//
// Timing: `start` high in cycle t (with a, b valid in cycle t+1) gives `stop`
// and the product in cycle t+W+2, that is 10 cycles later for W = 8. `busy`
// is high from the cycle after `start` until `stop`.
//
// Following the original description: 8-bit operands, the 16-bit result, Start and Stop, the
// idle and initialize states, the test-and-shift / test-add-and-shift steps
// chosen by the LSB, and the return to idle at the highest count. The signed
// last step is this design's reading of "serial-parallel sign multiplier".
module shift_add_mult #(
  parameter int unsigned W = matmul_pkg::DATA_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic signed [W-1:0] a,        // multiplicand
  input  logic signed [W-1:0] b,        // multiplier
  output logic signed [2*W-1:0] product,
  output logic                stop,
  output logic                busy
);

  localparam int unsigned CNT_W = $clog2(W);

  import matmul_pkg::*;

  mult_state_e        state;
  logic signed [W:0]  mcand;   // sign-extended multiplicand
  logic signed [W:0]  hi;      // upper part of the product register
  logic        [W-1:0] lo;     // lower part, initially the multiplier
  logic [CNT_W-1:0]   step;

  logic              last_step;
  logic signed [W:0] sum;

  assign last_step = (step == CNT_W'(W - 1));

  always_comb begin
    if (!lo[0])         sum = hi;
    else if (last_step) sum = hi - mcand;
    else                sum = hi + mcand;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= M_IDLE;
      mcand <= '0;
      hi    <= '0;
      lo    <= '0;
      step  <= '0;
      stop  <= 1'b0;
    end else begin
      stop <= 1'b0;
      unique case (state)
        M_IDLE: if (start) state <= M_INIT;
        M_INIT: begin
          mcand <= {a[W-1], a};
          hi    <= '0;
          lo    <= b;
          step  <= '0;
          state <= M_SHIFT;
        end
        M_SHIFT: begin
          {hi, lo} <= {sum[W], sum, lo[W-1:1]};
          step     <= step + 1'b1;
          if (last_step) begin
            state <= M_IDLE;
            stop  <= 1'b1;
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  assign product = {hi[W-1:0], lo};
  assign busy    = (state != M_IDLE);

endmodule
