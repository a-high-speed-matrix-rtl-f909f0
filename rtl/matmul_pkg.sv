// matmul_pkg: constants and types shared by the matrix multiplier.
//
// The numbers here are the defaults of the whole design. The element width
// (8 bit), the product width (16 bit), the 6-bit memory address (64 words)
// and the 3x3 matrix size follow the original description. The accumulator width is this
// design's own choice: it is the product width plus enough guard bits that a
// sum of MAT_N signed products can never overflow.
package matmul_pkg;

  parameter int unsigned DATA_W = 8;   // matrix element width
  parameter int unsigned PROD_W = 2 * DATA_W;  // multiplier result width
  parameter int unsigned ADDR_W = 6;   // memory address width, addr(5:0)
  parameter int unsigned MAT_N  = 3;   // matrix dimension (N x N)
  parameter int unsigned ACC_W  = PROD_W + $clog2(MAT_N);  // result element width

  // Target of a host write into the input memories.
  typedef enum logic {
    LD_A = 1'b0,  // matrix A, one bank per row
    LD_B = 1'b1   // matrix B
  } ld_target_e;

  // States of the shift-and-add multiplier controller.
  typedef enum logic [1:0] {
    M_IDLE  = 2'd0,  // waiting for Start
    M_INIT  = 2'd1,  // load multiplicand and multiplier
    M_SHIFT = 2'd2   // test LSB, add (or subtract), shift
  } mult_state_e;

  // States of the matrix control unit.
  typedef enum logic [2:0] {
    C_IDLE  = 3'd0,
    C_INIT  = 3'd1,
    C_READ  = 3'd2,
    C_MUL   = 3'd3,
    C_WAIT  = 3'd4,
    C_DRAIN = 3'd5,
    C_DONE  = 3'd6
  } ctrl_state_e;

endpackage
