// dct_pkg: constants shared by the 8-point approximate DCT blocks.
//
// The transform is the multiplier-free 8-point DCT approximation T_p, whose
// entries are 0 and +/-1 (rows listed in natural coefficient order):
//   X0: [ 1  1  1  1  1  1  1  1]      X4: [ 1 -1 -1  1  1 -1 -1  1]
//   X1: [ 0  1  0  0  0  0 -1  0]      X5: [ 0  0  0  1 -1  0  0  0]
//   X2: [ 1  0  0 -1 -1  0  0  1]      X6: [ 0 -1  1  0  0  1 -1  0]
//   X3: [ 1  0  0  0  0  0  0 -1]      X7: [ 0  0  1  0  0 -1  0  0]
// It is computed as P4 * A12 * A11 * A1 with 14 additions. The stage A12
// produces the coefficients in the order X0,X4,X6,X2,X5,X7,X1,X3; STAGE_TO_COEF
// gives, for each A12 output lane, the coefficient index it carries.
package dct_pkg;

  localparam int unsigned N = 8;           // transform length and block size
  localparam int unsigned GROWTH_1D = 3;   // bits of word growth per 1-D pass

  typedef int unsigned lane_map_t [N];
  localparam lane_map_t STAGE_TO_COEF = '{0, 4, 6, 2, 5, 7, 1, 3};

  // Write orientation of the transposition buffer during a pass.
  typedef enum logic {
    FILL_COLS = 1'b0,   // incoming vectors enter as columns, array shifts left
    FILL_ROWS = 1'b1    // incoming vectors enter as rows, array shifts up
  } fill_dir_e;

  // Kind of pass the transposition buffer is in.
  typedef enum logic [1:0] {
    PASS_IDLE  = 2'd0,
    PASS_INPUT = 2'd1,   // a new block is being written
    PASS_FLUSH = 2'd2    // no input: only the stored block is read out
  } pass_kind_e;

endpackage
