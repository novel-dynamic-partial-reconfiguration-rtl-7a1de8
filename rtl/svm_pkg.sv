// svm_pkg: types shared by the SVM classifier cores.
//
// The training data, labels, coefficients and the active problem size of a
// core are written through one command bundle, svm_load_t. In the FPGA flow
// these contents would be part of the core's (partial) configuration image;
// here a plain synchronous write port stands in for that image, which is a
// choice of this design. One command is taken per clock when `valid` is high.
//   LD_FEATURE : training-set feature x[row][col] (row = SV index, col = feature index)
//   LD_LABEL   : class label bit of SV `row` (data[0]; 1 means y = -1, 0 means y = +1)
//   LD_COEFF   : training coefficient alpha of SV `row` (unsigned, low bits of data)
//   LD_CFG_M   : active number of features (1..M), data[15:0]
//   LD_CFG_SV  : active number of support vectors (1..SV), data[15:0]
package svm_pkg;

  typedef enum logic [2:0] {
    LD_FEATURE = 3'd0,
    LD_LABEL   = 3'd1,
    LD_COEFF   = 3'd2,
    LD_CFG_M   = 3'd3,
    LD_CFG_SV  = 3'd4
  } ld_target_e;

  typedef struct packed {
    logic       valid;
    ld_target_e target;
    logic [15:0] row;
    logic [15:0] col;
    logic [31:0] data;
  } svm_load_t;

  // Tags that travel with a data item down a pipeline.
  typedef struct packed {
    logic valid;
    logic first;
    logic last;
  } svm_tag_t;

  // Result width of a dot product of n features of b bits (signed).
  function automatic int dot_width(int b, int n);
    return 2 * b + $clog2(n + 1);
  endfunction

endpackage
