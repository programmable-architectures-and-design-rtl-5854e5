// nfg2_pkg: default sizes and shared helpers of the two-variable numeric
// function generators (NFGs).
//
// The generators evaluate a piecewise bilinear approximation
//   g = Cxy*dx*dy + Cx*dx + Cy*dy + C0,  dx = X - Bx, dy = Y - By,
// where (Bx, By) is the lower corner of the segment that holds (X, Y).
// Inputs are unsigned fixed-point numbers with N_BITS fractional bits
// (12-bit accuracy, domain [0,1), as in the FPGA implementations).
// Coefficient and output formats are not fixed by the method; the values
// below are this design's choice and are parameters of every module.
package nfg2_pkg;

  // Input accuracy: 12 fractional bits per variable.
  localparam int unsigned N_BITS    = 12;
  // Segment number width of the non-uniform generators (16,384 segments).
  localparam int unsigned SEG_W     = 14;
  // Rails between LUT cells: at most ceil(log2 k) for k segments.
  localparam int unsigned RAIL_W    = 14;
  // Bits of the interleaved input Z consumed by one LUT cell
  // (one x bit and one y bit = one level of the quadtree).
  localparam int unsigned CELL_BITS = 2;
  // Most significant bits of X (and of Y) that address the uniform NFG's
  // coefficients memory: 2^7 x 2^7 = 16,384 segments.
  localparam int unsigned UNI_BITS  = 7;
  // Signed coefficients: COEF_W bits, COEF_F of them fractional.
  localparam int unsigned COEF_W    = 34;
  localparam int unsigned COEF_F    = 20;
  // Signed output: OUT_W bits, OUT_F of them fractional.
  localparam int unsigned OUT_W     = 16;
  localparam int unsigned OUT_F     = 12;

  // Which generator a configuration write goes to.
  typedef enum logic [1:0] {
    ARCH_UNI = 2'd0,   // uniform segmentation
    ARCH_REC = 2'd1,   // recursive segmentation
    ARCH_SYM = 2'd2    // recursive segmentation, symmetric method
  } arch_e;

  // Which memory of that generator a configuration write goes to.
  typedef enum logic [1:0] {
    CFG_COEF = 2'd0,   // coefficients memory
    CFG_LUT  = 2'd1    // one LUT memory of the segment index encoder
  } cfg_target_e;

endpackage
