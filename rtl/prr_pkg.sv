// Shared types and constants of the partial-result-reuse (PRR) morphology
// datapaths. A PRR datapath evaluates a "running semigroup operation" over
// a flat structuring element on a raster-scan pixel stream. The operator is
// chosen per instance: MAX gives flat dilation, MIN gives flat erosion and ADD
// gives the running sum used by the moving-average filter. Pixels are 8 bits,
// as in the prototype chip. The bus structs belong to the systolic variant.
package prr_pkg;

  // Semigroup operator of one MAX cell.
  typedef enum logic [1:0] {
    OP_MAX = 2'd0,  // dilation (running maximum)
    OP_MIN = 2'd1,  // erosion  (running minimum)
    OP_ADD = 2'd2   // running sum (moving average)
  } prr_op_e;

  // Pixel width of the prototype chip.
  localparam int unsigned PIX_W = 8;

  // Buses of the systolic PRR node for the 8x8 square element. Each node
  // (row i, column j) passes seven values down to row i+1 and seven values
  // right to column j+1. Names give the partial result and the node it came
  // from: b = pixel of (i-1, j); d1, d2 = 2x2 maxima of rows i-1, i-2;
  // f1..f4 = 4x4 maxima of rows i-1..i-4; c = 2x1 maximum of column j-1;
  // e1, e2 = 4x2 maxima of columns j-1, j-2; g1..g4 = 8x4 maxima of columns
  // j-1..j-4.
  typedef struct packed {
    logic [PIX_W-1:0] b;
    logic [PIX_W-1:0] d1;
    logic [PIX_W-1:0] d2;
    logic [PIX_W-1:0] f1;
    logic [PIX_W-1:0] f2;
    logic [PIX_W-1:0] f3;
    logic [PIX_W-1:0] f4;
  } sys_vbus_t;

  typedef struct packed {
    logic [PIX_W-1:0] c;
    logic [PIX_W-1:0] e1;
    logic [PIX_W-1:0] e2;
    logic [PIX_W-1:0] g1;
    logic [PIX_W-1:0] g2;
    logic [PIX_W-1:0] g3;
    logic [PIX_W-1:0] g4;
  } sys_hbus_t;

endpackage
