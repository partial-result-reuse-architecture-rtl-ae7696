// Duplicate-and-shift PRR chain for structuring elements with self-affinity.
//
// A structuring element that is a union of shifted copies of a smaller one is
// evaluated by a chain of MAX cells. Stage k combines the partial result x_k
// with a copy of itself delayed by DELAYS[k] pixels:
//     x_0 = pixel,   x_{k+1} = OP(x_k, x_k delayed by DELAYS[k]),   y = x_N.
// Each stage doubles (or, with overlap, nearly doubles) the window, so an
// n-point line needs only ceil(log2 n) cells. Overlapping copies are harmless
// for MAX and MIN because these operators are idempotent.
// Typical settings, for an image width W:
//     1x8 line          DELAYS = {1, 2, 4}
//     1x7 line          DELAYS = {1, 2, 3}
//     8x8 square        DELAYS = {W, 1, 2W, 2, 4W, 4}
//     8-point diagonal  DELAYS = {W+1, 2W+2, 4W+4}
//
// DELAYS has MAX_N entries; only the first N are used (N <= MAX_N).
//
// Interface: pix_i/valid_i is the raster-scan input, one pixel per accepted
// cycle; pix_o/valid_o the result. With PIPE = 0 (as drawn in the document)
// the cells are combinational and y covers the window whose latest pixel is
// the current input. With PIPE = 1 every cell is registered; since both
// inputs of a cell come from the same node no tap correction is needed, and
// after the edge that accepted pixel n the output covers the window whose
// latest pixel is n-(N-1). valid_i stalls the whole chain.
// The chain structure and the example delays follow the document; the
// PIPE = 1 option and the stall input are this design's choices.
module prr_chain
  import prr_pkg::*;
#(
  parameter int unsigned DW           = 8,
  parameter prr_op_e     OP           = OP_MAX,
  parameter bit          PIPE         = 1'b0,
  parameter int unsigned MAX_N        = 8,
  parameter int unsigned N            = 3,
  parameter int unsigned DELAYS [MAX_N] = '{1, 2, 4, 0, 0, 0, 0, 0}
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          valid_i,
  input  logic [DW-1:0] pix_i,
  output logic          valid_o,
  output logic [DW-1:0] pix_o
);

  if (N == 0 || N > MAX_N) begin : g_bad_n
    $error("prr_chain: N must be between 1 and MAX_N");
  end

  logic [DW-1:0] x [N+1];

  assign x[0] = pix_i;

  for (genvar k = 0; k < N; k++) begin : g_stage
    logic [DW-1:0] shifted;
    prr_delay_line #(.DW(DW), .LEN(DELAYS[k])) u_dl (
      .clk_i, .en_i(valid_i), .d_i(x[k]), .q_o(shifted));
    prr_op_unit #(.DW(DW), .OP(OP), .REG(PIPE)) u_max (
      .clk_i, .rst_ni, .en_i(valid_i), .a_i(x[k]), .b_i(shifted), .y_o(x[k+1]));
  end

  assign pix_o = x[N];

  if (PIPE) begin : g_valid_reg
    always_ff @(posedge clk_i) begin
      if (!rst_ni) valid_o <= 1'b0;
      else         valid_o <= valid_i;
    end
  end else begin : g_valid_comb
    assign valid_o = valid_i;
  end

endmodule
