// One-order PRR datapath for an arbitrary (non self-affine) structuring
// element of ten points.
//
// The element, drawn with rows 0..3 from top and columns 0..3 from left, is
//     row 0:  column 1
//     row 1:  columns 0..3
//     row 2:  columns 0..3
//     row 3:  column 2        <- current pixel A (latest in raster order)
// It is split into segments that can each be reused from an earlier pixel:
//   B = pixel (2,3) = A delayed W-1,   C = pixel (1,3) = B delayed W,
//   D = column 2 of rows 1..2 = max(B,C) one pixel earlier,
//   E = columns 0..1 of rows 1..2 = max(B,C,D) two pixels earlier,
//   F = pixel (0,1) = C delayed W+2.
// Five MAX cells compute  max(B,C) -> with D -> with E -> with F -> with A.
// Relative to A the window covers the raster delays
//   {0, W-1, W, W+1, W+2, 2W-1, 2W, 2W+1, 2W+2, 3W+1}.
//
// Interface: raster-scan stream pix_i/valid_i in, pix_o/valid_o out, both
// combinational in the same cycle (no pipeline registers, as drawn); valid_i
// stalls all delay lines. W is the frame width (default: the 94-pixel padded
// tile of the prototype chip, a choice of this design).
// Segments, delays and cell order follow the document's example.
module prr_se_arb10
  import prr_pkg::*;
#(
  parameter int unsigned W  = 94,
  parameter int unsigned DW = 8,
  parameter prr_op_e     OP = OP_MAX
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          valid_i,
  input  logic [DW-1:0] pix_i,
  output logic          valid_o,
  output logic [DW-1:0] pix_o
);

  logic [DW-1:0] tap_b, tap_c, tap_d, tap_e, tap_f;
  logic [DW-1:0] m_bc, m_bcd, m_bcde, m_bcdef;

  prr_delay_line #(.DW(DW), .LEN(W - 1)) u_dl_b (
    .clk_i, .en_i(valid_i), .d_i(pix_i), .q_o(tap_b));
  prr_delay_line #(.DW(DW), .LEN(W)) u_dl_c (
    .clk_i, .en_i(valid_i), .d_i(tap_b), .q_o(tap_c));
  prr_delay_line #(.DW(DW), .LEN(1)) u_dl_d (
    .clk_i, .en_i(valid_i), .d_i(m_bc), .q_o(tap_d));
  prr_delay_line #(.DW(DW), .LEN(2)) u_dl_e (
    .clk_i, .en_i(valid_i), .d_i(m_bcd), .q_o(tap_e));
  prr_delay_line #(.DW(DW), .LEN(W + 2)) u_dl_f (
    .clk_i, .en_i(valid_i), .d_i(tap_c), .q_o(tap_f));

  prr_op_unit #(.DW(DW), .OP(OP), .REG(1'b0)) u_max_bc (
    .clk_i, .rst_ni, .en_i(valid_i), .a_i(tap_b), .b_i(tap_c), .y_o(m_bc));
  prr_op_unit #(.DW(DW), .OP(OP), .REG(1'b0)) u_max_d (
    .clk_i, .rst_ni, .en_i(valid_i), .a_i(m_bc), .b_i(tap_d), .y_o(m_bcd));
  prr_op_unit #(.DW(DW), .OP(OP), .REG(1'b0)) u_max_e (
    .clk_i, .rst_ni, .en_i(valid_i), .a_i(m_bcd), .b_i(tap_e), .y_o(m_bcde));
  prr_op_unit #(.DW(DW), .OP(OP), .REG(1'b0)) u_max_f (
    .clk_i, .rst_ni, .en_i(valid_i), .a_i(m_bcde), .b_i(tap_f), .y_o(m_bcdef));
  prr_op_unit #(.DW(DW), .OP(OP), .REG(1'b0)) u_max_a (
    .clk_i, .rst_ni, .en_i(valid_i), .a_i(m_bcdef), .b_i(pix_i), .y_o(pix_o));

  assign valid_o = valid_i;

endmodule
