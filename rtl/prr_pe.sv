// Processing element of the diameter-5 disk PRR datapath: six MAX cells.
//
// The disk is built by two duplicate-and-shift steps on a five-point cross.
// The first four cells fold the cross taps A (current pixel), B, C, D and E
// into the partial result ABCDE. The fifth cell merges ABCDE with F, a copy of
// ABCDE delayed by W-1 pixels (the cross moved up one row and right one
// column), giving ABCDEF. The sixth merges ABCDEF with G, a copy of ABCDEF
// delayed by W+1 pixels (moved up one row and left one column), which yields
// the full 13-point disk. The delay lines that make B..G live outside the PE,
// so that they can sit in shared memory when the PE is embedded elsewhere.
//
// Interface: a_i..g_i are the tap values, abcde_o and abcdef_o are the
// partial results that feed the F and G delay lines, y_o is the window result.
// With PIPE = 1 every cell has its output register (one cycle each, six in
// all); the caller's tap delays must then account for the registers, as in the
// fully pipelined chip. With PIPE = 0 the PE is combinational.
// The cell order and the taps follow the document; PIPE = 0 is the
// unpipelined drawing of the same architecture.
module prr_pe
  import prr_pkg::*;
#(
  parameter int unsigned DW   = 8,
  parameter prr_op_e     OP   = OP_MAX,
  parameter bit          PIPE = 1'b1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          en_i,
  input  logic [DW-1:0] a_i,
  input  logic [DW-1:0] b_i,
  input  logic [DW-1:0] c_i,
  input  logic [DW-1:0] d_i,
  input  logic [DW-1:0] e_i,
  input  logic [DW-1:0] f_i,
  input  logic [DW-1:0] g_i,
  output logic [DW-1:0] abcde_o,
  output logic [DW-1:0] abcdef_o,
  output logic [DW-1:0] y_o
);

  logic [DW-1:0] ab, abc, abcd;

  prr_op_unit #(.DW(DW), .OP(OP), .REG(PIPE)) u_max_b (
    .clk_i, .rst_ni, .en_i, .a_i(a_i), .b_i(b_i), .y_o(ab));
  prr_op_unit #(.DW(DW), .OP(OP), .REG(PIPE)) u_max_c (
    .clk_i, .rst_ni, .en_i, .a_i(ab), .b_i(c_i), .y_o(abc));
  prr_op_unit #(.DW(DW), .OP(OP), .REG(PIPE)) u_max_d (
    .clk_i, .rst_ni, .en_i, .a_i(abc), .b_i(d_i), .y_o(abcd));
  prr_op_unit #(.DW(DW), .OP(OP), .REG(PIPE)) u_max_e (
    .clk_i, .rst_ni, .en_i, .a_i(abcd), .b_i(e_i), .y_o(abcde_o));
  prr_op_unit #(.DW(DW), .OP(OP), .REG(PIPE)) u_max_f (
    .clk_i, .rst_ni, .en_i, .a_i(abcde_o), .b_i(f_i), .y_o(abcdef_o));
  prr_op_unit #(.DW(DW), .OP(OP), .REG(PIPE)) u_max_g (
    .clk_i, .rst_ni, .en_i, .a_i(abcdef_o), .b_i(g_i), .y_o(y_o));

endmodule
