// Processing element of the systolic PRR array for the 8x8 square element.
//
// The dependence graph of the 8x8 dilation has one node per pixel (i, j);
// node (i, j) produces the max over the 8x8 block whose bottom-right pixel is
// (i, j) with six comparators, reusing partial results of its neighbours:
//   AB     = max(A(i,j), pixel of (i-1,j))          -> sent right as c
//   ABC    = max(AB, c from (i,j-1))                -> sent down as d1
//   ABCD   = max(ABC, ABC of (i-2,j))               -> sent right as e1
//   ABCDE  = max(ABCD, ABCD of (i,j-2))             -> sent down as f1
//   ABCDEF = max(ABCDE, ABCDE of (i-4,j))           -> sent right as g1
//   out    = max(ABCDEF, ABCDEF of (i,j-4))
// The other bus members are passed on one step (d1->d2, f1->f2->f3->f4,
// e1->e2, g1->g2->g3->g4) and the pixel itself goes down as b.
// With projection along j, one PE evaluates all nodes of one row, one per
// clock: the right-going bus loops back into the PE through a register (the
// next column), and the down-going bus leaves through a register to the PE
// of the next row. That is fourteen 8-bit registers and six comparators.
//
// Interface: pix_i is A(i,j); vin_i the registered bus from the PE above
// (values of row i-1 for the same column j); vout_o the registered bus for the
// PE below, valid one accepted cycle later; out_o the 8x8 result for (i, j),
// combinational. first_i marks column 0 of a row: the looped-back bus is then
// replaced by zeros, which is the left border of the dependence graph and the
// identity of MAX. en_i stalls both registers.
// Node contents and the fourteen registers follow the document; first_i, the
// reset and the stall input are this design's choices.
module prr_sys_pe
  import prr_pkg::*;
(
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             en_i,
  input  logic             first_i,
  input  logic [PIX_W-1:0] pix_i,
  input  sys_vbus_t        vin_i,
  output sys_vbus_t        vout_o,
  output logic [PIX_W-1:0] out_o
);

  sys_hbus_t hloop_q, hin, hout;
  sys_vbus_t vout_d;
  logic [PIX_W-1:0] ab, abc, abcd, abcde, abcdef;

  assign hin = first_i ? '0 : hloop_q;

  prr_op_unit #(.DW(PIX_W), .OP(OP_MAX), .REG(1'b0)) u_max_ab (
    .clk_i, .rst_ni, .en_i, .a_i(pix_i), .b_i(vin_i.b), .y_o(ab));
  prr_op_unit #(.DW(PIX_W), .OP(OP_MAX), .REG(1'b0)) u_max_abc (
    .clk_i, .rst_ni, .en_i, .a_i(ab), .b_i(hin.c), .y_o(abc));
  prr_op_unit #(.DW(PIX_W), .OP(OP_MAX), .REG(1'b0)) u_max_abcd (
    .clk_i, .rst_ni, .en_i, .a_i(abc), .b_i(vin_i.d2), .y_o(abcd));
  prr_op_unit #(.DW(PIX_W), .OP(OP_MAX), .REG(1'b0)) u_max_abcde (
    .clk_i, .rst_ni, .en_i, .a_i(abcd), .b_i(hin.e2), .y_o(abcde));
  prr_op_unit #(.DW(PIX_W), .OP(OP_MAX), .REG(1'b0)) u_max_abcdef (
    .clk_i, .rst_ni, .en_i, .a_i(abcde), .b_i(vin_i.f4), .y_o(abcdef));
  prr_op_unit #(.DW(PIX_W), .OP(OP_MAX), .REG(1'b0)) u_max_out (
    .clk_i, .rst_ni, .en_i, .a_i(abcdef), .b_i(hin.g4), .y_o(out_o));

  always_comb begin
    hout.c  = ab;
    hout.e1 = abcd;
    hout.e2 = hin.e1;
    hout.g1 = abcdef;
    hout.g2 = hin.g1;
    hout.g3 = hin.g2;
    hout.g4 = hin.g3;
    vout_d.b  = pix_i;
    vout_d.d1 = abc;
    vout_d.d2 = vin_i.d1;
    vout_d.f1 = abcde;
    vout_d.f2 = vin_i.f1;
    vout_d.f3 = vin_i.f2;
    vout_d.f4 = vin_i.f3;
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      hloop_q <= '0;
      vout_o  <= '0;
    end else if (en_i) begin
      hloop_q <= hout;
      vout_o  <= vout_d;
    end
  end

endmodule
