// Pseudomedian filter over the diameter-5 disk window.
//
// PMED = (opening + closing) / 2, where the opening is an erosion followed by
// a dilation and the closing a dilation followed by an erosion, all with the
// same flat disk. Four disk PRR datapaths (prr_disk5) are used: MIN then MAX
// on one path, MAX then MIN on the other. The two results are added (one
// extra bit) and halved with a right shift.
//
// Interface: raster-scan pix_i/valid_i in, pix_o/valid_o out. With PIPE = 0
// (as drawn) everything is combinational and the result belongs to the
// compound window whose lowest pixel is the current input: its centre lies
// four rows above. With PIPE = 1 every cell is registered and the latency is
// 12 accepted pixels (6 per disk stage); the two paths have equal latency so
// they stay aligned. valid_i stalls all delay lines. Input rows must be padded
// by four pixels on every side for border pixels to be meaningful.
// The structure follows the document; halving follows its equation, and the
// PIPE = 1 option is this design's.
module prr_pseudomedian
  import prr_pkg::*;
#(
  parameter int unsigned W    = 94,
  parameter int unsigned DW   = 8,
  parameter bit          PIPE = 1'b0
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          valid_i,
  input  logic [DW-1:0] pix_i,
  output logic          valid_o,
  output logic [DW-1:0] pix_o
);

  logic [DW-1:0] ero, opn, dil, cls;
  logic          v_ero, v_opn, v_dil, v_cls;
  logic [DW:0]   sum;

  prr_disk5 #(.W(W), .DW(DW), .OP(OP_MIN), .PIPE(PIPE)) u_open_ero (
    .clk_i, .rst_ni, .valid_i, .pix_i, .valid_o(v_ero), .pix_o(ero));
  prr_disk5 #(.W(W), .DW(DW), .OP(OP_MAX), .PIPE(PIPE)) u_open_dil (
    .clk_i, .rst_ni, .valid_i(v_ero), .pix_i(ero), .valid_o(v_opn), .pix_o(opn));
  prr_disk5 #(.W(W), .DW(DW), .OP(OP_MAX), .PIPE(PIPE)) u_close_dil (
    .clk_i, .rst_ni, .valid_i, .pix_i, .valid_o(v_dil), .pix_o(dil));
  prr_disk5 #(.W(W), .DW(DW), .OP(OP_MIN), .PIPE(PIPE)) u_close_ero (
    .clk_i, .rst_ni, .valid_i(v_dil), .pix_i(dil), .valid_o(v_cls), .pix_o(cls));

  assign sum     = {1'b0, opn} + {1'b0, cls};
  assign pix_o   = sum[DW:1];
  assign valid_o = v_opn & v_cls;

endmodule
