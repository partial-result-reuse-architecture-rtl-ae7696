// PRR datapath for a flat disk of diameter 5 on a raster-scan pixel stream.
//
// This is the datapath of the prototype chip: the six-cell processing element
// (prr_pe) plus the delay lines that produce its taps. The stream is a frame
// of width W (94 for a 90-pixel tile with two pixels of padding on each side)
// entering one pixel per accepted cycle, row after row. A delay of W pixels is
// one row, so the taps are
//   PIPE = 1 (fully pipelined):  A, B = A-(W-1), C = B-2, D = C-2, E = D-W,
//                                F = ABCDE-(W-1), G = ABCDEF-(W+1)
//   PIPE = 0 (combinational):    A, B = A-(W-1), C = B-1, D = C-1, E = D-(W-1),
//                                F = ABCDE-(W-1), G = ABCDEF-(W+1)
// In the pipelined form each tap after B is one pixel later than in the plain
// form, which compensates the register behind the preceding cell.
//
// Result: with PIPE = 1, the value on y_o after the edge that accepted pixel n
// is OP over the 13-pixel disk whose lowest pixel (the one latest in raster
// order) is pixel n-5, i.e. whose centre is pixel n-5-2W. valid_o is high when
// y_o was updated by the last edge. With PIPE = 0, y_o is combinational and
// covers the disk whose lowest pixel is the current input; valid_o = valid_i.
// Windows that straddle the left/right frame edge wrap into the neighbouring
// row, so the caller pads the frame (0 for dilation, 255 for erosion) and
// keeps only the interior, as the architecture prescribes.
//
// The taps, the cell order and the default W follow the document. The clock
// enable (valid_i stalls the whole datapath) and the valid output are this
// design's choices.
module prr_disk5
  import prr_pkg::*;
#(
  parameter int unsigned W    = 94,
  parameter int unsigned DW   = 8,
  parameter prr_op_e     OP   = OP_MAX,
  parameter bit          PIPE = 1'b1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          valid_i,
  input  logic [DW-1:0] pix_i,
  output logic          valid_o,
  output logic [DW-1:0] pix_o
);

  localparam int unsigned D_B = W - 1;
  localparam int unsigned D_C = PIPE ? 2 : 1;
  localparam int unsigned D_D = PIPE ? 2 : 1;
  localparam int unsigned D_E = PIPE ? W : W - 1;
  localparam int unsigned D_F = W - 1;
  localparam int unsigned D_G = W + 1;

  logic [DW-1:0] tap_b, tap_c, tap_d, tap_e, tap_f, tap_g;
  logic [DW-1:0] abcde, abcdef;

  prr_delay_line #(.DW(DW), .LEN(D_B)) u_dl_b (
    .clk_i, .en_i(valid_i), .d_i(pix_i), .q_o(tap_b));
  prr_delay_line #(.DW(DW), .LEN(D_C)) u_dl_c (
    .clk_i, .en_i(valid_i), .d_i(tap_b), .q_o(tap_c));
  prr_delay_line #(.DW(DW), .LEN(D_D)) u_dl_d (
    .clk_i, .en_i(valid_i), .d_i(tap_c), .q_o(tap_d));
  prr_delay_line #(.DW(DW), .LEN(D_E)) u_dl_e (
    .clk_i, .en_i(valid_i), .d_i(tap_d), .q_o(tap_e));
  prr_delay_line #(.DW(DW), .LEN(D_F)) u_dl_f (
    .clk_i, .en_i(valid_i), .d_i(abcde), .q_o(tap_f));
  prr_delay_line #(.DW(DW), .LEN(D_G)) u_dl_g (
    .clk_i, .en_i(valid_i), .d_i(abcdef), .q_o(tap_g));

  prr_pe #(.DW(DW), .OP(OP), .PIPE(PIPE)) u_pe (
    .clk_i, .rst_ni, .en_i(valid_i),
    .a_i(pix_i), .b_i(tap_b), .c_i(tap_c), .d_i(tap_d), .e_i(tap_e),
    .f_i(tap_f), .g_i(tap_g),
    .abcde_o(abcde), .abcdef_o(abcdef), .y_o(pix_o));

  if (PIPE) begin : g_valid_reg
    always_ff @(posedge clk_i) begin
      if (!rst_ni) valid_o <= 1'b0;
      else         valid_o <= valid_i;
    end
  end else begin : g_valid_comb
    assign valid_o = valid_i;
  end

endmodule
