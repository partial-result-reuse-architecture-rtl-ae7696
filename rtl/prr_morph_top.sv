// Partial-result-reuse (PRR) morphology designs, side by side.
//
// Each unit consumes its own raster-scan pixel stream (one 8-bit pixel per
// cycle in which *_valid_i is high, rows of W pixels one after another) and
// produces one result per input pixel:
//   chip_*   flat dilation with a diameter-5 disk, fully pipelined: the
//            datapath of the prototype chip (six MAX cells, 6-cycle latency)
//   avg_*    moving average over the same disk (adders, divide by 13)
//   pmed_*   pseudomedian over the same disk (opening + closing, halved)
//   line8_*  dilation with a 1x8 line        (3 cells, delays 1, 2, 4)
//   line7_*  dilation with a 1x7 line        (3 cells, delays 1, 2, 3)
//   sq8_*    dilation with an 8x8 square     (6 cells, delays W,1,2W,2,4W,4)
//   diag8_*  dilation with an 8-point diagonal line (3 cells, W+1,2W+2,4W+4)
//   se8_*    dilation with the ten-point arbitrary element (5 cells)
//   sys_*    dilation with an 8x8 square on the folded systolic PRR array:
//            SYS_P PEs, SYS_P rows per pass entered side by side (lane k
//            one cycle behind lane k-1), sys_sof_i at the start of a frame
// Only chip_* and sys_* hold registers on the data path; the others are
// combinational from input to output, as drawn in the document. the others are combinational from input to
// output, as drawn in the document. Windows are anchored as described in each
// unit's header. The caller pads frames at the borders (0 for dilation) so
// that windows never need pixels from outside the frame, and cuts the padding
// off the result.
// W is the padded frame width; 94 is the 90-pixel tile of the prototype chip
// plus two padding pixels on each side. Giving every unit its own ports is a
// choice of this design; the units themselves follow the document.
module prr_morph_top
  import prr_pkg::*;
#(
  parameter int unsigned W     = 94,
  parameter int unsigned SYS_P = 4,
  localparam int unsigned DW   = PIX_W
) (
  input  logic            clk_i,
  input  logic            rst_ni,

  input  logic            chip_valid_i,
  input  logic [DW-1:0]   chip_pix_i,
  output logic            chip_valid_o,
  output logic [DW-1:0]   chip_pix_o,

  input  logic            avg_valid_i,
  input  logic [DW-1:0]   avg_pix_i,
  output logic            avg_valid_o,
  output logic [DW+4:0]   avg_o,

  input  logic            pmed_valid_i,
  input  logic [DW-1:0]   pmed_pix_i,
  output logic            pmed_valid_o,
  output logic [DW-1:0]   pmed_pix_o,

  input  logic            line8_valid_i,
  input  logic [DW-1:0]   line8_pix_i,
  output logic            line8_valid_o,
  output logic [DW-1:0]   line8_pix_o,

  input  logic            line7_valid_i,
  input  logic [DW-1:0]   line7_pix_i,
  output logic            line7_valid_o,
  output logic [DW-1:0]   line7_pix_o,

  input  logic            sq8_valid_i,
  input  logic [DW-1:0]   sq8_pix_i,
  output logic            sq8_valid_o,
  output logic [DW-1:0]   sq8_pix_o,

  input  logic            diag8_valid_i,
  input  logic [DW-1:0]   diag8_pix_i,
  output logic            diag8_valid_o,
  output logic [DW-1:0]   diag8_pix_o,

  input  logic            se8_valid_i,
  input  logic [DW-1:0]   se8_pix_i,
  output logic            se8_valid_o,
  output logic [DW-1:0]   se8_pix_o,

  input  logic            sys_valid_i,
  input  logic            sys_sof_i,
  input  logic [DW-1:0]   sys_pix_i [SYS_P],
  output logic [DW-1:0]   sys_out_o [SYS_P]
);

  prr_disk5 #(.W(W), .DW(DW), .OP(OP_MAX), .PIPE(1'b1)) u_chip (
    .clk_i, .rst_ni, .valid_i(chip_valid_i), .pix_i(chip_pix_i),
    .valid_o(chip_valid_o), .pix_o(chip_pix_o));

  prr_moving_avg #(.W(W), .DW(DW), .DIVISOR(13)) u_avg (
    .clk_i, .rst_ni, .valid_i(avg_valid_i), .pix_i(avg_pix_i),
    .valid_o(avg_valid_o), .avg_o(avg_o));

  prr_pseudomedian #(.W(W), .DW(DW), .PIPE(1'b0)) u_pmed (
    .clk_i, .rst_ni, .valid_i(pmed_valid_i), .pix_i(pmed_pix_i),
    .valid_o(pmed_valid_o), .pix_o(pmed_pix_o));

  prr_chain #(.DW(DW), .OP(OP_MAX), .N(3), .DELAYS('{1, 2, 4, 0, 0, 0, 0, 0})) u_line8 (
    .clk_i, .rst_ni, .valid_i(line8_valid_i), .pix_i(line8_pix_i),
    .valid_o(line8_valid_o), .pix_o(line8_pix_o));

  prr_chain #(.DW(DW), .OP(OP_MAX), .N(3), .DELAYS('{1, 2, 3, 0, 0, 0, 0, 0})) u_line7 (
    .clk_i, .rst_ni, .valid_i(line7_valid_i), .pix_i(line7_pix_i),
    .valid_o(line7_valid_o), .pix_o(line7_pix_o));

  prr_chain #(.DW(DW), .OP(OP_MAX), .N(6),
              .DELAYS('{W, 1, 2 * W, 2, 4 * W, 4, 0, 0})) u_sq8 (
    .clk_i, .rst_ni, .valid_i(sq8_valid_i), .pix_i(sq8_pix_i),
    .valid_o(sq8_valid_o), .pix_o(sq8_pix_o));

  prr_chain #(.DW(DW), .OP(OP_MAX), .N(3),
              .DELAYS('{W + 1, 2 * W + 2, 4 * W + 4, 0, 0, 0, 0, 0})) u_diag8 (
    .clk_i, .rst_ni, .valid_i(diag8_valid_i), .pix_i(diag8_pix_i),
    .valid_o(diag8_valid_o), .pix_o(diag8_pix_o));

  prr_se_arb10 #(.W(W), .DW(DW), .OP(OP_MAX)) u_se8 (
    .clk_i, .rst_ni, .valid_i(se8_valid_i), .pix_i(se8_pix_i),
    .valid_o(se8_valid_o), .pix_o(se8_pix_o));

  prr_sys_array #(.W(W), .P(SYS_P)) u_sys (
    .clk_i, .rst_ni, .valid_i(sys_valid_i), .sof_i(sys_sof_i),
    .pix_i(sys_pix_i), .out_o(sys_out_o));

endmodule
