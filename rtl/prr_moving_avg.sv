// Moving-average filter over the diameter-5 disk window, built on the PRR
// structure with adders in place of the MAX cells.
//
// The input pixel is widened to SUM_W bits and passed through the disk PRR
// datapath (prr_disk5 with OP_ADD, combinational cells and the unpipelined tap
// delays W-1, 1, 1, W-1, W-1, W+1). The sum is then divided by DIVISOR (13,
// the number of pixels in the disk).
//
// Note on the arithmetic: addition is not idempotent, so the pixels where the
// four shifted copies of the five-point cross overlap are counted more than
// once. The sum is a weighted sum with total weight 20: the centre pixel has
// weight 4, the four diagonal neighbours weight 2, the four direct neighbours
// and the four pixels two steps away weight 1. Dividing by 13 (as specified)
// therefore gives 20/13 of a weighted mean, up to 392 for 8-bit input, and the
// output is SUM_W bits wide so nothing is lost. Set DIVISOR = 20 for a
// normalised weighted mean.
//
// Interface: raster-scan pix_i/valid_i in, avg_o/valid_o out in the same
// cycle (combinational); the window is the disk whose lowest pixel is the
// current input. valid_i stalls the delay lines.
// The adder structure and the divisor follow the document; the widths are
// this design's.
module prr_moving_avg
  import prr_pkg::*;
#(
  parameter int unsigned W       = 94,
  parameter int unsigned DW      = 8,
  parameter int unsigned DIVISOR = 13,
  localparam int unsigned SUM_W  = DW + 5
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             valid_i,
  input  logic [DW-1:0]    pix_i,
  output logic             valid_o,
  output logic [SUM_W-1:0] avg_o
);

  logic [SUM_W-1:0] sum;

  prr_disk5 #(.W(W), .DW(SUM_W), .OP(OP_ADD), .PIPE(1'b0)) u_sum (
    .clk_i, .rst_ni, .valid_i,
    .pix_i(SUM_W'(pix_i)),
    .valid_o, .pix_o(sum));

  assign avg_o = sum / SUM_W'(DIVISOR);

endmodule
