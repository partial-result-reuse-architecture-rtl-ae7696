// Folded systolic PRR array for flat dilation with the 8x8 square element.
//
// The unfolded systolic array has one PE (prr_sys_pe) per frame row; folding
// keeps P PEs in a ring. PE k works on rows k, P+k, 2P+k, ... one pixel per
// clock. The registered bus leaving the last PE goes through a delay line of
// W-P elements back to the first PE, so that row P*(p+1) meets the partial
// results of row P*p+P-1 for the same column. A switch in front of the first
// PE feeds zeros instead of the loop during the first row pass (the top
// border of the frame). With P = 1 the array degenerates to a raster-scan PRR
// datapath.
//
// Timing (accepted cycles t counted from the cycle with sof_i high, t = 0):
// lane k must carry pixel (row P*p + k, column j) at t = p*W + k + j, i.e. the
// P rows of one pass enter side by side, each lane one cycle behind the one
// before it. out_o[k] in that same cycle is the max over the 8x8 block whose
// bottom-right pixel is that pixel, pixels outside the frame counting as 0.
// Lane k sees its first column marker k cycles after lane 0. valid_i stalls
// the whole array. A frame has a multiple of P rows; sof_i restarts the
// row/pass bookkeeping. W >= P + 1 is required.
// The PE ring, the (W-P) feedback delay, the zero input of the first pass and
// P = 4 follow the document; sof_i, the column counter that makes the row
// markers, the valid handshake and the default W = 94 are this design's.
module prr_sys_array
  import prr_pkg::*;
#(
  parameter int unsigned W = 94,
  parameter int unsigned P = 4
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             valid_i,
  input  logic             sof_i,
  input  logic [PIX_W-1:0] pix_i [P],
  output logic [PIX_W-1:0] out_o [P]
);

  localparam int unsigned CW = $clog2(W + 1);

  if (W < P + 1) begin : g_bad_w
    $error("prr_sys_array: W must exceed P");
  end

  // column of lane 0 and first-pass flag
  logic [CW-1:0] col_q;
  logic          pass0_q;
  logic [CW-1:0] col;
  logic          pass0;
  logic [P-1:0]  first_q;   // first_q[k-1] = column marker for lane k;
                            // the last bit is only used when P grows
  logic [P-1:0]  first;

  assign col   = sof_i ? '0   : col_q;
  assign pass0 = sof_i ? 1'b1 : pass0_q;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      col_q   <= '0;
      pass0_q <= 1'b1;
      first_q <= '0;
    end else if (valid_i) begin
      if (col == CW'(W - 1)) begin
        col_q   <= '0;
        pass0_q <= 1'b0;
      end else begin
        col_q   <= col + 1'b1;
        pass0_q <= pass0;
      end
      first_q[0] <= first[0];
      for (int unsigned k = 1; k < P; k++) first_q[k] <= first_q[k-1];
    end
  end

  // lane 0 starts a row when its column is 0; lane k follows k cycles later
  assign first[0] = (col == '0);
  for (genvar k = 1; k < P; k++) begin : g_first
    assign first[k] = first_q[k-1];
  end

  sys_vbus_t vbus [P+1];
  sys_vbus_t loop_q;

  prr_delay_line #(.DW($bits(sys_vbus_t)), .LEN(W - P)) u_feedback (
    .clk_i, .en_i(valid_i), .d_i(vbus[P]), .q_o(loop_q));

  assign vbus[0] = pass0 ? '0 : loop_q;

  for (genvar k = 0; k < P; k++) begin : g_pe
    prr_sys_pe u_pe (
      .clk_i, .rst_ni, .en_i(valid_i), .first_i(first[k]),
      .pix_i(pix_i[k]), .vin_i(vbus[k]), .vout_o(vbus[k+1]), .out_o(out_o[k]));
  end

endmodule
