// Self-checking testbench for prr_sys_array, the folded systolic PRR array.
// Two random frames of W x H pixels are streamed back to back (sof_i at the
// start of each) into a 4-PE ring and into a 1-PE ring, with random stall
// cycles. Lane k of a P-PE ring carries pixel (P*p + k, j) at accepted cycle
// p*W + k + j of the frame. Every output of every lane is compared with the
// max over the 8x8 block ending at that pixel, pixels outside the frame
// ignored; so the zero borders at the top and left of the frame are checked
// too, and the number of checked pixels per ring is verified.
module tb_prr_sys_array;
  import prr_pkg::*;

  localparam int W = 12;
  localparam int H = 12;
  localparam int P = 4;
  localparam int FRAMES = 2;
  localparam int T4 = (H / P) * W + P - 1;   // cycles per frame, 4-PE ring
  localparam int T1 = H * W;                 // cycles per frame, 1-PE ring

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid = 1'b0;
  logic sof4 = 1'b0, sof1 = 1'b0;
  logic [7:0] in4 [P];
  logic [7:0] out4 [P];
  logic [7:0] in1 [1];
  logic [7:0] out1 [1];
  int img [FRAMES][H * W];
  int checks = 0, failures = 0;
  int n4 = 0, n1 = 0, stalls = 0, n_border = 0;

  prr_sys_array #(.W(W), .P(P)) u_ring4 (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .sof_i(sof4), .pix_i(in4), .out_o(out4));
  prr_sys_array #(.W(W), .P(1)) u_ring1 (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .sof_i(sof1), .pix_i(in1), .out_o(out1));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int blk8(int f, int i, int j);
    int r = 0;
    for (int y = i - 7; y <= i; y++)
      for (int x = j - 7; x <= j; x++)
        if (y >= 0 && x >= 0 && img[f][y * W + x] > r) r = img[f][y * W + x];
    return r;
  endfunction

  initial begin : watchdog
    repeat (40 * FRAMES * T1) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q, row, j;
    int t4, t1, f4, f1;
    for (int f = 0; f < FRAMES; f++)
      for (int i = 0; i < H * W; i++) img[f][i] = $urandom_range(0, 255);
    for (int k = 0; k < P; k++) in4[k] = '0;
    in1[0] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    t4 = 0; f4 = 0; t1 = 0; f1 = 0;
    // both rings see the same valid; each keeps its own frame position
    while (f4 < FRAMES || f1 < FRAMES) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        valid = 1'b0;
        stalls++;
        continue;
      end
      valid = 1'b1;
      sof4 = (t4 == 0) && (f4 < FRAMES);
      sof1 = (t1 == 0) && (f1 < FRAMES);
      for (int k = 0; k < P; k++) begin
        q = t4 - k;
        in4[k] = (f4 < FRAMES && q >= 0 && q < (H / P) * W) ?
                 8'(img[f4][(P * (q / W) + k) * W + q % W]) : 8'd0;
      end
      in1[0] = (f1 < FRAMES && t1 < T1) ? 8'(img[f1][t1]) : 8'd0;
      #1;
      for (int k = 0; k < P; k++) begin
        q = t4 - k;
        if (f4 < FRAMES && q >= 0 && q < (H / P) * W) begin
          row = P * (q / W) + k;
          j = q % W;
          check("ring4", int'(out4[k]), blk8(f4, row, j));
          n4++;
          if (row < 7 || j < 7) n_border++;
        end
      end
      if (f1 < FRAMES && t1 < T1) begin
        check("ring1", int'(out1[0]), blk8(f1, t1 / W, t1 % W));
        n1++;
      end
      if (f4 < FRAMES) begin t4++; if (t4 == T4) begin t4 = 0; f4++; end end
      if (f1 < FRAMES) begin t1++; if (t1 == T1) begin t1 = 0; f1++; end end
    end
    @(negedge clk);
    valid = 1'b0;
    check("ring4 pixels", n4, FRAMES * H * W);
    check("ring1 pixels", n1, FRAMES * H * W);
    if (stalls == 0 || n_border == 0) begin failures++; $display("FAIL stall or border missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
