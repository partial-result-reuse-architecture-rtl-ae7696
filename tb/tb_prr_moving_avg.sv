// Self-checking testbench for prr_moving_avg.
// A random W x H frame is streamed with random stalls. The reference builds
// the window weights independently from the decomposition of the disk into
// four five-point crosses centred on the four direct neighbours of the window
// centre: the weight of a pixel is the number of these crosses that contain
// it (4 at the centre, 2 on the diagonals, 1 elsewhere in the disk; 20 in
// all). The expected output is the weighted sum divided by 13, rounded down.
// The output is combinational and belongs to the window centred two rows
// above the current pixel. The weights are also checked to total 20.
module tb_prr_moving_avg;
  import prr_pkg::*;

  localparam int W = 11;
  localparam int H = 9;
  localparam int N = W * H;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid = 1'b0;
  logic [7:0] pix = '0;
  logic v_o;
  logic [12:0] avg;
  int img [N];
  int wgt [5][5];
  int checks = 0, failures = 0;
  int acc = 0, nwin = 0, stalls = 0;

  prr_moving_avg #(.W(W), .DW(8)) dut (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .pix_i(pix), .valid_o(v_o), .avg_o(avg));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  always @(posedge clk) if (valid) acc <= acc + 1;

  initial begin : watchdog
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cx, cy, c, s, total;
    static int nbx [4] = '{1, -1, 0, 0};
    static int nby [4] = '{0, 0, 1, -1};
    total = 0;
    for (int dy = -2; dy <= 2; dy++)
      for (int dx = -2; dx <= 2; dx++) begin
        wgt[dy + 2][dx + 2] = 0;
        for (int k = 0; k < 4; k++)
          if (iabs(dx - nbx[k]) + iabs(dy - nby[k]) <= 1) wgt[dy + 2][dx + 2]++;
        total += wgt[dy + 2][dx + 2];
      end
    check("total weight", total, 20);
    for (int i = 0; i < N; i++) img[i] = $urandom_range(0, 255);
    // three rows of 255 exercise the top of the output range
    for (int i = 0; i < 3 * W; i++) img[i] = 255;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (acc < N) begin
      @(negedge clk);
      if ($urandom_range(0, 4) != 0) begin
        valid = 1'b1;
        pix = 8'(img[acc]);
      end else begin
        valid = 1'b0;
        stalls++;
      end
      #1;
      c = acc - 2 * W;
      cx = c % W;
      cy = c / W;
      if (valid && v_o && c >= 0 && cx >= 2 && cx <= W - 3 && cy >= 2) begin
        s = 0;
        for (int dy = -2; dy <= 2; dy++)
          for (int dx = -2; dx <= 2; dx++)
            s += wgt[dy + 2][dx + 2] * img[(cy + dy) * W + cx + dx];
        check("average", int'(avg), s / 13);
        nwin++;
      end
    end
    @(negedge clk);
    valid = 1'b0;
    check("windows checked", nwin, (W - 4) * (H - 4));
    if (stalls == 0) begin failures++; $display("FAIL no stall happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
