// Self-checking testbench for prr_se_arb10, the PRR datapath of the ten-point
// arbitrary structuring element.
// A random W x H frame is streamed with random stalls through a MAX and a MIN
// instance. The reference takes the element as drawn, relative to its latest
// pixel (x, y): (x, y), (x-2..x+1, y-1), (x-2..x+1, y-2) and (x-1, y-3).
// Every window fully inside the frame is checked against the combinational
// outputs, and the number of such windows is verified.
module tb_prr_se_arb10;
  import prr_pkg::*;

  localparam int W = 10;
  localparam int H = 9;
  localparam int N = W * H;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid = 1'b0;
  logic [7:0] pix = '0;
  logic v_mx, v_mn;
  logic [7:0] y_mx, y_mn;
  int img [N];
  int checks = 0, failures = 0;
  int acc = 0, nwin = 0, stalls = 0;

  prr_se_arb10 #(.W(W), .DW(8), .OP(OP_MAX)) u_max (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .pix_i(pix), .valid_o(v_mx), .pix_o(y_mx));
  prr_se_arb10 #(.W(W), .DW(8), .OP(OP_MIN)) u_min (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .pix_i(pix), .valid_o(v_mn), .pix_o(y_mn));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int se_ref(int x, int y, bit is_max);
    int r = is_max ? 0 : 255;
    int v;
    for (int dy = -3; dy <= 0; dy++)
      for (int dx = -2; dx <= 1; dx++) begin
        bit in_se = (dy == 0 && dx == 0) || (dy == -1) || (dy == -2) ||
                    (dy == -3 && dx == -1);
        if (in_se) begin
          v = img[(y + dy) * W + (x + dx)];
          if (is_max ? (v > r) : (v < r)) r = v;
        end
      end
    return r;
  endfunction

  always @(posedge clk) if (valid) acc <= acc + 1;

  initial begin : watchdog
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y;
    for (int i = 0; i < N; i++) img[i] = $urandom_range(0, 255);
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
      x = acc % W;
      y = acc / W;
      if (valid && v_mx && v_mn && x >= 2 && x <= W - 2 && y >= 3) begin
        check("max", int'(y_mx), se_ref(x, y, 1'b1));
        check("min", int'(y_mn), se_ref(x, y, 1'b0));
        nwin++;
      end
    end
    @(negedge clk);
    valid = 1'b0;
    check("windows checked", nwin, (W - 3) * (H - 3));
    if (stalls == 0) begin failures++; $display("FAIL no stall happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
