// Self-checking testbench for prr_disk5, the diameter-5 disk PRR datapath.
// A random W x H frame is streamed in raster order with random stall cycles,
// followed by one extra row that flushes the pipeline. Two instances run in
// parallel: the fully pipelined dilation datapath (MAX, PIPE = 1) and the
// combinational erosion datapath (MIN, PIPE = 0).
// The reference works on the 2-D frame: the result centred at (cx, cy) is the
// max (min) over all pixels with |dx| + |dy| <= 2. The k-th valid output of
// the pipelined unit must be the disk centred two rows above pixel k-5 (six
// register stages, one result per accepted pixel); the combinational unit's
// output is the disk centred two rows above the current pixel. Every centre at
// least two pixels away from the frame edges is checked, and the number of
// such checks is verified, which also checks that the rate is one pixel per
// accepted cycle.
module tb_prr_disk5;
  import prr_pkg::*;

  localparam int W = 12;
  localparam int H = 10;
  localparam int N = W * (H + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid = 1'b0;
  logic [7:0] pix = '0;
  logic v_p, v_c;
  logic [7:0] y_p, y_c;
  int img [N];
  int checks = 0, failures = 0;
  int acc = 0, nout_p = 0, ncheck_p = 0, ncheck_c = 0, stalls = 0;

  prr_disk5 #(.W(W), .DW(8), .OP(OP_MAX), .PIPE(1'b1)) u_pipe (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .pix_i(pix), .valid_o(v_p), .pix_o(y_p));
  prr_disk5 #(.W(W), .DW(8), .OP(OP_MIN), .PIPE(1'b0)) u_comb (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .pix_i(pix), .valid_o(v_c), .pix_o(y_c));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Reference: flat disk of diameter 5 centred at (cx, cy).
  function automatic int disk_ref(int cx, int cy, bit is_max);
    int r = is_max ? 0 : 255;
    for (int dy = -2; dy <= 2; dy++)
      for (int dx = -2; dx <= 2; dx++)
        if ((dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy) <= 2) begin
          int v = img[(cy + dy) * W + (cx + dx)];
          if (is_max ? (v > r) : (v < r)) r = v;
        end
    return r;
  endfunction

  function automatic bit interior(int c);
    int cx = c % W, cy = c / W;
    return c >= 0 && cx >= 2 && cx <= W - 3 && cy >= 2 && cy <= H - 3;
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
    int c;
    for (int i = 0; i < N; i++) img[i] = $urandom_range(0, 255);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (acc < N) begin
      @(negedge clk);
      // pipelined unit: registered output of the last accepted pixel
      if (v_p) begin
        c = nout_p - 5 - 2 * W;
        if (interior(c)) begin
          check("dilate", int'(y_p), disk_ref(c % W, c / W, 1'b1));
          ncheck_p++;
        end
        nout_p++;
      end
      // drive the next pixel (or a stall)
      if (acc < N && $urandom_range(0, 4) != 0) begin
        valid = 1'b1;
        pix = 8'(img[acc]);
      end else begin
        valid = 1'b0;
        stalls++;
      end
      #1;
      if (v_c) begin
        c = acc - 2 * W;
        if (interior(c)) begin
          check("erode", int'(y_c), disk_ref(c % W, c / W, 1'b0));
          ncheck_c++;
        end
      end
    end
    @(negedge clk);
    valid = 1'b0;
    check("pipelined windows checked", ncheck_p, (W - 4) * (H - 4));
    check("combinational windows checked", ncheck_c, (W - 4) * (H - 4));
    check("one output per accepted pixel", nout_p, N);
    if (stalls == 0) begin failures++; $display("FAIL no stall happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
