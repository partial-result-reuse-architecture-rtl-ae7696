// Self-checking testbench for prr_chain, the duplicate-and-shift PRR chain.
// One random W x H frame, streamed in raster order with random stalls, feeds
// six chains:
//   1x8 line (delays 1,2,4), 1x7 line (1,2,3), 8x8 square (W,1,2W,2,4W,4),
//   8-point diagonal (W+1,2W+2,4W+4), all combinational MAX, and
//   a 1x8 line as a pipelined MIN chain.
// The remaining chain, delays W,1,2W,2,3W,3, is the 7x7 square of the hardware
// comparison table (overlapping copies, as for the 1x7 line).
// The reference is the flat structuring element itself, anchored at its
// latest pixel (x, y) in raster order: line pixels (x-i, y), square pixels
// (x-i, y-j) for i, j below 8 (or 7), diagonal pixels (x-i, y-i). For the pipelined chain the k-th
// valid output belongs to pixel k-2 (three register stages). Each window
// that lies fully inside the frame is checked, and the number of checks per
// chain is verified.
module tb_prr_chain;
  import prr_pkg::*;

  localparam int W = 12;
  localparam int H = 12;
  localparam int N = W * H + 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid = 1'b0;
  logic [7:0] pix = '0;
  logic v8, v7, vsq, vdg, vp, vs7;
  logic [7:0] y8, y7, ysq, ydg, yp, ys7;
  int img [N];
  int checks = 0, failures = 0;
  int acc = 0, nout_p = 0, stalls = 0;
  int n8 = 0, n7 = 0, nsq = 0, ndg = 0, np = 0, ns7 = 0;

  prr_chain #(.DW(8), .OP(OP_MAX), .PIPE(1'b0), .N(3),
              .DELAYS('{1, 2, 4, 0, 0, 0, 0, 0})) u_line8 (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .pix_i(pix), .valid_o(v8), .pix_o(y8));
  prr_chain #(.DW(8), .OP(OP_MAX), .PIPE(1'b0), .N(3),
              .DELAYS('{1, 2, 3, 0, 0, 0, 0, 0})) u_line7 (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .pix_i(pix), .valid_o(v7), .pix_o(y7));
  prr_chain #(.DW(8), .OP(OP_MAX), .PIPE(1'b0), .N(6),
              .DELAYS('{W, 1, 2 * W, 2, 4 * W, 4, 0, 0})) u_sq8 (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .pix_i(pix), .valid_o(vsq), .pix_o(ysq));
  prr_chain #(.DW(8), .OP(OP_MAX), .PIPE(1'b0), .N(3),
              .DELAYS('{W + 1, 2 * W + 2, 4 * W + 4, 0, 0, 0, 0, 0})) u_diag8 (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .pix_i(pix), .valid_o(vdg), .pix_o(ydg));
  prr_chain #(.DW(8), .OP(OP_MAX), .PIPE(1'b0), .N(6),
              .DELAYS('{W, 1, 2 * W, 2, 3 * W, 3, 0, 0})) u_sq7 (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .pix_i(pix), .valid_o(vs7), .pix_o(ys7));
  prr_chain #(.DW(8), .OP(OP_MIN), .PIPE(1'b1), .N(3),
              .DELAYS('{1, 2, 4, 0, 0, 0, 0, 0})) u_line8_pipe (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .pix_i(pix), .valid_o(vp), .pix_o(yp));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int px(int x, int y); return img[y * W + x]; endfunction

  // kind 0: 1xL line, 1: 8x8 square, 2: 8-point diagonal. Returns -1 when
  // the window leaves the frame.
  function automatic int ref_win(int n, int kind, int len, bit is_max);
    int x = n % W, y = n / W;
    int r = is_max ? 0 : 255;
    int v;
    if (n < 0 || n >= W * H) return -1;
    case (kind)
      0: if (x - (len - 1) < 0) return -1;
      1: if (x < len - 1 || y < len - 1) return -1;
      default: if (x < 7 || y < 7) return -1;
    endcase
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++) begin
        bit in_se;
        case (kind)
          0: in_se = (j == 0) && (i < len);
          1: in_se = (i < len) && (j < len);
          default: in_se = (i == j);
        endcase
        if (in_se) begin
          v = px(x - i, y - j);
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
    int e;
    for (int i = 0; i < N; i++) img[i] = $urandom_range(0, 255);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (acc < N) begin
      @(negedge clk);
      if (vp) begin
        e = ref_win(nout_p - 2, 0, 8, 1'b0);
        if (e >= 0) begin check("line8 pipelined min", int'(yp), e); np++; end
        nout_p++;
      end
      if (acc < N && $urandom_range(0, 4) != 0) begin
        valid = 1'b1;
        pix = 8'(img[acc]);
      end else begin
        valid = 1'b0;
        stalls++;
      end
      #1;
      if (valid) begin
        e = ref_win(acc, 0, 8, 1'b1);
        if (e >= 0) begin check("line8", int'(y8), e); n8++; end
        e = ref_win(acc, 0, 7, 1'b1);
        if (e >= 0) begin check("line7", int'(y7), e); n7++; end
        e = ref_win(acc, 1, 8, 1'b1);
        if (e >= 0) begin check("square8", int'(ysq), e); nsq++; end
        e = ref_win(acc, 1, 7, 1'b1);
        if (e >= 0) begin check("square7", int'(ys7), e); ns7++; end
        e = ref_win(acc, 2, 8, 1'b1);
        if (e >= 0) begin check("diag8", int'(ydg), e); ndg++; end
      end
    end
    @(negedge clk);
    valid = 1'b0;
    check("line8 windows", n8, (W - 7) * H);
    check("line7 windows", n7, (W - 6) * H);
    check("square windows", nsq, (W - 7) * (H - 7));
    check("diagonal windows", ndg, (W - 7) * (H - 7));
    check("square7 windows", ns7, (W - 6) * (H - 6));
    check("pipelined line windows", np, (W - 7) * H);
    if (stalls == 0) begin failures++; $display("FAIL no stall happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
