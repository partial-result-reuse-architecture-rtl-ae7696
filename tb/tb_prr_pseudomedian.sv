// Self-checking testbench for prr_pseudomedian.
// A random W x H frame is streamed with random stalls, followed by two flush
// rows, into a combinational instance (as drawn) and a pipelined one.
// The reference computes, on the 2-D frame, erosion and dilation with the
// diameter-5 disk, then the opening (dilation of the erosion) and closing
// (erosion of the dilation), and finally floor((opening + closing) / 2).
// The combinational output belongs to the centre four rows above the current
// pixel; the k-th valid output of the pipelined instance to the centre four
// rows above pixel k-10 (two six-stage datapaths in series). Every centre at
// least four pixels from the frame edges is checked and counted.
module tb_prr_pseudomedian;
  import prr_pkg::*;

  localparam int W = 14;
  localparam int H = 13;
  localparam int N = W * (H + 2);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid = 1'b0;
  logic [7:0] pix = '0;
  logic v_c, v_p;
  logic [7:0] y_c, y_p;
  int img [N];
  int ero [N], dil [N], opn [N], cls [N];
  int checks = 0, failures = 0;
  int acc = 0, nout_p = 0, nc = 0, np = 0, stalls = 0;

  prr_pseudomedian #(.W(W), .DW(8), .PIPE(1'b0)) u_comb (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .pix_i(pix), .valid_o(v_c), .pix_o(y_c));
  prr_pseudomedian #(.W(W), .DW(8), .PIPE(1'b1)) u_pipe (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .pix_i(pix), .valid_o(v_p), .pix_o(y_p));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  // op over the disk centred at (cx, cy) of source array sel (0 img, 1 ero,
  // 2 dil).
  function automatic int disk(int sel, int cx, int cy, bit is_max);
    int r = is_max ? 0 : 255;
    int v;
    for (int dy = -2; dy <= 2; dy++)
      for (int dx = -2; dx <= 2; dx++)
        if (iabs(dx) + iabs(dy) <= 2) begin
          int i = (cy + dy) * W + cx + dx;
          v = (sel == 0) ? img[i] : (sel == 1) ? ero[i] : dil[i];
          if (is_max ? (v > r) : (v < r)) r = v;
        end
    return r;
  endfunction

  function automatic bit inner(int c);
    int cx = c % W, cy = c / W;
    return c >= 0 && cx >= 4 && cx <= W - 5 && cy >= 4 && cy <= H - 5;
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
    for (int i = 0; i < N; i++) begin ero[i] = 0; dil[i] = 0; opn[i] = 0; cls[i] = 0; end
    for (int y = 2; y <= H - 3; y++)
      for (int x = 2; x <= W - 3; x++) begin
        ero[y * W + x] = disk(0, x, y, 1'b0);
        dil[y * W + x] = disk(0, x, y, 1'b1);
      end
    for (int y = 4; y <= H - 5; y++)
      for (int x = 4; x <= W - 5; x++) begin
        opn[y * W + x] = disk(1, x, y, 1'b1);
        cls[y * W + x] = disk(2, x, y, 1'b0);
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (acc < N) begin
      @(negedge clk);
      if (v_p) begin
        c = nout_p - 10 - 4 * W;
        if (inner(c)) begin
          check("pipelined pmed", int'(y_p), (opn[c] + cls[c]) / 2);
          np++;
        end
        nout_p++;
      end
      if ($urandom_range(0, 4) != 0) begin
        valid = 1'b1;
        pix = 8'(img[acc]);
      end else begin
        valid = 1'b0;
        stalls++;
      end
      #1;
      c = acc - 4 * W;
      if (valid && v_c && inner(c)) begin
        check("pmed", int'(y_c), (opn[c] + cls[c]) / 2);
        nc++;
      end
    end
    @(negedge clk);
    valid = 1'b0;
    check("windows checked", nc, (W - 8) * (H - 8));
    check("pipelined windows checked", np, (W - 8) * (H - 8));
    if (stalls == 0) begin failures++; $display("FAIL no stall happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
