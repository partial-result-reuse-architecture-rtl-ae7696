// Workload testbench: one full 720 x 480 (CCIR 601) frame dilated with the
// diameter-5 disk by the default datapath, prr_disk5 with W = 94 and PIPE = 1.
// The frame is cut into eight tiles of 90 columns. Each tile is padded by two
// pixels on every side: a padding pixel that lies inside the frame takes the
// frame's value (so neighbouring tiles overlap), one outside the frame is 0.
// The eight padded tiles of 94 x 484 are streamed back to back with no stall,
// as a host would feed them, followed by a few flush pixels.
// From each tile's results the original 90 x 480 pixels are cut out and put
// back into a result frame. Every result pixel is compared with the dilation
// of the whole frame computed directly (pixels outside the frame count as 0),
// so a correct result shows that tiling plus padding is exact. The testbench
// also checks that every pixel of the result is written exactly once and that
// the last one appears after 8 x 94 x 484 = 363,968 frame pixels plus the
// pipeline latency, i.e. one pixel per clock: at 200 MHz that is about 550
// frames per second.
module tb_prr_ccir601_frame;
  import prr_pkg::*;

  localparam int FW = 720;             // frame width
  localparam int FH = 480;             // frame height
  localparam int TW = 90;              // tile width before padding
  localparam int NT = FW / TW;         // number of tiles
  localparam int W = TW + 4;           // padded tile width, the datapath's W
  localparam int TH = FH + 4;          // padded tile height
  localparam int NS = NT * W * TH;     // pixels streamed per frame
  localparam int FLUSH = 8;            // extra pixels that drain the pipeline

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid = 1'b0;
  logic [7:0] pix = '0;
  logic v_o;
  logic [7:0] y_o;

  byte unsigned frame [FH][FW];
  bit           written [FH][FW];
  int checks = 0, failures = 0;
  int acc = 0, nout = 0, nwritten = 0, last_at = -1;

  prr_disk5 u_dut (
    .clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .pix_i(pix), .valid_o(v_o), .pix_o(y_o));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Pixel (tx, ty) of padded tile t, as the host would build it.
  function automatic int tile_pix(int t, int tx, int ty);
    int fx = t * TW + tx - 2;
    int fy = ty - 2;
    if (fx < 0 || fx >= FW || fy < 0 || fy >= FH) return 0;
    return int'(frame[fy][fx]);
  endfunction

  // Pixel k of the stream (the flush pixels after the last tile are 0).
  function automatic int stream_pix(int k);
    int t, r;
    if (k >= NS) return 0;
    t = k / (W * TH);
    r = k % (W * TH);
    return tile_pix(t, r % W, r / W);
  endfunction

  // Dilation of the whole frame with the diameter-5 disk, zero outside.
  function automatic int frame_ref(int x, int y);
    int m = 0;
    for (int dy = -2; dy <= 2; dy++)
      for (int dx = -2; dx <= 2; dx++)
        if ((dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy) <= 2 &&
            x + dx >= 0 && x + dx < FW && y + dy >= 0 && y + dy < FH &&
            int'(frame[y + dy][x + dx]) > m)
          m = int'(frame[y + dy][x + dx]);
    return m;
  endfunction

  always @(posedge clk) if (valid) acc <= acc + 1;

  initial begin : watchdog
    repeat (2 * NS) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, t, r, cx, cy, fx, fy;
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        frame[y][x] = 8'($urandom_range(0, 255));
        written[y][x] = 1'b0;
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (acc < NS + FLUSH) begin
      @(negedge clk);
      // Output k is the disk whose lowest pixel is stream pixel k-5; its
      // centre lies two rows above that pixel.
      if (v_o) begin
        c = nout - 5 - 2 * W;
        if (c >= 0 && c < NS) begin
          t = c / (W * TH);
          r = c % (W * TH);
          cx = r % W;
          cy = r / W;
          if (cx >= 2 && cx < W - 2 && cy >= 2 && cy < TH - 2) begin
            fx = t * TW + cx - 2;
            fy = cy - 2;
            check("result pixel", int'(y_o), frame_ref(fx, fy));
            if (written[fy][fx]) begin
              failures++;
              $display("FAIL pixel (%0d,%0d) written twice", fx, fy);
            end
            written[fy][fx] = 1'b1;
            nwritten++;
            if (nwritten == FW * FH) last_at = acc;
          end
        end
        nout++;
      end
      // no stall: one pixel every clock
      valid = 1'b1;
      pix = 8'(stream_pix(acc));
    end
    @(negedge clk);
    valid = 1'b0;
    check("result pixels written", nwritten, FW * FH);
    // the last result pixel is the output for stream pixel NS-3+5, seen one
    // clock after that pixel was accepted
    check("pixels accepted when the frame was complete", last_at, NS + 3);
    check("one output per accepted pixel", nout, NS + FLUSH);
    $display("frame: %0d tiles of %0d x %0d, %0d cycles, %0d result pixels",
             NT, W, TH, last_at, nwritten);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
