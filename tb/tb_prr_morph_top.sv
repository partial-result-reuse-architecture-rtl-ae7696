// End-to-end testbench for prr_morph_top at its default parameters (W = 94).
// Two padded tiles of 90 x 243 pixels (94 x 247 with two rows/columns of zero
// padding on every side, the tile format of the prototype chip) are streamed
// back to back, with random stall cycles, into all eight units at once,
// followed by flush rows. The stream is treated as one tall image of width W.
//   chip   every pixel of both original tiles is checked against the flat
//          disk dilation of that tile alone (pixels outside the tile are
//          ignored), so border windows check the zero padding; the k-th
//          valid output belongs to the disk centred two rows above pixel k-5.
//   avg    weighted disk sum / 13 (weights 4/2/1 from the four-cross
//          decomposition), pmed  (opening + closing) / 2, line8, line7,
//          sq8, diag8, se8: every window of the tall image that lies fully
//          inside it is checked against a direct evaluation of the element.
// Afterwards one 94 x 24 frame goes through the folded systolic ring (four
// PEs, four rows per pass, lanes skewed by one cycle); every output is
// compared with the 8x8 block maximum ending at that pixel, zero outside.
// Mechanisms counted, each of which must occur: stall cycles, border windows
// of the chip that reach into the padding, chip windows in the second tile
// (tile change), systolic outputs on the zero top/left border, and checks of
// every unit.
module tb_prr_morph_top;
  import prr_pkg::*;

  localparam int W    = 94;
  localparam int TW   = 90;
  localparam int TH   = 243;
  localparam int PH   = TH + 4;
  localparam int H    = 2 * PH;         // image rows carrying tiles
  localparam int HT   = H + 6;          // plus flush rows
  localparam int N    = W * HT;

  localparam int K_DISK = 0, K_LINE8 = 1, K_LINE7 = 2, K_SQ8 = 3, K_DIAG8 = 4, K_SE8 = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid = 1'b0;
  logic [7:0] pix = '0;

  logic chip_v, avg_v, pmed_v, line8_v, line7_v, sq8_v, diag8_v, se8_v;
  logic [7:0] chip_y, pmed_y, line8_y, line7_y, sq8_y, diag8_y, se8_y;
  logic [12:0] avg_y;
  logic sys_valid = 1'b0, sys_sof = 1'b0;
  logic [7:0] sys_in [4];
  logic [7:0] sys_out [4];
  localparam int SH = 24;               // rows of the systolic test frame
  int simg [SH * W];
  int n_sys = 0, n_sys_border = 0;

  int img [N];
  int ero [N], dil [N];
  int checks = 0, failures = 0;
  int acc = 0, chip_k = 0;
  int n_stall = 0, n_border = 0, n_tile2 = 0;
  int n_chip = 0, n_avg = 0, n_pmed = 0, n_line8 = 0, n_line7 = 0, n_sq8 = 0, n_diag8 = 0, n_se8 = 0;

  prr_morph_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .chip_valid_i(valid),  .chip_pix_i(pix),  .chip_valid_o(chip_v),  .chip_pix_o(chip_y),
    .avg_valid_i(valid),   .avg_pix_i(pix),   .avg_valid_o(avg_v),    .avg_o(avg_y),
    .pmed_valid_i(valid),  .pmed_pix_i(pix),  .pmed_valid_o(pmed_v),  .pmed_pix_o(pmed_y),
    .line8_valid_i(valid), .line8_pix_i(pix), .line8_valid_o(line8_v), .line8_pix_o(line8_y),
    .line7_valid_i(valid), .line7_pix_i(pix), .line7_valid_o(line7_v), .line7_pix_o(line7_y),
    .sq8_valid_i(valid),   .sq8_pix_i(pix),   .sq8_valid_o(sq8_v),    .sq8_pix_o(sq8_y),
    .diag8_valid_i(valid), .diag8_pix_i(pix), .diag8_valid_o(diag8_v), .diag8_pix_o(diag8_y),
    .se8_valid_i(valid),   .se8_pix_i(pix),   .se8_valid_o(se8_v),    .se8_pix_o(se8_y),
    .sys_valid_i(sys_valid), .sys_sof_i(sys_sof), .sys_pix_i(sys_in), .sys_out_o(sys_out));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  function automatic bit in_se(int kind, int dx, int dy);
    case (kind)
      K_DISK:  return iabs(dx) + iabs(dy) <= 2;
      K_LINE8: return dy == 0 && dx >= -7 && dx <= 0;
      K_LINE7: return dy == 0 && dx >= -6 && dx <= 0;
      K_SQ8:   return dx >= -7 && dx <= 0 && dy >= -7 && dy <= 0;
      K_DIAG8: return dx == dy && dx >= -7 && dx <= 0;
      default: return (dx == 0 && dy == 0) || ((dy == -1 || dy == -2) && dx >= -2 && dx <= 1) ||
                      (dy == -3 && dx == -1);
    endcase
  endfunction

  // Element `kind` evaluated on source sel (0 img, 1 ero, 2 dil) at anchor
  // (x, y); -1 if the element leaves the image.
  function automatic int win(int kind, int sel, int x, int y, bit is_max);
    int r = is_max ? 0 : 255;
    int v, i;
    for (int dy = -7; dy <= 2; dy++)
      for (int dx = -7; dx <= 2; dx++)
        if (in_se(kind, dx, dy)) begin
          if (x + dx < 0 || x + dx >= W || y + dy < 0 || y + dy >= HT) return -1;
          i = (y + dy) * W + x + dx;
          v = (sel == 0) ? img[i] : (sel == 1) ? ero[i] : dil[i];
          if (is_max ? (v > r) : (v < r)) r = v;
        end
    return r;
  endfunction

  // Dilation of one original tile alone: only tile pixels take part.
  function automatic int chip_ref(int x, int y, output bit border);
    int ty0 = (y < PH) ? 2 : PH + 2;
    int r = 0, v;
    border = 1'b0;
    for (int dy = -2; dy <= 2; dy++)
      for (int dx = -2; dx <= 2; dx++)
        if (iabs(dx) + iabs(dy) <= 2) begin
          if (x + dx < 2 || x + dx >= 2 + TW || y + dy < ty0 || y + dy >= ty0 + TH) begin
            border = 1'b1;
          end else begin
            v = img[(y + dy) * W + x + dx];
            if (v > r) r = v;
          end
        end
    return r;
  endfunction

  function automatic bit is_tile_pixel(int x, int y);
    int ty = (y < PH) ? y : y - PH;
    return y >= 0 && y < H && x >= 2 && x < 2 + TW && ty >= 2 && ty < 2 + TH;
  endfunction

  function automatic int blk8(int i, int j);
    int r = 0;
    for (int y = i - 7; y <= i; y++)
      for (int x = j - 7; x <= j; x++)
        if (y >= 0 && x >= 0 && simg[y * W + x] > r) r = simg[y * W + x];
    return r;
  endfunction

  always @(posedge clk) if (valid) acc <= acc + 1;

  initial begin : watchdog
    repeat (3 * N) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, e, s, c;
    bit border;
    static int nbx [4] = '{1, -1, 0, 0};
    static int nby [4] = '{0, 0, 1, -1};
    int wgt [5][5];
    for (int dy = -2; dy <= 2; dy++)
      for (int dx = -2; dx <= 2; dx++) begin
        wgt[dy + 2][dx + 2] = 0;
        for (int k = 0; k < 4; k++)
          if (iabs(dx - nbx[k]) + iabs(dy - nby[k]) <= 1) wgt[dy + 2][dx + 2]++;
      end
    // padded tiles: zero outside the 90 x 243 tile area, random inside
    for (int i = 0; i < N; i++)
      img[i] = is_tile_pixel(i % W, i / W) ? $urandom_range(0, 255) : 0;
    for (int i = 0; i < N; i++) begin
      ero[i] = win(K_DISK, 0, i % W, i / W, 1'b0);
      dil[i] = win(K_DISK, 0, i % W, i / W, 1'b1);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (acc < N) begin
      @(negedge clk);
      // chip: registered, k-th output = disk centred two rows above pixel k-5
      if (chip_v) begin
        c = chip_k - 5 - 2 * W;
        if (c >= 0) begin
          x = c % W;
          y = c / W;
          if (is_tile_pixel(x, y)) begin
            e = chip_ref(x, y, border);
            check("chip dilation", int'(chip_y), e);
            n_chip++;
            if (border) n_border++;
            if (y >= PH) n_tile2++;
          end
        end
        chip_k++;
      end
      if ($urandom_range(0, 7) != 0) begin
        valid = 1'b1;
        pix = 8'(img[acc]);
      end else begin
        valid = 1'b0;
        n_stall++;
      end
      #1;
      if (valid) begin
        x = acc % W;
        y = acc / W;
        // combinational units anchored at the current pixel
        e = win(K_LINE8, 0, x, y, 1'b1);
        if (e >= 0 && line8_v) begin check("line8", int'(line8_y), e); n_line8++; end
        e = win(K_LINE7, 0, x, y, 1'b1);
        if (e >= 0 && line7_v) begin check("line7", int'(line7_y), e); n_line7++; end
        e = win(K_SQ8, 0, x, y, 1'b1);
        if (e >= 0 && sq8_v) begin check("sq8", int'(sq8_y), e); n_sq8++; end
        e = win(K_DIAG8, 0, x, y, 1'b1);
        if (e >= 0 && diag8_v) begin check("diag8", int'(diag8_y), e); n_diag8++; end
        e = win(K_SE8, 0, x, y, 1'b1);
        if (e >= 0 && se8_v) begin check("se8", int'(se8_y), e); n_se8++; end
        // moving average: centre two rows up
        if (avg_v && y >= 4 && x >= 2 && x <= W - 3) begin
          s = 0;
          for (int dy = -2; dy <= 2; dy++)
            for (int dx = -2; dx <= 2; dx++)
              s += wgt[dy + 2][dx + 2] * img[(y - 2 + dy) * W + x + dx];
          check("avg", int'(avg_y), s / 13);
          n_avg++;
        end
        // pseudomedian: centre four rows up, needs radius 4 inside the image
        if (pmed_v && y >= 8 && x >= 4 && x <= W - 5) begin
          c = (y - 4) * W + x;
          e = (win(K_DISK, 1, x, y - 4, 1'b1) + win(K_DISK, 2, x, y - 4, 1'b0)) / 2;
          check("pmed", int'(pmed_y), e);
          n_pmed++;
        end
      end
    end
    @(negedge clk);
    valid = 1'b0;
    // systolic ring: one SH-row frame, four rows per pass, lanes skewed
    for (int i = 0; i < SH * W; i++) simg[i] = $urandom_range(0, 255);
    for (int k = 0; k < 4; k++) sys_in[k] = '0;
    for (int t = 0; t < (SH / 4) * W + 3; ) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin
        sys_valid = 1'b0;
        n_stall++;
        continue;
      end
      sys_valid = 1'b1;
      sys_sof = (t == 0);
      for (int k = 0; k < 4; k++) begin
        c = t - k;
        sys_in[k] = (c >= 0 && c < (SH / 4) * W) ? 8'(simg[(4 * (c / W) + k) * W + c % W]) : 8'd0;
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        c = t - k;
        if (c >= 0 && c < (SH / 4) * W) begin
          check("systolic", int'(sys_out[k]), blk8(4 * (c / W) + k, c % W));
          n_sys++;
          if (4 * (c / W) + k < 7 || c % W < 7) n_sys_border++;
        end
      end
      t++;
    end
    @(negedge clk);
    sys_valid = 1'b0;
    check("systolic pixels checked", n_sys, SH * W);
    if (n_sys_border == 0) begin failures++; $display("FAIL no systolic border pixel"); end
    check("chip pixels checked", n_chip, 2 * TW * TH);
    $display("mechanisms: stalls=%0d border_windows=%0d tile2_windows=%0d", n_stall, n_border, n_tile2);
    $display("checked: chip=%0d avg=%0d pmed=%0d line8=%0d line7=%0d sq8=%0d diag8=%0d se8=%0d sys=%0d",
             n_chip, n_avg, n_pmed, n_line8, n_line7, n_sq8, n_diag8, n_se8, n_sys);
    if (n_stall == 0)  begin failures++; $display("FAIL no stall happened"); end
    if (n_border == 0) begin failures++; $display("FAIL no border window"); end
    if (n_tile2 == 0)  begin failures++; $display("FAIL second tile not reached"); end
    if (n_avg == 0 || n_pmed == 0 || n_line8 == 0 || n_line7 == 0 ||
        n_sq8 == 0 || n_diag8 == 0 || n_se8 == 0) begin
      failures++;
      $display("FAIL a unit was never checked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
