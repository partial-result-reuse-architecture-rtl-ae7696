// Self-checking testbench for prr_pe, the six-cell processing element.
// A pipelined MAX PE and a combinational MIN PE receive random tap values
// every cycle. For the pipelined PE the value after edge n must be
//   abcde  = max(a[n-3], b[n-3], c[n-2], d[n-1], e[n])
//   abcdef = max(abcde one edge earlier, f[n])
//   y      = max(a[n-5], b[n-5], c[n-4], d[n-3], e[n-2], f[n-1], g[n])
// i.e. six register stages, which is also checked as the latency. The
// combinational PE must give min of all seven taps at once.
module tb_prr_pe;
  import prr_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] t [7];
  logic [7:0] p_abcde, p_abcdef, p_y, c_abcde, c_abcdef, c_y;
  int checks = 0, failures = 0;
  int h [7][$];  // per-tap history, newest first

  prr_pe #(.DW(8), .OP(OP_MAX), .PIPE(1'b1)) u_pipe (
    .clk_i(clk), .rst_ni(rst_n), .en_i(1'b1),
    .a_i(t[0]), .b_i(t[1]), .c_i(t[2]), .d_i(t[3]), .e_i(t[4]), .f_i(t[5]), .g_i(t[6]),
    .abcde_o(p_abcde), .abcdef_o(p_abcdef), .y_o(p_y));
  prr_pe #(.DW(8), .OP(OP_MIN), .PIPE(1'b0)) u_comb (
    .clk_i(clk), .rst_ni(rst_n), .en_i(1'b1),
    .a_i(t[0]), .b_i(t[1]), .c_i(t[2]), .d_i(t[3]), .e_i(t[4]), .f_i(t[5]), .g_i(t[6]),
    .abcde_o(c_abcde), .abcdef_o(c_abcdef), .y_o(c_y));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int mx(int x, int y); return (x > y) ? x : y; endfunction
  function automatic int mn(int x, int y); return (x < y) ? x : y; endfunction

  always @(posedge clk) if (rst_n) for (int k = 0; k < 7; k++) h[k].push_front(int'(t[k]));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e5, e6, e_y, cm;
    for (int k = 0; k < 7; k++) t[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      if (h[0].size() >= 6) begin
        // index 0 is the sample taken at the last edge (n)
        e5 = mx(mx(mx(h[0][3], h[1][3]), mx(h[2][2], h[3][1])), h[4][0]);
        e6 = mx(mx(mx(mx(h[0][4], h[1][4]), mx(h[2][3], h[3][2])), h[4][1]), h[5][0]);
        e_y = mx(mx(mx(mx(h[0][5], h[1][5]), mx(h[2][4], h[3][3])), mx(h[4][2], h[5][1])), h[6][0]);
        check("abcde", int'(p_abcde), e5);
        check("abcdef", int'(p_abcdef), e6);
        check("y", int'(p_y), e_y);
      end
      for (int k = 0; k < 7; k++) t[k] = 8'($urandom);
      #1;
      cm = 255;
      for (int k = 0; k < 7; k++) cm = mn(cm, int'(t[k]));
      check("comb y", int'(c_y), cm);
      check("comb abcde", int'(c_abcde),
            mn(mn(mn(int'(t[0]), int'(t[1])), mn(int'(t[2]), int'(t[3]))), int'(t[4])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
