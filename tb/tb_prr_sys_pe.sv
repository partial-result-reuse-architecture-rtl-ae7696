// Self-checking testbench for prr_sys_pe, one node column of the systolic
// PRR array. Random pixels and random down-going input buses are applied,
// with a random column-0 marker and random stalls. The testbench keeps its
// own copy of the seven values the PE must loop back to itself (computed
// from the definitions: c = max(pixel, b), e1 = 4x2 partial maximum,
// g1 = 8x4 partial maximum, the rest shifted by one column) and checks the
// 8x8 output and the registered down-going bus every cycle.
module tb_prr_sys_pe;
  import prr_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic first = 1'b0;
  logic [7:0] a = '0;
  sys_vbus_t vin = '0;
  sys_vbus_t vout;
  logic [7:0] y;
  int checks = 0, failures = 0;

  prr_sys_pe dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .first_i(first),
    .pix_i(a), .vin_i(vin), .vout_o(vout), .out_o(y));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int mx(int p, int q); return p > q ? p : q; endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // model of the looped-back horizontal values: c, e1, e2, g1..g4
    int h [7];
    int hi [7];
    int ab, abc, abcd, abcde, abcdef;
    int ev [7];
    bit have_ev;
    for (int k = 0; k < 7; k++) h[k] = 0;
    have_ev = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (have_ev) begin
        check("vout.b", int'(vout.b), ev[0]);
        check("vout.d1", int'(vout.d1), ev[1]);
        check("vout.d2", int'(vout.d2), ev[2]);
        check("vout.f1", int'(vout.f1), ev[3]);
        check("vout.f4", int'(vout.f4), ev[6]);
      end
      en = ($urandom_range(0, 3) != 0);
      first = ($urandom_range(0, 9) == 0);
      a = 8'($urandom);
      vin = sys_vbus_t'({$urandom, $urandom});
      #1;
      for (int k = 0; k < 7; k++) hi[k] = first ? 0 : h[k];
      ab = mx(int'(a), int'(vin.b));
      abc = mx(ab, hi[0]);
      abcd = mx(abc, int'(vin.d2));
      abcde = mx(abcd, hi[2]);
      abcdef = mx(abcde, int'(vin.f4));
      check("out", int'(y), mx(abcdef, hi[6]));
      if (en) begin
        h[6] = hi[5]; h[5] = hi[4]; h[4] = hi[3]; h[3] = abcdef;
        h[2] = hi[1]; h[1] = abcd; h[0] = ab;
        ev[0] = int'(a); ev[1] = abc; ev[2] = int'(vin.d1); ev[3] = abcde;
        ev[4] = int'(vin.f1); ev[5] = int'(vin.f2); ev[6] = int'(vin.f3);
        have_ev = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
