// Self-checking testbench for prr_op_unit, the MAX cell.
// Three instances are exercised with random operands: a registered MAX cell
// (one cycle of latency, holding its value while en_i is low), a
// combinational MIN cell and a registered 9-bit ADD cell. Expected values are
// computed directly from the operands driven on the previous edge.
module tb_prr_op_unit;
  import prr_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       en = 1'b0;
  logic [7:0] a = '0, b = '0;
  logic [8:0] sa = '0, sb = '0;
  logic [7:0] y_max, y_min;
  logic [8:0] y_add;
  int checks = 0, failures = 0;

  prr_op_unit #(.DW(8), .OP(OP_MAX), .REG(1'b1)) u_max (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .a_i(a), .b_i(b), .y_o(y_max));
  prr_op_unit #(.DW(8), .OP(OP_MIN), .REG(1'b0)) u_min (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .a_i(a), .b_i(b), .y_o(y_min));
  prr_op_unit #(.DW(9), .OP(OP_ADD), .REG(1'b1)) u_add (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .a_i(sa), .b_i(sb), .y_o(y_add));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_max, exp_add;
    repeat (2) @(negedge clk);
    check("reset max", int'(y_max), 0);
    rst_n = 1'b1;
    exp_max = 0;
    exp_add = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      check("max", int'(y_max), exp_max);
      check("add", int'(y_add), exp_add);
      a  = 8'($urandom);
      b  = (i % 7 == 0) ? a : 8'($urandom);
      sa = 9'($urandom_range(0, 255));
      sb = 9'($urandom_range(0, 255));
      en = ($urandom_range(0, 3) != 0);
      #1;
      check("min comb", int'(y_min), (a < b) ? int'(a) : int'(b));
      if (en) begin
        exp_max = (a > b) ? int'(a) : int'(b);
        exp_add = int'(sa) + int'(sb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
