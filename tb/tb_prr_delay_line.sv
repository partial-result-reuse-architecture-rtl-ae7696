// Self-checking testbench for prr_delay_line.
// Lines of length 5, 1 and 0 are driven with random data and random stalls;
// a reference queue of accepted samples gives the expected output: the
// sample accepted LEN accepts ago (the current input for LEN = 0).
module tb_prr_delay_line;
  logic       clk = 1'b0;
  logic       en = 1'b0;
  logic [7:0] d = '0;
  logic [7:0] q5, q1, q0;
  int checks = 0, failures = 0;
  int hist[$];

  prr_delay_line #(.DW(8), .LEN(5)) u_l5 (.clk_i(clk), .en_i(en), .d_i(d), .q_o(q5));
  prr_delay_line #(.DW(8), .LEN(1)) u_l1 (.clk_i(clk), .en_i(en), .d_i(d), .q_o(q1));
  prr_delay_line #(.DW(8), .LEN(0)) u_l0 (.clk_i(clk), .en_i(en), .d_i(d), .q_o(q0));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) if (en) hist.push_front(int'(d));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (hist.size() >= 5) check("len5", int'(q5), hist[4]);
      if (hist.size() >= 1) check("len1", int'(q1), hist[0]);
      d  = 8'($urandom);
      en = ($urandom_range(0, 4) != 0);
      #1;
      check("len0", int'(q0), int'(d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
