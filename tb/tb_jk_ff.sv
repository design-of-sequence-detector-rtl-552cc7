// tb_jk_ff: self-checking testbench for jk_ff.
//
// Drives all four J/K combinations from both values of Q, many times over in
// random order, plus resets, and checks Q and ~Q after each rising edge
// against the JK truth table (00 hold, 01 clear, 10 set, 11 toggle) kept in
// the testbench.
module tb_jk_ff;

  logic clk = 1'b0;
  logic rst, j, k;
  logic q, q_n;
  logic q_exp;
  int   checks = 0;
  int   failures = 0;
  int   seen [4];

  jk_ff dut (.clk(clk), .rst(rst), .j(j), .k(k), .q(q), .q_n(q_n));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_q(string what);
    checks++;
    if (q !== q_exp || q_n !== ~q_exp) begin
      failures++;
      $display("FAIL %s: j=%b k=%b q=%b q_n=%b expected q=%b", what, j, k, q, q_n, q_exp);
    end
  endtask

  initial begin
    rst = 1'b1; j = 1'b0; k = 1'b0;
    @(negedge clk);
    @(negedge clk);
    q_exp = 1'b0;
    check_q("reset");
    rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      j = 1'($urandom);
      k = 1'($urandom);
      rst = ($urandom_range(0, 49) == 0);
      if (!rst) seen[{j, k}]++;
      @(posedge clk);
      if (rst)           q_exp = 1'b0;
      else if (!j && !k) q_exp = q_exp;
      else if (!j &&  k) q_exp = 1'b0;
      else if ( j && !k) q_exp = 1'b1;
      else               q_exp = ~q_exp;
      @(negedge clk);
      check_q("step");
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (seen[c] == 0) begin
        failures++;
        $display("FAIL: J/K combination %0d never applied", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
