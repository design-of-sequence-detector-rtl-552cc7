// tb_seq1101_jk_logic: self-checking testbench for seq1101_jk_logic.
//
// For all eight (A, B, X) combinations it checks
//   * every J/K value the excitation table fixes (don't-care entries are not
//     checked),
//   * that the J/K values, applied to JK flip-flops (Q+ = J.~Q | ~K.Q), lead
//     to the next state of the detector's state table, and
//   * the output Y (1 only for state S3 with X=1).
// The tables are written out in the testbench, independently of the
// equations in the design.
module tb_seq1101_jk_logic;

  logic a, b, x;
  logic ja, ka, jb, kb, y;
  int   checks = 0;
  int   failures = 0;

  seq1101_jk_logic dut (.a(a), .b(b), .x(x), .ja(ja), .ka(ka), .jb(jb), .kb(kb), .y(y));

  // Next state {A,B} per present state (S0..S3) and input X: the state table.
  function automatic logic [1:0] next_state(logic [1:0] s, logic xi);
    case (s)
      2'b00:   return xi ? 2'b01 : 2'b00;
      2'b01:   return xi ? 2'b10 : 2'b00;
      2'b10:   return xi ? 2'b10 : 2'b11;
      default: return xi ? 2'b01 : 2'b00;
    endcase
  endfunction

  // Required J/K to take one flip-flop from q to qn; bit 1 of the mask says
  // whether J is fixed, bit 0 whether K is fixed.
  function automatic logic [3:0] excitation(logic q, logic qn);
    // returns {j_care, j, k_care, k}
    case ({q, qn})
      2'b00:   return 4'b1000;  // J=0, K=x
      2'b01:   return 4'b1100;  // J=1, K=x
      2'b10:   return 4'b0011;  // J=x, K=1
      default: return 4'b0010;  // J=x, K=0
    endcase
  endfunction

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: A=%b B=%b X=%b got %b expected %b", what, a, b, x, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [1:0] ns;
      logic [3:0] ea, eb;
      {a, b, x} = 3'(i);
      #1;
      ns = next_state({a, b}, x);
      ea = excitation(a, ns[1]);
      eb = excitation(b, ns[0]);
      if (ea[3]) expect_bit("JA", ja, ea[2]);
      if (ea[1]) expect_bit("KA", ka, ea[0]);
      if (eb[3]) expect_bit("JB", jb, eb[2]);
      if (eb[1]) expect_bit("KB", kb, eb[0]);
      expect_bit("A+", (ja & ~a) | (~ka & a), ns[1]);
      expect_bit("B+", (jb & ~b) | (~kb & b), ns[0]);
      expect_bit("Y", y, {a, b, x} == 3'b111);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
