// tb_seq1101_jk: self-checking testbench for seq1101_jk.
//
// Feeds the published example strings ("01101101" must give "00001001",
// "001110" must give "000000", "0111101" must give "0000001", "0001" must
// give "0000"), then a long random stream with occasional resets. A reference
// model keeps the last three input bits: the expected output is 1 when those
// bits followed by the current one read 1101, and the expected state is the
// longest prefix of 1101 that the bits seen end with. Output y is checked in
// the cycle of each bit (Mealy timing), the flip-flops A and B
// after each edge.
module tb_seq1101_jk;

  logic       clk = 1'b0;
  logic       rst, x;
  logic       z;
  logic       a, b;
  logic [1:0] state;
  logic [2:0] hist;
  int         checks = 0;
  int         failures = 0;
  int         n_match = 0;

  seq1101_jk dut (.clk(clk), .rst(rst), .x(x), .y(z), .a(a), .b(b));

  assign state = {a, b};

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] prefix_state(logic [2:0] h);
    if (h == 3'b110)    return 2'b11;
    if (h[1:0] == 2'b11) return 2'b10;
    if (h[0])           return 2'b01;
    return 2'b00;
  endfunction

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    x   = 1'b0;
    @(posedge clk);
    @(negedge clk);
    rst  = 1'b0;
    hist = '0;
    checks++;
    if (state !== 2'b00) begin
      failures++;
      $display("FAIL reset: state %b", state);
    end
  endtask

  // Applies one bit, checks the Mealy output before the edge and the state
  // after it. Returns the output seen.
  task automatic step(logic bit_in, output logic z_seen);
    logic z_exp;
    x = bit_in;
    #1;
    z_exp = ({hist, bit_in} == 4'b1101);
    z_seen = z;
    checks++;
    if (z !== z_exp) begin
      failures++;
      $display("FAIL z: hist=%b x=%b z=%b expected %b", hist, bit_in, z, z_exp);
    end
    if (z_exp) n_match++;
    @(posedge clk);
    hist = {hist[1:0], bit_in};
    @(negedge clk);
    checks++;
    if (state !== prefix_state(hist)) begin
      failures++;
      $display("FAIL state: hist=%b state=%b expected %b", hist, state, prefix_state(hist));
    end
  endtask

  task automatic run_string(string in_s, string out_s);
    string got = "";
    logic  zs;
    do_reset();
    for (int i = 0; i < in_s.len(); i++) begin
      step(in_s[i] == "1", zs);
      got = {got, zs ? "1" : "0"};
    end
    checks++;
    if (got != out_s) begin
      failures++;
      $display("FAIL string %s: output %s expected %s", in_s, got, out_s);
    end
  endtask

  initial begin
    logic zs;
    rst = 1'b1;
    x   = 1'b0;
    hist = '0;
    run_string("01101101", "00001001");
    run_string("001110",   "000000");
    run_string("0111101",  "0000001");
    run_string("0001",     "0000");
    do_reset();
    for (int i = 0; i < 4000; i++) begin
      if ($urandom_range(0, 499) == 0) do_reset();
      // bias toward 1s so that every state is visited often
      step($urandom_range(0, 9) < 6, zs);
    end
    checks++;
    if (n_match < 50) begin
      failures++;
      $display("FAIL: only %0d matches in the random stream", n_match);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
