// tb_edge_detector_mealy: self-checking testbench for edge_detector_mealy.
//
// After reset the machine must be in SI and its first output must be 0 for
// either input. Then a random bit stream (with occasional resets) is applied;
// the reference keeps the previous bit and expects z = previous XOR current,
// checked in the cycle of each bit, and the state to name the last bit after
// each edge. Rising and falling input edges are both counted and must occur.
module tb_edge_detector_mealy;

  import seq_detector_pkg::*;

  logic        clk = 1'b0;
  logic        rst, x;
  logic        z;
  edge_state_t state;
  logic        prev;
  logic        have_prev;
  int          checks = 0;
  int          failures = 0;
  int          rises = 0;
  int          falls = 0;
  logic [7:0]  pattern = 8'b0011_0101;

  edge_detector_mealy dut (.clk(clk), .rst(rst), .x(x), .z(z), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    have_prev = 1'b0;
    checks++;
    if (state !== EDGE_SI) begin
      failures++;
      $display("FAIL reset: state %b", state);
    end
    // From the start state the output is 0 whatever the input.
    for (int v = 0; v < 2; v++) begin
      x = 1'(v);
      #1;
      checks++;
      if (z !== 1'b0) begin
        failures++;
        $display("FAIL start: x=%b z=%b", x, z);
      end
    end
  endtask

  task automatic step(logic bit_in);
    logic z_exp;
    x = bit_in;
    #1;
    z_exp = have_prev && (prev != bit_in);
    if (z_exp &&  bit_in) rises++;
    if (z_exp && !bit_in) falls++;
    checks++;
    if (z !== z_exp) begin
      failures++;
      $display("FAIL z: prev=%b/%b x=%b z=%b expected %b", prev, have_prev, bit_in, z, z_exp);
    end
    @(posedge clk);
    prev = bit_in;
    have_prev = 1'b1;
    @(negedge clk);
    checks++;
    if (state !== (bit_in ? EDGE_S1 : EDGE_S0)) begin
      failures++;
      $display("FAIL state: after x=%b state=%b", bit_in, state);
    end
  endtask

  initial begin
    rst = 1'b1;
    x = 1'b0;
    prev = 1'b0;
    have_prev = 1'b0;
    do_reset();
    // a fixed pattern with both edges and both plateaus
    for (int i = 7; i >= 0; i--) step(pattern[i]);
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 299) == 0) do_reset();
      step(1'($urandom));
    end
    checks++;
    if (rises == 0 || falls == 0) begin
      failures++;
      $display("FAIL: rises=%0d falls=%0d", rises, falls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
