// tb_seq_detector_top: end-to-end testbench for seq_detector_top at its
// default (and only) configuration.
//
// The 1101 detectors: the published example strings are run first
// ("01101101" -> "00001001", "001110" -> "000000", "0111101" -> "0000001",
// "0001" -> "0000"), each from reset, then a long random stream with
// occasional resets. A reference model built from the last three input bits
// gives the expected output (last four bits read 1101) and the expected state
// (longest prefix of 1101 the bits end with); z_behav, y_jk and both state
// outputs are checked against it in every cycle.
//
// The edge detector gets its own, independent random stream on edge_x; its
// output is checked against previous-bit XOR current-bit (0 right after
// reset).
//
// Every mechanism of the machines is counted and must occur at least once: a
// match, an overlapping match (a match whose leading 1 is the last bit of the
// previous match), a restart of the search on a 0 after "1" (b->a), the
// run of 1s that keeps the detector waiting for the 0 (c->c), the "1100"
// fall back to the start (d->a), a reset in the middle of a stream, and a
// rising and a falling edge at the edge detector.
module tb_seq_detector_top;

  logic       clk = 1'b0;
  logic       rst, x, edge_x;
  logic       z_behav, y_jk, edge_z;
  logic [1:0] state_behav, state_jk, state_edge;

  logic [2:0] hist;
  logic       eprev, ehave;
  int         since_match;   // bits since the last match, or -1
  int         checks = 0;
  int         failures = 0;

  typedef enum int {
    EV_MATCH, EV_OVERLAP, EV_B_TO_A, EV_C_HOLD, EV_D_TO_A, EV_MID_RESET,
    EV_EDGE_RISE, EV_EDGE_FALL, EV_COUNT
  } event_e;
  int         events [EV_COUNT];

  seq_detector_top dut (
    .clk         (clk),
    .rst         (rst),
    .x           (x),
    .z_behav     (z_behav),
    .y_jk        (y_jk),
    .state_behav (state_behav),
    .state_jk    (state_jk),
    .edge_x      (edge_x),
    .edge_z      (edge_z),
    .state_edge  (state_edge)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] prefix_state(logic [2:0] h);
    if (h == 3'b110)     return 2'b11;
    if (h[1:0] == 2'b11) return 2'b10;
    if (h[0])            return 2'b01;
    return 2'b00;
  endfunction

  task automatic expect_eq(string what, logic [1:0] got, logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (hist=%b x=%b)", what, got, exp, hist, x);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    hist  = '0;
    ehave = 1'b0;
    since_match = -1;
    expect_eq("reset state_behav", state_behav, 2'b00);
    expect_eq("reset state_jk",    state_jk,    2'b00);
    expect_eq("reset state_edge",  state_edge,  2'b00);
  endtask

  // One clock: apply both inputs, check the Mealy outputs before the edge and
  // the states after it.
  task automatic step(logic bit_in, logic ebit, output logic z_seen);
    logic z_exp, ez_exp;
    logic [1:0] st;
    x      = bit_in;
    edge_x = ebit;
    #1;
    st     = prefix_state(hist);
    z_exp  = ({hist, bit_in} == 4'b1101);
    ez_exp = ehave && (eprev != ebit);
    expect_eq("z_behav", 2'(z_behav), 2'(z_exp));
    expect_eq("y_jk",    2'(y_jk),    2'(z_exp));
    expect_eq("edge_z",  2'(edge_z),  2'(ez_exp));
    z_seen = z_behav;
    if (z_exp) begin
      events[EV_MATCH]++;
      if (since_match == 3) events[EV_OVERLAP]++;
      since_match = 0;
    end else if (since_match >= 0) begin
      since_match++;
    end
    if (st == 2'b01 && !bit_in) events[EV_B_TO_A]++;
    if (st == 2'b10 &&  bit_in) events[EV_C_HOLD]++;
    if (st == 2'b11 && !bit_in) events[EV_D_TO_A]++;
    if (ez_exp &&  ebit) events[EV_EDGE_RISE]++;
    if (ez_exp && !ebit) events[EV_EDGE_FALL]++;
    @(posedge clk);
    hist  = {hist[1:0], bit_in};
    eprev = ebit;
    ehave = 1'b1;
    @(negedge clk);
    expect_eq("state_behav", state_behav, prefix_state(hist));
    expect_eq("state_jk",    state_jk,    prefix_state(hist));
    expect_eq("state_edge",  state_edge,  ebit ? 2'b10 : 2'b01);
  endtask

  task automatic run_string(string in_s, string out_s);
    string got = "";
    logic  zs;
    do_reset();
    for (int i = 0; i < in_s.len(); i++) begin
      step(in_s[i] == "1", 1'($urandom), zs);
      got = {got, zs ? "1" : "0"};
    end
    checks++;
    if (got != out_s) begin
      failures++;
      $display("FAIL string %s: output %s expected %s", in_s, got, out_s);
    end else begin
      $display("string %s -> %s as expected", in_s, got);
    end
  endtask

  initial begin
    logic zs;
    rst = 1'b1;
    x = 1'b0;
    edge_x = 1'b0;
    eprev = 1'b0;
    ehave = 1'b0;
    hist = '0;
    since_match = -1;
    run_string("01101101", "00001001");
    run_string("001110",   "000000");
    run_string("0111101",  "0000001");
    run_string("0001",     "0000");
    do_reset();
    for (int i = 0; i < 10000; i++) begin
      if ($urandom_range(0, 999) == 0) begin
        do_reset();
        events[EV_MID_RESET]++;
      end
      step($urandom_range(0, 9) < 6, 1'($urandom), zs);
    end
    for (int e = 0; e < EV_COUNT; e++) begin
      automatic event_e ev = event_e'(e);
      $display("%-13s happened %0d times", ev.name(), events[e]);
      checks++;
      if (events[e] == 0) begin
        failures++;
        $display("FAIL: %s never happened", ev.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
