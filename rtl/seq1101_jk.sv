// seq1101_jk: overlapping "1101" sequence detector built from two JK
// flip-flops.
//
// This is the gate-level realisation of the same Mealy machine as
// seq1101_mealy. Flip-flop A holds the high state bit and flip-flop B the low
// one (S0=00, S1=01, S2=10, S3=11). seq1101_jk_logic turns the present state
// and the input x into the J and K inputs of both flip-flops and the output
// Y = A.B.X, which is 1 in the cycle whose x completes 1101. The final 1 of a
// match starts the next one (state S3 with x=1 goes to S1), so "0111101"
// gives "0000001" and overlapping matches are all reported.
//
// Interface: clk (both flip-flops, rising edge), synchronous active-high rst
// (clears A and B to S0), serial input x, combinational output y, and the
// state bits a and b for observation.
//
// The flip-flop type, the state assignment, the equations and the structure
// follow the published circuit; the reset is this design's own addition.
// The complemented flip-flop outputs are not needed by the minimised logic
// and are left open.
module seq1101_jk (
  input  logic clk,
  input  logic rst,
  input  logic x,
  output logic y,
  output logic a,
  output logic b
);

  logic ja, ka, jb, kb;

  seq1101_jk_logic u_logic (
    .a  (a),
    .b  (b),
    .x  (x),
    .ja (ja),
    .ka (ka),
    .jb (jb),
    .kb (kb),
    .y  (y)
  );

  jk_ff u_ff_a (
    .clk (clk),
    .rst (rst),
    .j   (ja),
    .k   (ka),
    .q   (a),
    .q_n ()
  );

  jk_ff u_ff_b (
    .clk (clk),
    .rst (rst),
    .j   (jb),
    .k   (kb),
    .q   (b),
    .q_n ()
  );

endmodule
