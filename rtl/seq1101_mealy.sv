// seq1101_mealy: overlapping "1101" sequence detector, behavioural form.
//
// A four-state Mealy machine watches a serial bit stream x, one bit per
// rising clock edge, and raises z in the same cycle as the bit that completes
// the pattern 1101. The state records the longest prefix of 1101 that ends
// the bits seen so far:
//
//   state | x=0      | x=1
//   ------+----------+---------
//   a     | a, z=0   | b, z=0
//   b     | a, z=0   | c, z=0
//   c     | d, z=0   | c, z=0
//   d     | a, z=0   | b, z=1
//
// Overlap: after 1101 is found the final 1 is already the first bit of the
// next 1101, so d goes to b rather than back to a; "01101101" gives
// "00001001".
//
// Interface: clk, synchronous active-high rst (to state a), serial input x,
// Mealy output z (combinational from state and x, so it must be sampled
// before the clock edge that consumes x), and the present state for
// observation.
//
// The state table, the overlap behaviour and the state names follow the
// published design. The binary encoding (shared with seq1101_jk) and the
// synchronous reset, which stands in for a power-up initial value, are this
// design's own choices.
module seq1101_mealy
  import seq_detector_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       x,
  output logic       z,
  output seq_state_t state
);

  seq_state_t next_state;

  always_ff @(posedge clk) begin
    if (rst) state <= ST_A;
    else     state <= next_state;
  end

  always_comb begin
    next_state = state;
    z          = 1'b0;
    unique case (state)
      ST_A: next_state = x ? ST_B : ST_A;
      ST_B: next_state = x ? ST_C : ST_A;
      ST_C: next_state = x ? ST_C : ST_D;
      ST_D: begin
        next_state = x ? ST_B : ST_A;
        z          = x;
      end
    endcase
  end

endmodule
