// edge_detector_mealy: example Mealy machine whose output is the XOR of the
// two most recent input bits, i.e. an edge detector.
//
// The machine starts in SI, where no input has been seen. After that it sits
// in S0 or S1, remembering whether the last input was 0 or 1. Every bit moves
// it to the state named after that bit, and the output is 1 exactly when the
// new bit differs from the remembered one:
//
//   state | x=0       | x=1
//   ------+-----------+----------
//   SI    | S0, z=0   | S1, z=0
//   S0    | S0, z=0   | S1, z=1
//   S1    | S0, z=1   | S1, z=0
//
// Interface: clk (rising edge), synchronous active-high rst (to SI), input x,
// Mealy output z (combinational from state and x), present state for
// observation.
//
// The behaviour, the state names and the start state follow the published
// example; the binary state codes and the reset are this design's choices.
module edge_detector_mealy
  import seq_detector_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        x,
  output logic        z,
  output edge_state_t state
);

  edge_state_t next_state;

  always_ff @(posedge clk) begin
    if (rst) state <= EDGE_SI;
    else     state <= next_state;
  end

  always_comb begin
    next_state = x ? EDGE_S1 : EDGE_S0;
    unique case (state)
      EDGE_S0: z = x;
      EDGE_S1: z = ~x;
      default: z = 1'b0;
    endcase
  end

endmodule
