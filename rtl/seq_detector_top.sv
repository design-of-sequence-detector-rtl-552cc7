// seq_detector_top: the overlapping 1101 sequence detector in both of its
// realisations, plus the edge-detector example.
//
// One serial input x, one bit per rising clock edge, feeds two independent
// detectors of the pattern 1101:
//   * seq1101_mealy - the behavioural four-state Mealy machine (z_behav),
//   * seq1101_jk    - the same machine built from two JK flip-flops and
//                     their minimised excitation logic (y_jk).
// Both use the same state encoding, so in every cycle their states and
// outputs must be equal; an assertion checks that in simulation. Either
// output is 1 in the cycle whose input bit completes 1101, overlapping
// matches included.
//
// Beside them, unrelated to the 1101 detector, sits the edge-detector example
// (edge_detector_mealy) with its own input edge_x and output edge_z; it shares
// only clk and rst.
//
// Interface: clk, synchronous active-high rst (all machines go to their start
// states), x, z_behav, y_jk, state_behav and state_jk (present states for
// observation), edge_x, edge_z and state_edge. z_behav, y_jk and edge_z are
// Mealy outputs: combinational from the present state and the current input,
// valid in the cycle of that input, before the rising edge that consumes it.
// Every state register changes only at the rising edge of clk.
//
// Running both realisations side by side is this design's own arrangement;
// each of the three machines follows the published one.
module seq_detector_top
  import seq_detector_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       x,
  output logic       z_behav,
  output logic       y_jk,
  output logic [1:0] state_behav,
  output logic [1:0] state_jk,
  input  logic       edge_x,
  output logic       edge_z,
  output logic [1:0] state_edge
);

  seq_state_t  st_behav;
  edge_state_t st_edge;
  logic        jk_a, jk_b;

  seq1101_mealy u_behav (
    .clk   (clk),
    .rst   (rst),
    .x     (x),
    .z     (z_behav),
    .state (st_behav)
  );

  seq1101_jk u_jk (
    .clk (clk),
    .rst (rst),
    .x   (x),
    .y   (y_jk),
    .a   (jk_a),
    .b   (jk_b)
  );

  edge_detector_mealy u_edge (
    .clk   (clk),
    .rst   (rst),
    .x     (edge_x),
    .z     (edge_z),
    .state (st_edge)
  );

  assign state_behav = st_behav;
  assign state_jk    = {jk_a, jk_b};
  assign state_edge  = st_edge;

  // The two realisations of the 1101 detector are the same machine with the
  // same encoding: their states must agree after every clock edge.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (state_behav == state_jk)
        else $error("1101 detectors disagree: behavioural %b, JK %b", state_behav, state_jk);
    end
  end

endmodule
