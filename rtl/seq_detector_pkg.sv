// seq_detector_pkg: state types shared by the sequence-detector modules and
// their testbenches.
//
// seq_state_t names the four states of the overlapping 1101 detector. The
// binary codes are the ones the flip-flop realisation uses (S0=00, S1=01,
// S2=10, S3=11), so the behavioural detector and the JK flip-flop detector
// hold the same two state bits in every cycle and can be compared directly.
//   ST_A (00) nothing useful seen yet            (S0)
//   ST_B (01) the last bit was a 1               (S1)
//   ST_C (10) the last two bits were 11          (S2)
//   ST_D (11) the last three bits were 110       (S3)
//
// edge_state_t names the three states of the edge-detector example: SI is the
// start state with no input seen yet, S0/S1 remember that the last input was
// 0/1. Its binary codes are this design's own choice.
package seq_detector_pkg;

  typedef enum logic [1:0] {
    ST_A = 2'b00,
    ST_B = 2'b01,
    ST_C = 2'b10,
    ST_D = 2'b11
  } seq_state_t;

  typedef enum logic [1:0] {
    EDGE_SI = 2'b00,
    EDGE_S0 = 2'b01,
    EDGE_S1 = 2'b10
  } edge_state_t;

endpackage
