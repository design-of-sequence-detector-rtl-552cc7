// seq1101_jk_logic: next-state and output logic of the JK flip-flop 1101
// detector.
//
// From the present state bits a, b (flip-flops A and B, S0=00 .. S3=11) and
// the input bit x it forms the four flip-flop excitations and the Mealy
// output. The equations are the Karnaugh-map minimised ones:
//   JA = B.X          KA = B
//   JB = A xor X      KB = ~A + ~X
//   Y  = A.B.X
// Applied to JK flip-flops they give the state table of seq1101_mealy.
//
// Interface: purely combinational, no clock; inputs a, b, x; outputs ja, ka,
// jb, kb, y. The equations follow the published design. KA is simply the
// state bit B, so that output is a plain wire from input b.
module seq1101_jk_logic (
  input  logic a,
  input  logic b,
  input  logic x,
  output logic ja,
  output logic ka,
  output logic jb,
  output logic kb,
  output logic y
);

  assign ja = b & x;
  assign ka = b;
  assign jb = a ^ x;
  assign kb = ~a | ~x;
  assign y  = a & b & x;

endmodule
