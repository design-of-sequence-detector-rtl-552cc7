// jk_ff: JK flip-flop with complementary outputs.
//
// On each rising clock edge Q follows the JK characteristic
// Q+ = J.~Q | ~K.Q: J=K=0 holds, J=0 K=1 clears, J=1 K=0 sets and J=K=1
// toggles. q_n is always the complement of q.
//
// Interface: clk, synchronous active-high rst (clears Q, takes priority over
// J and K), inputs j and k, outputs q and q_n. Q changes only at the rising
// edge; j and k are sampled there.
//
// The JK behaviour is the standard one that the detector's excitation table
// assumes. The clock edge and the synchronous clear are this design's own
// choices.
module jk_ff (
  input  logic clk,
  input  logic rst,
  input  logic j,
  input  logic k,
  output logic q,
  output logic q_n
);

  always_ff @(posedge clk) begin
    if (rst) q <= 1'b0;
    else     q <= (j & ~q) | (~k & q);
  end

  assign q_n = ~q;

endmodule
