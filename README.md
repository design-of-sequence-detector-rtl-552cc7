# Overlapping 1101 sequence detector: one machine, two implementations

A sequence detector watches a serial bit stream, one bit per clock. It raises
its output in the very cycle that the last four bits read `1101`. This
detector *overlaps*. The final `1` of one match may be the first `1` of the
next, so `1101101` reports two matches, not one.

The machine is a four-state Mealy FSM. Its output depends on the present
state and on the current input bit. The RTL builds it twice, and both
versions sit in one top level on a shared input:

* **`seq1101_mealy`** is the behavioural form: an enumerated state register
  plus a next-state/output `case`.
* **`seq1101_jk`** is the gate-level form: two JK flip-flops, A and B, whose
  J/K inputs come from Karnaugh-map-minimised equations.

A small, unrelated example, an edge-detector Mealy machine, stands beside them
in the same top with its own input and output.

## The state machine

Each state holds the longest prefix of `1101` that the received bits end with:

| state | code {A,B} | meaning              | x = 0    | x = 1           |
|-------|------------|----------------------|----------|-----------------|
| a (S0)| 00         | no prefix            | a, out 0 | b, out 0        |
| b (S1)| 01         | last bit `1`         | a, out 0 | c, out 0        |
| c (S2)| 10         | last bits `11`       | d, out 0 | c, out 0        |
| d (S3)| 11         | last bits `110`      | a, out 0 | **b, out 1**    |

Two transitions need a closer look:

* **c stays in c on a `1`.** Any run of ones ends in `11`, which is still a
  valid start of `1101`. So `0111101` matches at its last bit.
* **d goes to b, not to a, on the matching `1`.** That `1` is kept as the
  first bit of the next candidate. This is what makes the detector overlap. A
  non-overlapping detector would go back to a here. That variant is not
  built.

The output is Mealy. It is combinational from state and input, valid during
the cycle of the input bit, and must be sampled before the rising edge that
consumes that bit. Examples, with one output bit per input bit:

| input      | output     |
|------------|------------|
| `01101101` | `00001001` |
| `001110`   | `000000`   |
| `0111101`  | `0000001`  |
| `0001`     | `0000`     |

## The JK flip-flop implementation

The state codes above (a=00, b=01, c=10, d=11) are the flip-flop contents
{A,B}. For each transition, the JK excitation rule gives the J and K each
flip-flop needs:

* 0→0 needs J=0, K don't care.
* 0→1 needs J=1, K don't care.
* 1→0 needs J don't care, K=1.
* 1→1 needs J don't care, K=0.

Minimising each of the four functions over (A, B, X), with its don't-cares,
gives:

```
JA = B·X        KA = B
JB = A ⊕ X      KB = ¬A + ¬X
Y  = A·B·X
```

`seq1101_jk_logic` holds exactly these five equations. `seq1101_jk` wires that
logic to two `jk_ff` instances. Each `jk_ff` computes Q⁺ = J·¬Q + ¬K·Q on the
rising edge and also provides ¬Q. The minimised logic never uses ¬Q, so it is
left open.

Both implementations use the same encoding, so their states are equal in every
cycle. `seq_detector_top` asserts that after every clock edge (an immediate
assertion in a clocked block, active whenever reset is low).

## The edge-detector example

`edge_detector_mealy` is a three-state Mealy machine:

* It starts in SI, where no input has been seen yet.
* After that it sits in S0 or S1, named after the last input bit.
* Its output is the XOR of the previous and the current input bit, so it
  outputs 1 whenever the input flips.
* From SI the output is 0, because there is no previous bit.
* Its codes are SI=00, S0=01, S1=10.

## Files

| file | contents |
|------|----------|
| `rtl/seq_detector_pkg.sv` | `seq_state_t` (a–d) and `edge_state_t` (SI/S0/S1) enums |
| `rtl/seq1101_mealy.sv` | behavioural 1101 detector |
| `rtl/jk_ff.sv` | JK flip-flop with Q and ¬Q |
| `rtl/seq1101_jk_logic.sv` | JA, KA, JB, KB, Y equations |
| `rtl/seq1101_jk.sv` | 1101 detector from two `jk_ff` + `seq1101_jk_logic` |
| `rtl/edge_detector_mealy.sv` | XOR-of-last-two-bits edge detector |
| `rtl/seq_detector_top.sv` | top: both 1101 detectors on input `x`, edge detector on `edge_x` |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Top-level ports: `clk`, `rst`, `x`, `z_behav`, `y_jk`, `state_behav[1:0]`,
`state_jk[1:0]`, `edge_x`, `edge_z`, `state_edge[1:0]`. The design has no
parameters. The pattern is fixed by the state table.

## Clocking and reset

All state changes on the rising edge of `clk`. `rst` is synchronous and active
high. It puts the 1101 detectors in state a (both JK flip-flops cleared) and
the edge detector in SI. The original machines have no reset. They rely on
the state's initial value at power-up, so the reset is an addition of this
RTL, and the rising edge is this RTL's choice. Everything is plain
synthesizable SystemVerilog: no memories, no latches, six flip-flops in all.

## Verification

Each testbench checks the design against a reference it computes
independently. It prints `TB_RESULT checks=N failures=M` and stops through a
watchdog if it hangs.

* `tb_jk_ff` applies about 1000 random J/K/reset cycles against the JK truth
  table, and checks that all four J/K combinations occurred.
* `tb_seq1101_jk_logic` covers all eight (A,B,X) cases. It checks every J/K
  value that the excitation table fixes, and that the J/K values, applied to
  JK flip-flops, reach the table's next state. It also checks Y.
* `tb_seq1101_mealy` and `tb_seq1101_jk` first run the four example strings
  above. They then run 4000 random bits, biased towards ones, with occasional
  resets. The reference keeps the last three bits. It expects
  `out = ({last3, x} == 4'b1101)` in the bit's own cycle, and the
  longest-prefix state after each edge.
* `tb_edge_detector_mealy` drives random bits and checks z = previous ⊕
  current, the state, and the zero output out of SI.
* `tb_seq_detector_top` is the end-to-end test, run at the design's only
  configuration. It runs the example strings and then 10 000 random cycles on
  both inputs. It checks every output and state, including that both 1101
  implementations agree. It also counts how often each mechanism occurred and
  fails if any never did. The mechanisms are: a match, an overlapping match,
  b→a, c→c, d→a, a reset in mid-stream, and a rising and a falling edge at the
  edge detector.

To run one with Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/seq_detector_pkg.sv tb/tb_seq_detector_top.sv --top-module tb_seq_detector_top
./obj_dir/Vtb_seq_detector_top
```

## Departures and limits

* **Reset and clock edge.** The synchronous reset and the rising-edge
  clocking are additions (see above). Without the reset, a two-state
  simulator or real silicon would start in an arbitrary state.
* **Shared encoding.** The behavioural detector uses the same binary state
  encoding as the flip-flop version. A synthesis tool could choose another
  encoding for an enumerated FSM; fixing it makes the two directly
  comparable.
* **Fixed pattern.** Only `1101` is detected, and the pattern is not a
  parameter. A different pattern needs a new state table and, for the JK
  version, new equations.
* **Not built: non-overlapping detector.** Overlapping detection is the design
  here; the non-overlapping variant (d→a on a match) is described only as a
  contrast.
* **Not built: Moore example.** A three-state Moore machine with two-bit state
  and output labels is shown only as an illustration. Its function is not
  stated, so it has no RTL.
* **Not built: other flip-flop types.** SR, D and T flip-flops are only listed
  as types; nothing uses them.
