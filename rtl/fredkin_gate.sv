// fredkin_gate: a Fredkin (controlled-swap) gate placed on a bundle of N
// reversible lines.
//
// Line C is the control. When it is 1, lines L1 and L2 exchange their values;
// when it is 0 they pass unchanged. The control line and every other line
// always pass straight through, so the gate is its own inverse. The bundle
// form, with the line numbers given as parameters, mirrors how the RRG is
// described as a list of gates acting on one 12-line word.
//
// Interface: x is the line word before the gate, y the word after it; bit i is
// line i. Timing: purely combinational, no clock.
module fredkin_gate #(
  parameter int unsigned N  = 12,
  parameter int unsigned C  = 0,
  parameter int unsigned L1 = 1,
  parameter int unsigned L2 = 2
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] y
);

  initial begin
    assert (C < N && L1 < N && L2 < N && C != L1 && C != L2 && L1 != L2)
      else $error("fredkin_gate: lines must be distinct and below N");
  end

  always_comb begin
    y = x;
    if (x[C]) begin
      y[L1] = x[L2];
      y[L2] = x[L1];
    end
  end

endmodule
