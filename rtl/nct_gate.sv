// nct_gate: a mixed-polarity NOT / CNOT / Toffoli / 4-input Toffoli gate
// placed on a bundle of N reversible lines.
//
// The gate inverts target line T when every used control line Ci differs from
// its polarity coefficient Ai: with Ai = 0 the control acts on a 1 (positive
// control, drawn as a filled dot), with Ai = 1 it acts on a 0 (negative
// control, drawn as a hollow dot). Up to three controls can be used; a control
// index equal to N marks it unused, so three unused controls give a NOT gate,
// one used control a CNOT, two a Toffoli and three a 4-input Toffoli. All
// lines other than the target pass unchanged and the gate is its own inverse.
//
// Interface: x is the line word before the gate, y the word after it; bit i is
// line i. Timing: purely combinational.
module nct_gate #(
  parameter int unsigned N  = 12,
  parameter int unsigned C1 = 12,
  parameter bit          A1 = 1'b0,
  parameter int unsigned C2 = 12,
  parameter bit          A2 = 1'b0,
  parameter int unsigned C3 = 12,
  parameter bit          A3 = 1'b0,
  parameter int unsigned T  = 0
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] y
);

  initial begin
    assert (T < N && C1 <= N && C2 <= N && C3 <= N && C1 != T && C2 != T && C3 != T)
      else $error("nct_gate: bad line numbers");
  end

  // Used control lines and their polarity coefficients as line masks; an
  // unused control (index N) contributes nothing.
  localparam logic [N-1:0] ONE = N'(1);
  localparam logic [N-1:0] CTL_MASK =
      ((C1 < N) ? (ONE << C1) : '0) | ((C2 < N) ? (ONE << C2) : '0) |
      ((C3 < N) ? (ONE << C3) : '0);
  localparam logic [N-1:0] POL_MASK =
      ((C1 < N && A1) ? (ONE << C1) : '0) | ((C2 < N && A2) ? (ONE << C2) : '0) |
      ((C3 < N && A3) ? (ONE << C3) : '0);

  logic fire;

  // Fire when every used control differs from its coefficient.
  assign fire = &((x ^ POL_MASK) | ~CTL_MASK);

  always_comb begin
    y    = x;
    y[T] = x[T] ^ fire;
  end

endmodule
