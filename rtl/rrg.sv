// rrg: reconfigurable reversible gate (RRG).
//
// A 12-line reversible circuit whose five configuration lines K0..K4 select
// which one of the 32 positive-polarity NCT gates on four lines (4 NOT,
// 12 CNOT, 12 Toffoli, 4 four-input Toffoli) is applied to the data lines
// X0..X3. It is built only from standard reversible gates, 13 of them, B0..B12:
//
//   B0..B2  Fredkin gates steered by K0 and K1 route the data line chosen as
//           target onto line X3 (K1K0 = 00 -> X3, 01 -> X2, 10 -> X1,
//           11 -> X0) and the other three data lines onto X0..X2.
//   B3..B5  Toffoli gates with control Kj (positive) and one data line
//           (negative) turn each constant-1 ancilla into "Kj = 0 or data = 1":
//           a configuration bit of 0 leaves that control out of the gate.
//   B6      a 4-input Toffoli on the three ancillas inverts the routed target.
//   B7..B9  repeat B5..B3 and so restore the ancillas to 1.
//   B10..B12 repeat B2..B0 and so put the data lines back in their order.
//
// K2, K3 and K4 enable the data line routed to X0, X1 and X2 as a control.
// The gate list, line numbers and polarities are those of the RRG definition;
// the port grouping (k, ancilla, data) is this design's own. K and the
// ancillas pass through so that a cascade can be built line for line.
//
// Interface: k_i/k_o configuration lines K0..K4 (bit j = Kj), anc_i/anc_o the
// three ancillary lines (drive all ones, they leave as all ones), x data in
// (bit j = Xj), y data out. Timing: purely combinational.
module rrg
  import rrg_pkg::*;
(
  input  rrg_cfg_t                k_i,
  input  logic [ANC_LINES-1:0]    anc_i,
  input  data_t                   x,
  output rrg_cfg_t                k_o,
  output logic [ANC_LINES-1:0]    anc_o,
  output data_t                   y
);

  // kx[g] is the 12-line word in front of gate Bg; kx[13] leaves the RRG.
  rrg_lines_t kx [14];

  assign kx[0] = {x, anc_i, k_i};

  // Target selection.
  fredkin_gate #(.N(RRG_LINES), .C(L_K0), .L1(L_X2), .L2(L_X3)) u_b0 (.x(kx[0]), .y(kx[1]));
  fredkin_gate #(.N(RRG_LINES), .C(L_K0), .L1(L_X0), .L2(L_X1)) u_b1 (.x(kx[1]), .y(kx[2]));
  fredkin_gate #(.N(RRG_LINES), .C(L_K1), .L1(L_X1), .L2(L_X3)) u_b2 (.x(kx[2]), .y(kx[3]));

  // Control selection onto the ancillas.
  nct_gate #(.N(RRG_LINES), .C1(L_K2), .A1(1'b0), .C2(L_X0), .A2(1'b1), .C3(RRG_LINES), .A3(1'b0), .T(L_A0))
    u_b3 (.x(kx[3]), .y(kx[4]));
  nct_gate #(.N(RRG_LINES), .C1(L_K3), .A1(1'b0), .C2(L_X1), .A2(1'b1), .C3(RRG_LINES), .A3(1'b0), .T(L_A1))
    u_b4 (.x(kx[4]), .y(kx[5]));
  nct_gate #(.N(RRG_LINES), .C1(L_K4), .A1(1'b0), .C2(L_X2), .A2(1'b1), .C3(RRG_LINES), .A3(1'b0), .T(L_A2))
    u_b5 (.x(kx[5]), .y(kx[6]));

  // The configured gate itself.
  nct_gate #(.N(RRG_LINES), .C1(L_A0), .A1(1'b0), .C2(L_A1), .A2(1'b0), .C3(L_A2), .A3(1'b0), .T(L_X3))
    u_b6 (.x(kx[6]), .y(kx[7]));

  // Ancilla restoration.
  nct_gate #(.N(RRG_LINES), .C1(L_K4), .A1(1'b0), .C2(L_X2), .A2(1'b1), .C3(RRG_LINES), .A3(1'b0), .T(L_A2))
    u_b7 (.x(kx[7]), .y(kx[8]));
  nct_gate #(.N(RRG_LINES), .C1(L_K3), .A1(1'b0), .C2(L_X1), .A2(1'b1), .C3(RRG_LINES), .A3(1'b0), .T(L_A1))
    u_b8 (.x(kx[8]), .y(kx[9]));
  nct_gate #(.N(RRG_LINES), .C1(L_K2), .A1(1'b0), .C2(L_X0), .A2(1'b1), .C3(RRG_LINES), .A3(1'b0), .T(L_A0))
    u_b9 (.x(kx[9]), .y(kx[10]));

  // Output order restoration.
  fredkin_gate #(.N(RRG_LINES), .C(L_K1), .L1(L_X1), .L2(L_X3)) u_b10 (.x(kx[10]), .y(kx[11]));
  fredkin_gate #(.N(RRG_LINES), .C(L_K0), .L1(L_X0), .L2(L_X1)) u_b11 (.x(kx[11]), .y(kx[12]));
  fredkin_gate #(.N(RRG_LINES), .C(L_K0), .L1(L_X2), .L2(L_X3)) u_b12 (.x(kx[12]), .y(kx[13]));

  assign k_o   = kx[13][L_K4:L_K0];
  assign anc_o = kx[13][L_A2:L_A0];
  assign y     = kx[13][L_X3:L_X0];

endmodule
