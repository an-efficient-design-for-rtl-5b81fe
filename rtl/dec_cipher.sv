// dec_cipher: decryption cipher, the encryption cascade of reconfigurable
// reversible gates (RRGs) with the order of its gates reversed.
//
// Stage s is configured by main-key bits of gate 15-s of the encryption
// cascade, key_i[5(15-s)+4 : 5(15-s)], so the last encryption gate is undone
// first. Every configured RRG is a single NCT gate and hence its own inverse,
// so under the same main key this cascade maps ciphertext back to plaintext.
// Key and ancilla lines run through unchanged, as in the encryption cipher.
//
// Interface: key_i main key (same word as for encryption), anc_i ancilla lines
// (drive '1), x ciphertext; key_o, anc_o the lines leaving the cascade,
// y plaintext. Timing: purely combinational, N_STAGES RRGs deep.
module dec_cipher
  import rrg_pkg::*;
#(
  parameter int unsigned STAGES = N_STAGES
) (
  input  logic [STAGES*CFG_BITS-1:0] key_i,
  input  logic [ANC_LINES-1:0]       anc_i,
  input  data_t                      x,
  output logic [STAGES*CFG_BITS-1:0] key_o,
  output logic [ANC_LINES-1:0]       anc_o,
  output data_t                      y
);

  // Lines between stages: index s is in front of stage s.
  data_t                 d   [STAGES+1];
  logic [ANC_LINES-1:0]  a   [STAGES+1];

  assign d[0] = x;
  assign a[0] = anc_i;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    rrg u_rrg (
      .k_i   (key_i[(STAGES-1-s)*CFG_BITS +: CFG_BITS]),
      .anc_i (a[s]),
      .x     (d[s]),
      .k_o   (key_o[(STAGES-1-s)*CFG_BITS +: CFG_BITS]),
      .anc_o (a[s+1]),
      .y     (d[s+1])
    );
  end

  assign y     = d[STAGES];
  assign anc_o = a[STAGES];

endmodule
