// enc_cipher: encryption cipher, a cascade of N_STAGES reconfigurable
// reversible gates (RRGs) on a 4-bit data word.
//
// Stage i is configured by main-key bits key_i[5i+4:5i], stage 0 first. Each
// RRG applies one NCT gate chosen by its 5 key bits, so the cascade realises a
// key-selected permutation of the 16 data values; 15 gates already suffice
// for any reversible 4-bit function, 16 are used. As in the reversible
// circuit, the key lines and the three constant-1 ancilla lines run through
// every stage and come out unchanged, which a user can check (anc_o == '1).
//
// Interface: key_i main key, anc_i ancilla lines (drive '1), x plaintext;
// key_o, anc_o the lines leaving the cascade, y ciphertext.
// Timing: purely combinational, N_STAGES RRGs deep.
module enc_cipher
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
      .k_i   (key_i[s*CFG_BITS +: CFG_BITS]),
      .anc_i (a[s]),
      .x     (d[s]),
      .k_o   (key_o[s*CFG_BITS +: CFG_BITS]),
      .anc_o (a[s+1]),
      .y     (d[s+1])
    );
  end

  assign y     = d[STAGES];
  assign anc_o = a[STAGES];

endmodule
