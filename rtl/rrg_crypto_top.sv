// rrg_crypto_top: 4-bit encryption and decryption built entirely from
// reconfigurable reversible gates (RRGs).
//
// A main key register drives two combinational cascades of 16 RRGs each: the
// encryption cipher, stage i configured by key bits [5i+4:5i], and the
// decryption cipher, the same gates in reverse order. Under the same key the
// second undoes the first. The ancilla lines of both cascades are driven with
// constant ones inside; their outputs are brought out so that a user can see
// that the reversible circuits returned them to one. The loadable key register
// and the port names are this design's own.
//
// Interface: clk, rst_n (asynchronous, active low) and key_load/key_in load
// the 80-bit main key, key_q shows it. pt_in -> ct_out is encryption,
// ct_in -> pt_out decryption; enc_anc_o and dec_anc_o are the cascades'
// ancilla outputs (all ones in correct operation).
// Timing: a key is in use from the clock edge after key_load; the data paths
// are combinational, 16 RRGs deep.
module rrg_crypto_top
  import rrg_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  key_load,
  input  main_key_t             key_in,
  output main_key_t             key_q,
  input  data_t                 pt_in,
  output data_t                 ct_out,
  input  data_t                 ct_in,
  output data_t                 pt_out,
  output logic [ANC_LINES-1:0]  enc_anc_o,
  output logic [ANC_LINES-1:0]  dec_anc_o
);

  main_key_t enc_key_lines, dec_key_lines;

  key_register u_key (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (key_load),
    .key_in (key_in),
    .key_q  (key_q)
  );

  enc_cipher u_enc (
    .key_i (key_q),
    .anc_i (ANC_INIT),
    .x     (pt_in),
    .key_o (enc_key_lines),
    .anc_o (enc_anc_o),
    .y     (ct_out)
  );

  dec_cipher u_dec (
    .key_i (key_q),
    .anc_i (ANC_INIT),
    .x     (ct_in),
    .key_o (dec_key_lines),
    .anc_o (dec_anc_o),
    .y     (pt_out)
  );

  // The key lines leave both cascades unchanged, as in any reversible circuit;
  // they carry no new information and are checked here instead of brought out.
  always_comb begin
    assert (enc_key_lines == key_q && dec_key_lines == key_q)
      else $error("rrg_crypto_top: key lines changed inside a cipher cascade");
  end

endmodule
