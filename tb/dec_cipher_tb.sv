// dec_cipher_tb: checks the decryption cascade. For random main keys every
// plaintext word is encrypted with the reference model and the ciphertext is
// fed to the block, which must return the plaintext; its output is also
// compared with the reference decryption for every input word. Key and
// ancilla lines must leave unchanged.
module dec_cipher_tb;
  import rrg_ref_pkg::*;

  localparam int N_KEYS = 200;

  int checks = 0, failures = 0;
  int nontrivial = 0;

  logic [79:0] key_i, key_o;
  logic [2:0]  anc_o;
  logic [3:0]  x, y;

  dec_cipher u_dut (.key_i(key_i), .anc_i(3'b111), .x(x), .key_o(key_o), .anc_o(anc_o), .y(y));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N_KEYS; n++) begin
      key_i = (n == 0) ? '1 : rand_key();
      for (int v = 0; v < 16; v++) begin
        // Round trip.
        x = ref_encrypt(key_i, 4'(v));
        if (x != 4'(v)) nontrivial++;
        #1;
        checks++;
        if (y !== 4'(v) || key_o !== key_i || anc_o !== 3'b111) begin
          failures++;
          if (failures < 10) $display("FAIL key=%h ct=%h: pt=%h exp=%h", key_i, x, y, 4'(v));
        end
        // Direct comparison with the reference decryption.
        x = 4'(v);
        #1;
        checks++;
        if (y !== ref_decrypt(key_i, x)) begin
          failures++;
          if (failures < 10) $display("FAIL key=%h x=%h: y=%h exp=%h", key_i, x, y, ref_decrypt(key_i, x));
        end
      end
    end
    checks++;
    if (nontrivial == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
