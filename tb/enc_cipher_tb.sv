// enc_cipher_tb: checks the 16-stage encryption cascade against the reference
// model for a set of random main keys plus the all-zero and all-one keys,
// over all 16 plaintext words. For each key the 16 ciphertexts must also form
// a permutation, and the key and ancilla lines must leave unchanged.
module enc_cipher_tb;
  import rrg_ref_pkg::*;

  localparam int N_KEYS = 200;

  int checks = 0, failures = 0;
  int changed = 0;

  logic [79:0] key_i, key_o;
  logic [2:0]  anc_o;
  logic [3:0]  x, y;

  enc_cipher u_dut (.key_i(key_i), .anc_i(3'b111), .x(x), .key_o(key_o), .anc_o(anc_o), .y(y));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N_KEYS; n++) begin
      logic [15:0] seen;
      key_i = (n == 0) ? '0 : (n == 1) ? '1 : rand_key();
      seen = '0;
      for (int v = 0; v < 16; v++) begin
        x = 4'(v);
        #1;
        seen[y] = 1'b1;
        if (y != x) changed++;
        checks++;
        if (y !== ref_encrypt(key_i, x) || key_o !== key_i || anc_o !== 3'b111) begin
          failures++;
          if (failures < 10)
            $display("FAIL key=%h x=%h: y=%h exp=%h anc_o=%b", key_i, x, y, ref_encrypt(key_i, x), anc_o);
        end
      end
      checks++;
      if (seen != 16'hFFFF) failures++;
    end
    checks++;
    if (changed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
