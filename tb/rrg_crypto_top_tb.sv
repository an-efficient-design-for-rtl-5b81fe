// rrg_crypto_top_tb: end-to-end test of the encryption/decryption design at
// its full size (80-bit main key, two 16-stage cascades).
//
// For a series of main keys it loads the key, waits a cycle, then encrypts
// every 4-bit plaintext, feeds the ciphertext back into the decryption path
// and checks that the plaintext returns; the ciphertext is also compared with
// the reference model. It then changes key_in without key_load and checks that
// the stored key and the ciphertexts stay as they were. Mechanisms counted:
// key loads, key holds, key changes that change the cipher, RRG stages
// configured as NOT, CNOT, Toffoli and 4-input Toffoli, encryptions that
// change the data and round trips; each must occur at least once.
module rrg_crypto_top_tb;
  import rrg_ref_pkg::*;

  localparam int N_KEYS = 100;

  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst_n, key_load;
  logic [79:0] key_in, key_q;
  logic [3:0]  pt_in, ct_out, ct_in, pt_out;
  logic [2:0]  enc_anc_o, dec_anc_o;

  rrg_crypto_top u_dut (
    .clk(clk), .rst_n(rst_n), .key_load(key_load), .key_in(key_in), .key_q(key_q),
    .pt_in(pt_in), .ct_out(ct_out), .ct_in(ct_in), .pt_out(pt_out),
    .enc_anc_o(enc_anc_o), .dec_anc_o(dec_anc_o)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_load = 0, n_hold = 0, n_cipher_change = 0, n_changed = 0, n_roundtrip = 0;
  int n_kind [4] = '{0, 0, 0, 0};

  // Encrypts and decrypts all 16 words under the stored key and compares
  // with the reference for key `key`. Returns the ciphertext table.
  task automatic run_all(input logic [79:0] key, output logic [63:0] ct_table);
    for (int v = 0; v < 16; v++) begin
      @(negedge clk);
      pt_in = 4'(v);
      #1;
      ct_in = ct_out;
      ct_table[4*v +: 4] = ct_out;
      #1;
      checks++;
      if (ct_out !== ref_encrypt(key, pt_in) || pt_out !== pt_in ||
          enc_anc_o !== 3'b111 || dec_anc_o !== 3'b111) begin
        failures++;
        if (failures < 10)
          $display("FAIL key=%h pt=%h: ct=%h exp=%h back=%h anc=%b/%b", key, pt_in, ct_out,
                   ref_encrypt(key, pt_in), pt_out, enc_anc_o, dec_anc_o);
      end
      if (ct_out != pt_in) n_changed++;
      if (pt_out == pt_in) n_roundtrip++;
    end
  endtask

  initial begin
    logic [79:0] key;
    logic [63:0] ct_a, ct_b, ct_prev;
    rst_n = 1'b0; key_load = 1'b0; key_in = '0; pt_in = '0; ct_in = '0;
    ct_prev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N_KEYS; n++) begin
      key = rand_key();
      // Make sure each gate kind appears: stage 0 NOT, 1 CNOT, 2 Toffoli, 3 T4.
      if (n == 0) begin
        key[4:0]   = 5'b00010;
        key[9:5]   = 5'b00111;
        key[14:10] = 5'b01101;
        key[19:15] = 5'b11100;
      end
      for (int s = 0; s < 16; s++) n_kind[ref_n_controls(key[5*s +: 5])]++;
      @(negedge clk);
      key_in = key; key_load = 1'b1;
      @(negedge clk);
      key_load = 1'b0;
      n_load++;
      checks++;
      if (key_q !== key) begin
        failures++;
        $display("FAIL key load: key_q=%h exp=%h", key_q, key);
      end
      run_all(key, ct_a);
      if (n > 0 && ct_a != ct_prev) n_cipher_change++;
      ct_prev = ct_a;
      // Hold: a new key_in without key_load changes nothing.
      @(negedge clk);
      key_in = ~key;
      @(negedge clk);
      n_hold++;
      run_all(key, ct_b);
      checks++;
      if (key_q !== key || ct_b !== ct_a) begin
        failures++;
        $display("FAIL key hold: key_q=%h exp=%h", key_q, key);
      end
    end
    $display("mechanisms: loads=%0d holds=%0d cipher_changes=%0d changed=%0d roundtrips=%0d NOT=%0d CNOT=%0d TOF=%0d T4=%0d",
             n_load, n_hold, n_cipher_change, n_changed, n_roundtrip,
             n_kind[0], n_kind[1], n_kind[2], n_kind[3]);
    checks++; if (n_load == 0)          failures++;
    checks++; if (n_hold == 0)          failures++;
    checks++; if (n_cipher_change == 0) failures++;
    checks++; if (n_changed == 0)       failures++;
    checks++; if (n_roundtrip == 0)     failures++;
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (n_kind[g] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
