// rrg_tb: exhaustive check of the reconfigurable reversible gate over all 32
// configurations and all 16 data words. The data output is compared with the
// reference model; the configuration and ancilla lines must leave unchanged.
// It also checks that the 32 configurations give 32 different gates and that
// they are 4 NOT, 12 CNOT, 12 Toffoli and 4 four-input Toffoli gates.
module rrg_tb;
  import rrg_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_kind [4] = '{0, 0, 0, 0};

  logic [4:0] k_i, k_o;
  logic [2:0] anc_i, anc_o;
  logic [3:0] x, y;

  rrg u_dut (.k_i(k_i), .anc_i(anc_i), .x(x), .k_o(k_o), .anc_o(anc_o), .y(y));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] table_of [32];
    anc_i = 3'b111;
    for (int k = 0; k < 32; k++) begin
      table_of[k] = '0;
      for (int v = 0; v < 16; v++) begin
        k_i = 5'(k);
        x   = 4'(v);
        #1;
        table_of[k][4*v +: 4] = y;
        checks++;
        if (y !== ref_rrg(k_i, x) || k_o !== k_i || anc_o !== 3'b111) begin
          failures++;
          if (failures < 10)
            $display("FAIL k=%b x=%b: y=%b exp=%b k_o=%b anc_o=%b", k_i, x, y, ref_rrg(k_i, x), k_o, anc_o);
        end
      end
      n_kind[ref_n_controls(5'(k))]++;
    end
    // 32 distinct gates.
    for (int a = 0; a < 32; a++)
      for (int b = a + 1; b < 32; b++) begin
        checks++;
        if (table_of[a] == table_of[b]) begin
          failures++;
          $display("FAIL configurations %0d and %0d give the same gate", a, b);
        end
      end
    checks++;
    if (n_kind[0] != 4 || n_kind[1] != 12 || n_kind[2] != 12 || n_kind[3] != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
