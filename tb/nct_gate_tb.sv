// nct_gate_tb: exhaustive check of the mixed-polarity NCT gate as NOT, CNOT,
// Toffoli and 4-input Toffoli, with positive, negative and mixed controls, on
// a 12-line bundle. Expected values follow the gate definition: the target is
// inverted when the product of (x[ci] xor ai) over the used controls is 1.
module nct_gate_tb;

  int checks = 0, failures = 0;
  int fired [5] = '{0, 0, 0, 0, 0};

  logic [11:0] x;
  logic [11:0] y [5];

  // NOT on line 3.
  nct_gate #(.N(12), .T(3)) u_not (.x(x), .y(y[0]));
  // CNOT, positive control 1, target 11.
  nct_gate #(.N(12), .C1(1), .A1(1'b0), .T(11)) u_cnot (.x(x), .y(y[1]));
  // Toffoli, control 2 positive, control 8 negative, target 5.
  nct_gate #(.N(12), .C1(2), .A1(1'b0), .C2(8), .A2(1'b1), .T(5)) u_tof (.x(x), .y(y[2]));
  // 4-input Toffoli, all positive, controls 5, 6, 7, target 11.
  nct_gate #(.N(12), .C1(5), .C2(6), .C3(7), .T(11)) u_t4 (.x(x), .y(y[3]));
  // 4-input Toffoli, all negative, controls 0, 9, 4, target 10.
  nct_gate #(.N(12), .C1(0), .A1(1'b1), .C2(9), .A2(1'b1), .C3(4), .A3(1'b1), .T(10)) u_t4n (.x(x), .y(y[4]));

  // Independent description of the five gates.
  localparam int TGT [5]    = '{3, 11, 5, 11, 10};
  localparam int NC  [5]    = '{0, 1, 2, 3, 3};
  localparam int CL  [5][3] = '{'{0,0,0}, '{1,0,0}, '{2,8,0}, '{5,6,7}, '{0,9,4}};
  localparam bit AP  [5][3] = '{'{0,0,0}, '{0,0,0}, '{0,1,0}, '{0,0,0}, '{1,1,1}};

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      x = 12'(v);
      #1;
      for (int g = 0; g < 5; g++) begin
        logic prod;
        logic [11:0] e;
        prod = 1'b1;
        for (int c = 0; c < NC[g]; c++) prod = prod & (x[CL[g][c]] ^ AP[g][c]);
        e = x;
        e[TGT[g]] = x[TGT[g]] ^ prod;
        if (prod) fired[g]++;
        checks++;
        if (y[g] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL gate %0d: x=%b y=%b exp=%b", g, x, y[g], e);
        end
      end
    end
    for (int g = 0; g < 5; g++) begin
      checks++;
      if (fired[g] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
