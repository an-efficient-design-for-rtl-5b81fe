// fredkin_gate_tb: exhaustive check of the Fredkin gate on two placements,
// the default one and a 12-line gate with control 5 swapping lines 11 and 0.
// Expected values are built bit by bit from the controlled-swap definition.
module fredkin_gate_tb;

  int checks = 0, failures = 0;
  int swaps = 0;

  logic [11:0] x, y_a, y_b, exp_a, exp_b;

  fredkin_gate u_a (.x(x), .y(y_a));
  fredkin_gate #(.N(12), .C(5), .L1(11), .L2(0)) u_b (.x(x), .y(y_b));

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
      exp_a = x;
      if (x[0]) begin exp_a[1] = x[2]; exp_a[2] = x[1]; end
      exp_b = x;
      if (x[5]) begin exp_b[11] = x[0]; exp_b[0] = x[11]; end
      if (x[5] && x[0] != x[11]) swaps++;
      checks++;
      if (y_a !== exp_a) begin
        failures++;
        if (failures < 10) $display("FAIL a: x=%b y=%b exp=%b", x, y_a, exp_a);
      end
      checks++;
      if (y_b !== exp_b) begin
        failures++;
        if (failures < 10) $display("FAIL b: x=%b y=%b exp=%b", x, y_b, exp_b);
      end
    end
    checks++;
    if (swaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
