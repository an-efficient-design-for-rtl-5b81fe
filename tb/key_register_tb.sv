// key_register_tb: checks reset to zero, loading a key on a clock edge with
// load high, holding it while load is low (with key_in changing), and an
// asynchronous reset in mid-operation. The expected contents are tracked by
// the testbench.
module key_register_tb;

  int checks = 0, failures = 0;
  int loads = 0, holds = 0;

  logic        clk = 1'b0;
  logic        rst_n, load;
  logic [79:0] key_in, key_q, model;

  key_register u_dut (.clk(clk), .rst_n(rst_n), .load(load), .key_in(key_in), .key_q(key_q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (key_q !== model) begin
      failures++;
      if (failures < 10) $display("FAIL %s: key_q=%h exp=%h", what, key_q, model);
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; key_in = '1;
    model = '0;
    #12;
    check("reset");
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      load   = ($urandom_range(0, 2) == 0);
      key_in = 80'({$urandom, $urandom, $urandom});
      @(posedge clk);
      if (load) begin model = key_in; loads++; end
      else if (key_in != model) holds++;
      #1;
      check("step");
    end
    // Asynchronous reset between edges.
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    model = '0;
    check("async reset");
    checks++;
    if (loads == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
