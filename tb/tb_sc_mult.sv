// tb_sc_mult: self-checking testbench for the stochastic multipliers.
// Checks the unipolar (AND) and bipolar (XNOR) gates on all input pairs, and
// checks statistically that with independent random input streams the
// output density is the product of the input values (unipolar) and of the
// bipolar values (x+1)/2 mappings.
module tb_sc_mult;
  logic a, b, zu, zb;
  int checks = 0;
  int failures = 0;

  sc_mult #(.BIPOLAR(1'b0)) dut_u (.a, .b, .z(zu));
  sc_mult #(.BIPOLAR(1'b1)) dut_b (.a, .b, .z(zb));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      a = i[0];
      b = i[1];
      #1;
      check(zu == (i == 3), $sformatf("AND %0d%0d", a, b));
      check(zb == (i == 0 || i == 3), $sformatf("XNOR %0d%0d", a, b));
    end
    // statistical products: pa = 0.75, pb = 0.25 over 40000 bits
    begin
      int nu, nb;
      real eu, eb;
      nu = 0;
      nb = 0;
      for (int k = 0; k < 40000; k++) begin
        a = ($urandom % 4) != 0;  // p = 0.75 (bipolar +0.5)
        b = ($urandom % 4) == 0;  // p = 0.25 (bipolar -0.5)
        #1;
        nu += int'(zu);
        nb += int'(zb);
      end
      eu = real'(nu) / 40000.0;               // expect 0.1875
      eb = 2.0 * real'(nb) / 40000.0 - 1.0;   // expect -0.25
      check(eu > 0.1775 && eu < 0.1975, $sformatf("unipolar product %f", eu));
      check(eb > -0.27 && eb < -0.23, $sformatf("bipolar product %f", eb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
