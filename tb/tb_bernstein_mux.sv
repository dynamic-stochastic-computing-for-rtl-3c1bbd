// tb_bernstein_mux: self-checking testbench for the Bernstein multiplexing
// circuit (order 3). Checks select value and output for every combination of
// input bits and coefficient bits, then checks statistically that independent
// streams of value x = 0.6 and the coefficients {0, 2/11, 5/11, 1} give an
// output density of f(0.6) = (2x^3 + 3x^2 + 6x)/11.
module tb_bernstein_mux;
  localparam int unsigned ORDER = 3;

  logic [ORDER-1:0] x;
  logic [ORDER:0]   b;
  logic [1:0]       sel;
  logic             y;
  int checks = 0;
  int failures = 0;

  bernstein_mux #(.ORDER(ORDER)) dut (.x, .b, .sel, .y);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int xi = 0; xi < 8; xi++) begin
      for (int bi = 0; bi < 16; bi++) begin
        int ones;
        x = ORDER'(xi);
        b = (ORDER+1)'(bi);
        #1;
        ones = int'(x[0]) + int'(x[1]) + int'(x[2]);
        check(int'(sel) == ones, $sformatf("sel x=%b", x));
        check(y == b[ones], $sformatf("y x=%b b=%b", x, b));
      end
    end
    begin
      int n1;
      real xv, f, e;
      xv = 0.6;
      n1 = 0;
      for (int k = 0; k < 100000; k++) begin
        for (int i = 0; i < ORDER; i++) x[i] = (real'($urandom % 100000) / 100000.0) < xv;
        b[0] = 1'b0;
        b[1] = (real'($urandom % 100000) / 100000.0) < 2.0 / 11.0;
        b[2] = (real'($urandom % 100000) / 100000.0) < 5.0 / 11.0;
        b[3] = 1'b1;
        #1;
        n1 += int'(y);
      end
      f = (2.0 * xv * xv * xv + 3.0 * xv * xv + 6.0 * xv) / 11.0;
      e = real'(n1) / 100000.0;
      check(e > f - 0.01 && e < f + 0.01, $sformatf("density %f expected %f", e, f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
