// tb_addie: self-checking testbench for the ADDIE signal reconstructor.
//
// A 5-bit unipolar instance and a 5-bit bipolar instance share random input
// bits and random numbers. The testbench keeps its own model of the counter
// (Y' = Y + X - Z with Z = rn < Y, clamped to [0, 31]) and checks the output
// and the comparator bit every clock, including hold while en is low, the
// reset value 0 and saturation at full scale. It then checks the tracking
// behaviour: for a constant input density p the time-averaged output y/32
// settles at p, and after a step the output reaches the new level within a
// few time constants (2**N clocks).
module tb_addie;
  localparam int unsigned N = 5;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic x_bit;
  logic [N-1:0] rn;
  logic [N-1:0] yu, yb;
  logic zu, zb;

  int checks = 0;
  int failures = 0;
  int model;
  int sat_events = 0;

  addie #(.N(N), .BIPOLAR(1'b0)) dut_u (.clk, .rst_n, .en, .x_bit, .rn, .y(yu), .z_o(zu));
  addie #(.N(N), .BIPOLAR(1'b1)) dut_b (.clk, .rst_n, .en, .x_bit, .rn, .y(yb), .z_o(zb));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one clock with given inputs; compares the DUT with the model
  task automatic step(input bit xb, input bit e, input int rnv);
    int z;
    x_bit = xb;
    en = e;
    rn = N'(rnv);
    #1;
    z = (rnv < model) ? 1 : 0;
    check(int'(zu) == z && int'(zb) == z, $sformatf("z model=%0d rn=%0d", model, rnv));
    @(posedge clk);
    if (e) begin
      if (xb && z == 0 && model == 31) sat_events++;
      model = model + int'(xb) - z;
      if (model > 31) model = 31;
    end
    @(negedge clk);
    check(int'(yu) == model, $sformatf("y=%0d model=%0d", yu, model));
    check(yb == (N'(model) ^ 5'h10), $sformatf("bipolar y=%0d model=%0d", yb, model));
  endtask

  initial begin
    rst_n = 1'b0;
    en = 1'b0;
    x_bit = 1'b0;
    rn = '0;
    model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(yu == 0, "reset value");
    // random bits, random enables
    for (int k = 0; k < 3000; k++) step(1'($urandom), ($urandom % 8) != 0, int'($urandom % 32));
    // drive to full scale and hold there with rn = 31 (forces saturation)
    for (int k = 0; k < 200; k++) step(1'b1, 1'b1, (k % 2 == 0) ? 31 : int'($urandom % 32));
    check(model == 31 && yu == 31, "reached full scale");
    check(sat_events > 0, "saturation exercised");
    // constant density p = 0.25 with uniform random numbers: average of y/32
    begin
      real acc;
      acc = 0.0;
      for (int k = 0; k < 6000; k++) begin
        step(($urandom % 4) == 0, 1'b1, int'($urandom % 32));
        if (k == 255) check(yu < 14, $sformatf("step response after 8 time constants y=%0d", yu));
        if (k >= 1000) acc += real'(yu) / 32.0;
      end
      acc = acc / 5000.0;
      check(acc > 0.22 && acc < 0.28, $sformatf("tracks p=0.25: mean %f", acc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
