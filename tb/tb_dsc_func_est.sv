// tb_dsc_func_est: self-checking testbench for the DSC function estimator.
//
// Workload: x(t) = exp(-2t) for one second, sampled at 2**12 Hz and again at
// 2**16 Hz, as 8-bit fractions, with the Bernstein coefficients
// {0, 2/11, 5/11, 1} given as 9-bit fractions {0, 47, 116, 256}/256. The
// estimator should then follow f(x(t)) = (2e^-6t + 3e^-4t + 6e^-2t)/11.
// The testbench
//   - models the comparators, the adder-and-multiplexer and the saturating
//     ADDIE counter itself, taking only the Sobol random numbers from the
//     generator, and checks every DSS bit, select value and output sample;
//   - checks one output per clock and out_valid one clock after in_valid;
//   - checks that every select value 0..3 occurs;
//   - computes SNR = 10 log10(sum f^2 / sum e^2) against the exact f(x(t)),
//     leaving out the ADDIE warm-up (the first 4 * 2**N samples, during which
//     the counter climbs from its reset value 0 towards f(1) = 1), and
//     requires at least 20 dB (about 23-27 dB is expected).
module tb_dsc_func_est;
  localparam int unsigned W     = 8;
  localparam int unsigned RW    = 16;
  localparam int unsigned N     = 6;
  localparam int unsigned ORDER = 3;
  localparam int COEF [4] = '{0, 47, 116, 256};

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [W-1:0] x_s;
  logic [W:0] coef [ORDER+1];
  logic [ORDER-1:0] x_dss;
  logic [ORDER:0] coef_dss;
  logic [1:0] sel;
  logic f_dss, out_valid;
  logic [N-1:0] f_rec;

  int checks = 0;
  int failures = 0;
  int sel_seen [4];

  dsc_func_est dut (
    .clk, .rst_n, .in_valid, .x_s, .coef, .x_dss, .coef_dss, .sel, .f_dss, .f_rec, .out_valid
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [W-1:0] quant(input real v);
    int q;
    q = int'($floor(v * 256.0));
    if (q > 255) q = 255;
    if (q < 0) q = 0;
    return W'(q);
  endfunction

  task automatic run_est(input int lg_fs, output real snr);
    int model;
    int nsamp;
    int warm;
    real sf, se;
    nsamp = 1 << lg_fs;
    warm = 4 << N;
    model = 0;
    sf = 0.0;
    se = 0.0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < nsamp; k++) begin
      real t, xv, fv;
      int xb [ORDER];
      int s, rc, cb, fb, rr, zz;
      t = real'(k) / real'(nsamp);
      xv = $exp(-2.0 * t);
      fv = (2.0 * xv * xv * xv + 3.0 * xv * xv + 6.0 * xv) / 11.0;
      x_s = quant(xv);
      in_valid = 1'b1;
      #1;
      s = 0;
      for (int i = 0; i < ORDER; i++) begin
        xb[i] = (int'(dut.u_rng.rn[i][RW-1 -: W]) < int'(x_s)) ? 1 : 0;
        s += xb[i];
        check(int'(x_dss[i]) == xb[i], $sformatf("x DSS %0d at %0d", i, k));
      end
      rc = int'(dut.u_rng.rn[ORDER][RW-1 -: W]);
      cb = (rc < COEF[s]) ? 1 : 0;
      fb = cb;
      check(int'(sel) == s, $sformatf("sel at %0d", k));
      check(int'(f_dss) == fb, $sformatf("f DSS at %0d", k));
      sel_seen[s]++;
      rr = int'(dut.u_rng.rn[ORDER+1][RW-1 -: N]);
      zz = (rr < model) ? 1 : 0;
      model = model + fb - zz;
      if (model > 63) model = 63;
      @(negedge clk);
      check(out_valid == 1'b1, "out_valid");
      check(int'(f_rec) == model, $sformatf("f_rec=%0d model=%0d at %0d", f_rec, model, k));
      if (k >= warm) begin
        real e;
        e = real'(f_rec) / 64.0 - fv;
        sf += fv * fv;
        se += e * e;
      end
    end
    in_valid = 1'b0;
    @(negedge clk);
    check(out_valid == 1'b0, "out_valid drops");
    snr = 10.0 * $log10(sf / se);
  endtask

  initial begin
    real snr;
    for (int i = 0; i <= ORDER; i++) coef[i] = (W+1)'(COEF[i]);
    for (int i = 0; i < 4; i++) sel_seen[i] = 0;
    x_s = '0;
    run_est(12, snr);
    $display("estimator fs=2^12 Hz: SNR = %0.2f dB", snr);
    check(snr >= 20.0, $sformatf("SNR at 2^12 Hz %f", snr));
    run_est(16, snr);
    $display("estimator fs=2^16 Hz: SNR = %0.2f dB", snr);
    check(snr >= 20.0, $sformatf("SNR at 2^16 Hz %f", snr));
    for (int i = 0; i < 4; i++) begin
      $display("select %0d used %0d times", i, sel_seen[i]);
      check(sel_seen[i] > 0, $sformatf("select value %0d occurred", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
