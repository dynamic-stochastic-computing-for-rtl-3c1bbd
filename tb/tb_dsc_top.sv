// tb_dsc_top: end-to-end testbench of the whole DSC system at its default
// parameters (8-bit samples, 16-bit Sobol generators, 5-bit mixer ADDIE,
// 6-bit estimator ADDIE, order-3 Bernstein circuit).
//
// Both datapaths run at the same time for 65536 + 4096 samples, so each Sobol
// generator completes a full period and wraps. The mixer multiplies
// 0.5 + 0.5 sin(2 pi t) by 0.5 + 0.5 sin(12 pi t) and the estimator evaluates
// (2x^3 + 3x^2 + 6x)/11 for x = exp(-2t), with t advancing 2**-16 s per
// sample; the estimator input restarts at t = 0 after the first second. Every
// 997 samples one idle cycle is inserted on each datapath.
//
// Checks: every output sample cycle by cycle against the testbench's own
// model of comparators, gates, multiplexer and saturating counters (only the
// Sobol numbers are taken from the design); out_valid one clock after
// in_valid; outputs frozen in idle cycles; SNR of each reconstructed signal
// of at least 20 dB over the first second (after the estimator warm-up).
// Mechanisms that must each happen at least once: Sobol wrap on both
// generators, ADDIE saturation on both reconstructors, idle (stall) cycles,
// every multiplexer select value 0..3, and a completed warm-up (estimator
// output within 0.1 of its target after starting from 0).
module tb_dsc_top;
  localparam int unsigned W  = 8;
  localparam int unsigned RW = 16;
  localparam real PI = 3.14159265358979;
  localparam int COEF [4] = '{0, 47, 116, 256};
  localparam int NS = 65536 + 4096;

  logic clk = 1'b0;
  logic rst_n;
  logic mix_in_valid, est_in_valid;
  logic [7:0] mix_x, mix_y, est_x;
  logic [8:0] est_coef [4];
  logic mix_x_dss, mix_y_dss, mix_z_dss, mix_out_valid;
  logic [4:0] mix_z;
  logic [2:0] est_x_dss;
  logic [1:0] est_sel;
  logic est_f_dss, est_out_valid;
  logic [5:0] est_f;

  int checks = 0;
  int failures = 0;
  int n_wrap_mix = 0, n_wrap_est = 0, n_sat_mix = 0, n_sat_est = 0;
  int n_idle = 0, n_warm = 0;
  int sel_seen [4];

  dsc_top dut (
    .clk, .rst_n,
    .mix_in_valid, .mix_x, .mix_y, .mix_x_dss, .mix_y_dss, .mix_z_dss, .mix_z, .mix_out_valid,
    .est_in_valid, .est_x, .est_coef, .est_x_dss, .est_sel, .est_f_dss, .est_f, .est_out_valid
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] quant(input real v);
    int q;
    q = int'($floor(v * 256.0));
    if (q > 255) q = 255;
    if (q < 0) q = 0;
    return 8'(q);
  endfunction

  initial begin
    int mm, me;
    real smz, sme, sef, see;
    mm = 0;
    me = 0;
    smz = 0.0; sme = 0.0; sef = 0.0; see = 0.0;
    for (int i = 0; i < 4; i++) begin
      est_coef[i] = 9'(COEF[i]);
      sel_seen[i] = 0;
    end
    rst_n = 1'b0;
    mix_in_valid = 1'b0;
    est_in_valid = 1'b0;
    mix_x = '0; mix_y = '0; est_x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(mix_z == 0 && est_f == 0, "reset values");

    for (int k = 0; k < NS; k++) begin
      real t, xv, yv, ev, fv, zt;
      int s, b, xb0, yb0, zb, zz, fb, fz;
      t = real'(k % 65536) / 65536.0;
      xv = 0.5 + 0.5 * $sin(2.0 * PI * t);
      yv = 0.5 + 0.5 * $sin(12.0 * PI * t);
      ev = $exp(-2.0 * t);
      fv = (2.0 * ev * ev * ev + 3.0 * ev * ev + 6.0 * ev) / 11.0;
      zt = xv * yv;
      mix_x = quant(xv);
      mix_y = quant(yv);
      est_x = quant(ev);
      mix_in_valid = 1'b1;
      est_in_valid = 1'b1;
      #1;
      if (k > 0 && dut.u_mixer.u_rng.idx == 0) n_wrap_mix++;
      if (k > 0 && dut.u_est.u_rng.idx == 0) n_wrap_est++;
      // mixer model
      xb0 = (int'(dut.u_mixer.u_rng.rn[0][RW-1 -: W]) < int'(mix_x)) ? 1 : 0;
      yb0 = (int'(dut.u_mixer.u_rng.rn[1][RW-1 -: W]) < int'(mix_y)) ? 1 : 0;
      zb = xb0 & yb0;
      zz = (int'(dut.u_mixer.u_rng.rn[2][RW-1 -: 5]) < mm) ? 1 : 0;
      check(int'(mix_z_dss) == zb, $sformatf("mixer DSS at %0d", k));
      if (zb == 1 && zz == 0 && mm == 31) n_sat_mix++;
      mm = mm + zb - zz;
      if (mm > 31) mm = 31;
      // estimator model
      s = 0;
      for (int i = 0; i < 3; i++)
        s += (int'(dut.u_est.u_rng.rn[i][RW-1 -: W]) < int'(est_x)) ? 1 : 0;
      fb = (int'(dut.u_est.u_rng.rn[3][RW-1 -: W]) < COEF[s]) ? 1 : 0;
      fz = (int'(dut.u_est.u_rng.rn[4][RW-1 -: 6]) < me) ? 1 : 0;
      check(int'(est_sel) == s && int'(est_f_dss) == fb, $sformatf("estimator DSS at %0d", k));
      sel_seen[s]++;
      if (fb == 1 && fz == 0 && me == 63) n_sat_est++;
      me = me + fb - fz;
      if (me > 63) me = 63;
      @(negedge clk);
      check(mix_out_valid && est_out_valid, "out_valid one clock after in_valid");
      check(int'(mix_z) == mm, $sformatf("mix_z=%0d model=%0d at %0d", mix_z, mm, k));
      check(int'(est_f) == me, $sformatf("est_f=%0d model=%0d at %0d", est_f, me, k));
      if (k < 65536) begin
        smz += zt * zt;
        sme += (real'(mix_z) / 32.0 - zt) ** 2;
        if (k >= 256) begin
          sef += fv * fv;
          see += (real'(est_f) / 64.0 - fv) ** 2;
        end
      end
      if (k == 256 && (real'(est_f) / 64.0 - fv) < 0.1 && (real'(est_f) / 64.0 - fv) > -0.1) n_warm++;
      if (k % 997 == 996) begin
        logic [4:0] km;
        logic [5:0] ke;
        km = mix_z;
        ke = est_f;
        mix_in_valid = 1'b0;
        est_in_valid = 1'b0;
        @(negedge clk);
        n_idle++;
        check(!mix_out_valid && !est_out_valid && mix_z == km && est_f == ke, "idle cycle holds");
      end
    end
    mix_in_valid = 1'b0;
    est_in_valid = 1'b0;

    begin
      real snr_m, snr_e;
      snr_m = 10.0 * $log10(smz / sme);
      snr_e = 10.0 * $log10(sef / see);
      $display("mixer SNR = %0.2f dB, estimator SNR = %0.2f dB", snr_m, snr_e);
      check(snr_m >= 20.0, "mixer SNR");
      check(snr_e >= 20.0, "estimator SNR");
    end
    $display("mechanisms: sobol wrap mix=%0d est=%0d, saturation mix=%0d est=%0d, idle=%0d, warm-up=%0d, sel=%0d/%0d/%0d/%0d",
             n_wrap_mix, n_wrap_est, n_sat_mix, n_sat_est, n_idle, n_warm,
             sel_seen[0], sel_seen[1], sel_seen[2], sel_seen[3]);
    check(n_wrap_mix > 0, "mixer Sobol wrap happened");
    check(n_wrap_est > 0, "estimator Sobol wrap happened");
    check(n_sat_mix > 0, "mixer ADDIE saturation happened");
    check(n_sat_est > 0, "estimator ADDIE saturation happened");
    check(n_idle > 0, "idle cycles happened");
    check(n_warm > 0, "warm-up completed");
    for (int i = 0; i < 4; i++) check(sel_seen[i] > 0, $sformatf("select %0d happened", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS + NS / 500 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
