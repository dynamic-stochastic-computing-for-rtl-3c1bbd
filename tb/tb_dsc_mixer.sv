// tb_dsc_mixer: self-checking testbench for the DSC frequency mixer.
//
// Workload: x(t) = 0.5 + 0.5 sin(2 pi 1 t) and y(t) = 0.5 + 0.5 sin(2 pi 6 t)
// for one second, sampled at 2**14 Hz and again at 2**16 Hz, as 8-bit
// unsigned fractions, one sample per clock. The testbench
//   - models the comparators, the AND gate and the saturating ADDIE counter
//     itself, taking only the Sobol random numbers from the generator (which
//     has its own testbench), and checks every DSS bit and every output
//     sample cycle by cycle;
//   - checks that out_valid follows in_valid by exactly one clock, that one
//     output is produced per input sample and that idle cycles change nothing;
//   - computes SNR = 10 log10(sum z^2 / sum e^2) of the reconstructed product
//     against x(t) y(t) and requires at least 20 dB (about 22-24 dB is
//     expected for a 5-bit reconstructor at these rates);
//   - repeats the mixer run for 0.5 Hz x 3 Hz over two seconds at 2**14 Hz;
//   - squares a 1 Hz sinusoid by feeding it to both inputs (the two DSSs are
//     still independent, so the result is x^2, not x);
//   - runs a bipolar instance on constants x = 0.5, y = -0.5 and checks that
//     the average output is near -0.25.
module tb_dsc_mixer;
  localparam int unsigned W  = 8;
  localparam int unsigned RW = 16;
  localparam int unsigned N  = 5;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [W-1:0] x_s, y_s;
  logic x_dss, y_dss, z_dss, out_valid;
  logic [N-1:0] z_rec;

  logic bin_valid;
  logic [W-1:0] bx_s, by_s;
  logic bx_dss, by_dss, bz_dss, bout_valid;
  logic [N-1:0] bz_rec;

  int checks = 0;
  int failures = 0;

  dsc_mixer dut (
    .clk, .rst_n, .in_valid, .x_s, .y_s, .x_dss, .y_dss, .z_dss, .z_rec, .out_valid
  );

  dsc_mixer #(.BIPOLAR(1'b1)) dut_b (
    .clk, .rst_n, .in_valid(bin_valid), .x_s(bx_s), .y_s(by_s),
    .x_dss(bx_dss), .y_dss(by_dss), .z_dss(bz_dss), .z_rec(bz_rec), .out_valid(bout_valid)
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

  // Runs one second of the workload at fs = 2**lg_fs; returns the SNR in dB.
  task automatic run_mixer(input int lg_fs, input real fx, input real fy, input int secs,
                           output real snr);
    int model;
    int nsamp;
    int outs;
    real sz, se;
    nsamp = secs << lg_fs;
    model = 0;
    outs = 0;
    sz = 0.0;
    se = 0.0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < nsamp; k++) begin
      real t, xv, yv;
      int rx, ry, rr, xb, yb, zb, zz;
      t = real'(k) / real'(1 << lg_fs);
      xv = 0.5 + 0.5 * $sin(2.0 * PI * fx * t);
      yv = 0.5 + 0.5 * $sin(2.0 * PI * fy * t);
      x_s = quant(xv);
      y_s = quant(yv);
      in_valid = 1'b1;
      #1;
      rx = int'(dut.u_rng.rn[0][RW-1 -: W]);
      ry = int'(dut.u_rng.rn[1][RW-1 -: W]);
      rr = int'(dut.u_rng.rn[2][RW-1 -: N]);
      xb = (rx < int'(x_s)) ? 1 : 0;
      yb = (ry < int'(y_s)) ? 1 : 0;
      zb = xb & yb;
      zz = (rr < model) ? 1 : 0;
      check(int'(x_dss) == xb && int'(y_dss) == yb && int'(z_dss) == zb,
            $sformatf("DSS bits at sample %0d", k));
      model = model + zb - zz;
      if (model > 31) model = 31;
      @(negedge clk);
      check(out_valid == 1'b1, "out_valid one clock after in_valid");
      check(int'(z_rec) == model, $sformatf("z_rec=%0d model=%0d at sample %0d", z_rec, model, k));
      outs++;
      begin
        real zt, e;
        zt = xv * yv;
        e = real'(z_rec) / 32.0 - zt;
        sz += zt * zt;
        se += e * e;
      end
      // an idle cycle every 1000 samples: nothing may change
      if (k % 1000 == 999) begin
        logic [N-1:0] keep;
        keep = z_rec;
        in_valid = 1'b0;
        @(negedge clk);
        check(out_valid == 1'b0 && z_rec == keep, "idle cycle holds output");
      end
    end
    in_valid = 1'b0;
    check(outs == nsamp, "one output per input sample");
    snr = 10.0 * $log10(sz / se);
  endtask

  initial begin
    real snr;
    rst_n = 1'b0;
    in_valid = 1'b0;
    bin_valid = 1'b0;
    x_s = '0;
    y_s = '0;
    bx_s = '0;
    by_s = '0;

    run_mixer(14, 1.0, 6.0, 1, snr);
    $display("mixer fs=2^14 Hz: SNR = %0.2f dB", snr);
    check(snr >= 20.0, $sformatf("SNR at 2^14 Hz %f", snr));
    run_mixer(16, 1.0, 6.0, 1, snr);
    $display("mixer fs=2^16 Hz: SNR = %0.2f dB", snr);
    check(snr >= 20.0, $sformatf("SNR at 2^16 Hz %f", snr));

    run_mixer(14, 0.5, 3.0, 2, snr);
    $display("mixer 0.5 Hz x 3 Hz, fs=2^14 Hz: SNR = %0.2f dB", snr);
    check(snr >= 20.0, $sformatf("SNR 0.5 Hz x 3 Hz %f", snr));

    // identical inputs: the product of a signal with itself (independent DSSs)
    run_mixer(14, 1.0, 1.0, 1, snr);
    $display("mixer x times x, fs=2^14 Hz: SNR = %0.2f dB", snr);
    check(snr >= 20.0, $sformatf("SNR x*x %f", snr));

    // bipolar: 0.5 * -0.5 = -0.25
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    bx_s = 8'h40;   // +0.5
    by_s = 8'hC0;   // -0.5
    bin_valid = 1'b1;
    begin
      real acc;
      acc = 0.0;
      for (int k = 0; k < 8192; k++) begin
        @(negedge clk);
        if (k >= 1024) acc += real'($signed(bz_rec)) / 16.0;
      end
      acc = acc / 7168.0;
      $display("bipolar product mean = %f", acc);
      check(acc > -0.30 && acc < -0.20, $sformatf("bipolar product %f", acc));
    end
    bin_valid = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
