// dsc_top: dynamic stochastic computing (DSC) signal processing system.
//
// Holds the two DSC applications of the design side by side, each with its
// own ports, its own shared Sobol generator and its own ADDIE reconstructor:
//   - a frequency mixer (dsc_mixer): 8-bit samples of two signals in, their
//     product as a 5-bit reconstructed signal out;
//   - a function estimator (dsc_func_est): 8-bit samples of x(t) and four
//     9-bit Bernstein coefficients in, f(x(t)) as a 6-bit reconstructed
//     signal out.
// Each takes one sample per clock and updates its output one clock later.
// The DSS bits inside each datapath are brought out for observation.
// The split into two independent datapaths is this design's choice; the
// source evaluates the two applications separately.
module dsc_top #(
  parameter int unsigned W     = 8,
  parameter int unsigned RW    = 16,
  parameter int unsigned MIX_N = 5,
  parameter int unsigned EST_N = 6,
  parameter int unsigned ORDER = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // frequency mixer
  input  logic                       mix_in_valid,
  input  logic [W-1:0]               mix_x,
  input  logic [W-1:0]               mix_y,
  output logic                       mix_x_dss,
  output logic                       mix_y_dss,
  output logic                       mix_z_dss,
  output logic [MIX_N-1:0]           mix_z,
  output logic                       mix_out_valid,
  // function estimator
  input  logic                       est_in_valid,
  input  logic [W-1:0]               est_x,
  input  logic [W:0]                 est_coef [ORDER+1],
  output logic [ORDER-1:0]           est_x_dss,
  output logic [$clog2(ORDER+1)-1:0] est_sel,
  output logic                       est_f_dss,
  output logic [EST_N-1:0]           est_f,
  output logic                       est_out_valid
);

  logic [ORDER:0] coef_dss_unused;

  dsc_mixer #(.W(W), .RW(RW), .N(MIX_N)) u_mixer (
    .clk, .rst_n,
    .in_valid (mix_in_valid),
    .x_s      (mix_x),
    .y_s      (mix_y),
    .x_dss    (mix_x_dss),
    .y_dss    (mix_y_dss),
    .z_dss    (mix_z_dss),
    .z_rec    (mix_z),
    .out_valid(mix_out_valid)
  );

  dsc_func_est #(.W(W), .RW(RW), .N(EST_N), .ORDER(ORDER)) u_est (
    .clk, .rst_n,
    .in_valid (est_in_valid),
    .x_s      (est_x),
    .coef     (est_coef),
    .x_dss    (est_x_dss),
    .coef_dss (coef_dss_unused),
    .sel      (est_sel),
    .f_dss    (est_f_dss),
    .f_rec    (est_f),
    .out_valid(est_out_valid)
  );

endmodule
