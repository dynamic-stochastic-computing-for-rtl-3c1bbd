// dsc_func_est: dynamic stochastic computing (DSC) function estimator.
//
// Evaluates the composition f(x(t)) of a Bernstein polynomial f of order
// ORDER with a sampled signal x(t), one sample per clock. Each W-bit sample
// x(kT) is encoded ORDER times, by ORDER comparators (dsng) on independent
// Sobol dimensions, into ORDER independent dynamic stochastic sequence (DSS)
// bits. A multiplexing circuit (bernstein_mux) adds these bits and uses the
// sum to pick one of the ORDER+1 coefficient bit streams; the coefficient
// streams come from conventional stochastic number generators. An N-bit
// ADDIE reconstructs the output DSS into a binary signal. With the source's
// example coefficients b = {0, 2/11, 5/11, 1} the circuit computes
// f(x) = (2x^3 + 3x^2 + 6x) / 11, and with x(t) = exp(-2t) the output
// follows (2e^-6t + 3e^-4t + 6e^-2t) / 11. Structure, order 3 and the 6-bit
// ADDIE follow the source design.
//
// This design's choices: W = 8-bit samples and a 16-bit Sobol generator;
// coefficients are run-time inputs, each a (W+1)-bit fraction b / 2**W so that
// exactly 0 and exactly 1 can be given; all coefficient generators share one
// Sobol dimension, which is sound because the multiplexer passes only one of
// them in any clock; the ADDIE comparator uses a further dimension.
//
// Interface and timing: in_valid marks a sample; x_dss, sel and f_dss belong
// to that cycle and f_rec (N-bit fraction) is updated at the next clock edge
// (out_valid is in_valid delayed by one clock). One sample per clock. Reset is
// asynchronous and active low.
module dsc_func_est #(
  parameter int unsigned W     = 8,
  parameter int unsigned RW    = 16,
  parameter int unsigned N     = 6,
  parameter int unsigned ORDER = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [W-1:0]               x_s,
  input  logic [W:0]                 coef [ORDER+1],
  output logic [ORDER-1:0]           x_dss,
  output logic [ORDER:0]             coef_dss,
  output logic [$clog2(ORDER+1)-1:0] sel,
  output logic                       f_dss,
  output logic [N-1:0]               f_rec,
  output logic                       out_valid
);

  localparam int unsigned DIM_C = ORDER;      // shared by coefficient SNGs
  localparam int unsigned DIM_R = ORDER + 1;  // ADDIE comparator
  localparam int unsigned DIMS  = ORDER + 2;

  logic [RW-1:0] rn [DIMS];
  logic          z_unused;

  sobol_rng #(.DIMS(DIMS), .RW(RW)) u_rng (
    .clk, .rst_n, .en(in_valid), .rn
  );

  for (genvar i = 0; i < ORDER; i++) begin : g_x
    dsng #(.W(W)) u_dsng (
      .x(x_s), .rn(rn[i][RW-1 -: W]), .bit_o(x_dss[i])
    );
  end

  // Coefficient SNGs: (W+1)-bit compare so that b = 2**W gives a constant 1.
  for (genvar i = 0; i <= ORDER; i++) begin : g_c
    dsng #(.W(W+1)) u_sng (
      .x(coef[i]), .rn({1'b0, rn[DIM_C][RW-1 -: W]}), .bit_o(coef_dss[i])
    );
  end

  bernstein_mux #(.ORDER(ORDER)) u_mux (
    .x(x_dss), .b(coef_dss), .sel, .y(f_dss)
  );

  addie #(.N(N)) u_addie (
    .clk, .rst_n, .en(in_valid), .x_bit(f_dss),
    .rn(rn[DIM_R][RW-1 -: N]), .y(f_rec), .z_o(z_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  initial begin
    assert (W <= RW && N <= RW) else $error("dsc_func_est: W and N must not exceed RW");
  end

endmodule
