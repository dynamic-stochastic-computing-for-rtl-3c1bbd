// dsc_mixer: dynamic stochastic computing (DSC) frequency mixer.
//
// Multiplies two sampled signals x(t) and y(t) one sample per clock. Each
// W-bit sample is turned into one bit of a dynamic stochastic sequence (DSS)
// by its own comparator (dsng) against an independent Sobol dimension; the two
// DSS bits are multiplied by a single gate (sc_mult: AND, or XNOR for
// bipolar); and the product DSS is reconstructed into an N-bit signal by an
// ADDIE, whose comparator uses a third Sobol dimension. Because every sample
// is carried by one bit instead of a long sequence, one output sample is
// produced per clock. Structure, one-bit-per-sample encoding and the 5-bit
// ADDIE follow the source design.
//
// This design's choices: W = 8-bit input samples and a 16-bit Sobol
// generator whose top bits feed the comparators; unipolar (AND) operation by
// default, with signals in [0, 1) given as unsigned fractions x / 2**W;
// BIPOLAR = 1 takes two's-complement samples in [-1, 1), uses XNOR and gives
// a two's-complement result.
//
// Interface and timing: in_valid marks a sample pair; the DSS bits (x_dss,
// y_dss, z_dss) belong to that same cycle, and z_rec, the reconstructed
// product as an N-bit fraction, is updated at the following clock edge
// (out_valid is in_valid delayed by one clock). A new pair may arrive every
// clock. Reset is asynchronous and active low.
module dsc_mixer #(
  parameter int unsigned W       = 8,
  parameter int unsigned RW      = 16,
  parameter int unsigned N       = 5,
  parameter bit          BIPOLAR = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] x_s,
  input  logic [W-1:0] y_s,
  output logic         x_dss,
  output logic         y_dss,
  output logic         z_dss,
  output logic [N-1:0] z_rec,
  output logic         out_valid
);

  localparam int unsigned DIM_X = 0;
  localparam int unsigned DIM_Y = 1;
  localparam int unsigned DIM_R = 2;

  logic [RW-1:0] rn [3];
  logic          z_unused;

  sobol_rng #(.DIMS(3), .RW(RW)) u_rng (
    .clk, .rst_n, .en(in_valid), .rn
  );

  dsng #(.W(W), .BIPOLAR(BIPOLAR)) u_dsng_x (
    .x(x_s), .rn(rn[DIM_X][RW-1 -: W]), .bit_o(x_dss)
  );

  dsng #(.W(W), .BIPOLAR(BIPOLAR)) u_dsng_y (
    .x(y_s), .rn(rn[DIM_Y][RW-1 -: W]), .bit_o(y_dss)
  );

  sc_mult #(.BIPOLAR(BIPOLAR)) u_mult (
    .a(x_dss), .b(y_dss), .z(z_dss)
  );

  addie #(.N(N), .BIPOLAR(BIPOLAR)) u_addie (
    .clk, .rst_n, .en(in_valid), .x_bit(z_dss),
    .rn(rn[DIM_R][RW-1 -: N]), .y(z_rec), .z_o(z_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  initial begin
    assert (W <= RW && N <= RW) else $error("dsc_mixer: W and N must not exceed RW");
  end

endmodule
