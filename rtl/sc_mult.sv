// sc_mult: stochastic multiplier.
//
// With two statistically independent stochastic sequences at its inputs, an
// AND gate outputs a sequence whose bit expectation is the product of the
// input expectations (unipolar multiplication); an XNOR gate does the same for
// the bipolar representation, where a value x in [-1, 1] is carried by
// probability (x + 1) / 2. Applied to dynamic stochastic sequences, the
// product is taken sample by sample, which makes the gate a frequency mixer.
// Both gates are the source design's.
//
// Interface and timing: combinational, one product bit per clock.
module sc_mult #(
  parameter bit BIPOLAR = 1'b0
) (
  input  logic a,
  input  logic b,
  output logic z
);

  always_comb begin
    if (BIPOLAR) z = ~(a ^ b);
    else         z = a & b;
  end

endmodule
