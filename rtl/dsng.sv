// dsng: (dynamic) stochastic number generator, the comparator of an SNG.
//
// Emits a 1 when the random number rn is smaller than the value x, so that
// with rn uniform over [0, 2**W) the bit is 1 with probability x / 2**W. Fed a
// new signal sample every clock (one bit per sample), the output bit stream is
// a dynamic stochastic sequence (DSS) whose k-th bit has expectation f(kT);
// fed a constant it is a conventional stochastic number generator. Both uses
// follow the source design.
//
// BIPOLAR = 1 selects the bipolar representation: x is a two's-complement
// value in [-1, 1) and is mapped to p = (x + 1) / 2 by inverting its sign bit
// before the comparison (the linear mapping of the source; the sign-bit
// implementation is this design's choice).
//
// Interface and timing: purely combinational, bit = (rn < x').
module dsng #(
  parameter int unsigned W       = 8,
  parameter bit          BIPOLAR = 1'b0
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] rn,
  output logic         bit_o
);

  logic [W-1:0] p;

  always_comb begin
    p = x;
    if (BIPOLAR) p[W-1] = ~x[W-1];
    bit_o = (rn < p);
  end

endmodule
