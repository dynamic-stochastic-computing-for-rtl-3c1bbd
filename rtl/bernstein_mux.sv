// bernstein_mux: multiplexing circuit that evaluates a Bernstein polynomial.
//
// ORDER input bits x[0..ORDER-1], each independently carrying the value x, are
// summed by a small adder (the "accumulator" of the source). The sum i, which
// is binomially distributed, C(n,i) x^i (1-x)^(n-i), selects coefficient
// stream b[i] through an (ORDER+1)-input multiplexer. The output bit therefore
// has expectation sum_i b_i C(n,i) x^i (1-x)^(n-i), the Bernstein polynomial
// of order n = ORDER with coefficients b_i. Fed dynamic stochastic sequences
// encoding x(t), the output encodes the function composition f(x(t)). The
// structure follows the source design; the combinational adder is this
// design's reading of "accumulator" (the sum is formed anew every clock).
//
// Interface and timing: combinational, one output bit per clock. sel is the
// select value (number of ones among x) and is brought out for observation.
module bernstein_mux #(
  parameter int unsigned ORDER = 3
) (
  input  logic [ORDER-1:0]           x,
  input  logic [ORDER:0]             b,
  output logic [$clog2(ORDER+1)-1:0] sel,
  output logic                       y
);

  always_comb begin
    sel = '0;
    for (int unsigned i = 0; i < ORDER; i++) sel = sel + ($clog2(ORDER+1))'(x[i]);
    y = b[sel];
  end

endmodule
