// addie: adaptive digital element, the signal reconstruction unit of DSC.
//
// Converts a (dynamic) stochastic sequence back into an N-bit binary signal by
// exponential smoothing. An N-bit up/down counter holds Y; an internal
// stochastic number generator compares Y with a random number and emits
// Z = (rn < Y), a bit that is 1 with probability Y / 2**N. Each clock the
// counter moves by X - Z:
//   Y_{i+1} = Y_i + X_i - Z_i
// so E[Y_{i+1}] = (2**N - 1) / 2**N * Y_i + E[X_i] and y = Y / 2**N tracks the
// input signal with a geometric (first-order IIR) weighting of past bits. The
// width N sets the smoothing time constant (about 2**N samples); the source
// uses N = 5 for the frequency mixer and N = 6 for the function estimator.
// The counter structure, comparator and update rule follow the source design.
//
// This design's choices: the random numbers come from an input port so that
// one shared Sobol generator can serve every comparator; the counter resets
// to 0 (the source assumes Y_0 = 0); and it saturates at 2**N - 1 instead of
// wrapping (it cannot underflow, because Z = 0 whenever Y = 0). With
// BIPOLAR = 1 the output is given as a two's-complement value
// 2 * Y / 2**N - 1 by inverting the counter's top bit.
//
// Interface and timing: when en is high the counter updates at the rising
// clock edge, so y reflects the input bit one cycle later; one output sample
// per clock. z_o is the internal comparator bit of the current cycle.
module addie #(
  parameter int unsigned N       = 5,
  parameter bit          BIPOLAR = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         x_bit,
  input  logic [N-1:0] rn,
  output logic [N-1:0] y,
  output logic         z_o
);

  logic [N-1:0] cnt;

  assign z_o = (rn < cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (en) begin
      if (x_bit && !z_o) begin
        if (cnt != '1) cnt <= cnt + 1'b1;   // saturate at full scale
      end else if (!x_bit && z_o) begin
        cnt <= cnt - 1'b1;                  // z_o = 1 implies cnt > 0
      end
    end
  end

  always_comb begin
    y = cnt;
    if (BIPOLAR) y[N-1] = ~cnt[N-1];
  end

endmodule
