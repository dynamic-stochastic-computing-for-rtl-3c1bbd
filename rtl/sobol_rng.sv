// sobol_rng: multi-dimensional Sobol quasi-random number generator.
//
// Produces DIMS independent RW-bit quasi-random numbers per step, one per
// Sobol dimension. Each DSC datapath draws the random numbers of all its
// comparators from one shared Sobol generator, one dimension per stochastic
// sequence that must be independent of the others, as the source design does
// to improve accuracy over LFSR-based streams.
//
// How it works: points are produced in Gray-code order (Antonov-Saleev).
// With index n counting steps, the next point is x_{n+1} = x_n ^ v_c, where c
// is the number of trailing ones of n and v_c the c-th direction number of the
// dimension (computed at elaboration by dsc_pkg::sobol_dir). Point n therefore
// equals the XOR of v_j over the set bits of gray(n) = n ^ (n >> 1). After
// 2**RW points the index wraps and the sequence restarts at 0.
//
// Interface and timing: rn holds point n (starting with point 0 after reset);
// when en is high at a rising clock edge the generator advances one point.
// Reset (rst_n) is asynchronous and active low.
// Direction-number table, Gray-code ordering and wrap behaviour are this
// design's choices; the source only names the Sobol generator.
module sobol_rng
  import dsc_pkg::*;
#(
  parameter int unsigned DIMS = 3,
  parameter int unsigned RW   = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  output logic [RW-1:0]        rn [DIMS]
);

  typedef logic [DIMS-1:0][RW-1:0][RW-1:0] dir_table_t;

  // Direction numbers V[d][j], fixed at elaboration.
  function automatic dir_table_t dir_table();
    dir_table_t t;
    for (int unsigned d = 0; d < DIMS; d++)
      for (int unsigned j = 0; j < RW; j++)
        t[d][j] = RW'(sobol_dir(d, j, RW));
    return t;
  endfunction

  localparam dir_table_t V = dir_table();

  logic [RW-1:0] idx;
  logic [$clog2(RW+1)-1:0] tz;  // trailing ones of idx

  always_comb begin
    tz = '0;
    for (int unsigned b = 0; b < RW; b++) begin
      if (idx[b] && (tz == ($clog2(RW+1))'(b))) tz = tz + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0;
      for (int unsigned d = 0; d < DIMS; d++) rn[d] <= '0;
    end else if (en) begin
      idx <= idx + 1'b1;
      for (int unsigned d = 0; d < DIMS; d++) begin
        if (&idx) begin
          rn[d] <= '0;                       // wrap: restart the sequence
        end else begin
          for (int unsigned j = 0; j < RW; j++) begin
            if (tz == ($clog2(RW+1))'(j)) rn[d] <= rn[d] ^ V[d][j];
          end
        end
      end
    end
  end

  initial begin
    assert (DIMS >= 1 && DIMS <= SOBOL_MAX_DIMS) else $error("sobol_rng: DIMS out of range");
    assert (RW >= 2 && RW <= SOBOL_MAX_RW) else $error("sobol_rng: RW out of range");
  end

endmodule
