// dsc_pkg: constants and constant functions shared by the dynamic stochastic
// computing (DSC) blocks.
//
// The Sobol generator needs direction numbers. They are computed here at
// elaboration time from the primitive polynomials and initial values m_k of
// the widely used Joe-Kuo table (dimensions 1 to 8), so no table file is read.
// For dimension d with polynomial degree s, coefficients a_1..a_{s-1} and
// initial odd values m_1..m_s, the recurrence is
//   m_k = 2 a_1 m_{k-1} ^ 4 a_2 m_{k-2} ^ ... ^ 2^s m_{k-s} ^ m_{k-s}
// and the j-th direction number (j = 0 .. RW-1) of an RW-bit generator is
//   v_j = m_{j+1} << (RW-1-j).
// Dimension 1 is the van der Corput sequence (all m_k = 1).
// The choice of Sobol numbers follows the source design; the particular
// polynomial table is this design's choice.
package dsc_pkg;

  localparam int unsigned SOBOL_MAX_DIMS = 8;
  localparam int unsigned SOBOL_MAX_RW   = 32;

  // Degree s of the primitive polynomial of each dimension (index 0 = dim 1).
  localparam int unsigned SOBOL_S [SOBOL_MAX_DIMS] = '{0, 1, 2, 3, 3, 4, 4, 5};
  // Packed inner coefficients a (a_1 is the most significant of s-1 bits).
  localparam int unsigned SOBOL_A [SOBOL_MAX_DIMS] = '{0, 0, 1, 1, 2, 1, 4, 2};
  // Initial values m_1..m_5 (only the first s are used).
  localparam int unsigned SOBOL_M [SOBOL_MAX_DIMS][5] = '{
    '{1, 0, 0, 0, 0},
    '{1, 0, 0, 0, 0},
    '{1, 3, 0, 0, 0},
    '{1, 3, 1, 0, 0},
    '{1, 1, 1, 0, 0},
    '{1, 1, 3, 3, 0},
    '{1, 3, 5, 13, 0},
    '{1, 1, 5, 5, 17}
  };

  // Direction number v_j of dimension dim (0-based) for an rw-bit generator.
  function automatic logic [SOBOL_MAX_RW-1:0] sobol_dir(input int unsigned dim,
                                                        input int unsigned j,
                                                        input int unsigned rw);
    logic [SOBOL_MAX_RW-1:0] m [SOBOL_MAX_RW+1];
    int unsigned s;
    int unsigned a;
    s = SOBOL_S[dim];
    a = SOBOL_A[dim];
    for (int unsigned k = 0; k <= SOBOL_MAX_RW; k++) m[k] = '0;
    for (int unsigned k = 1; k <= j + 1; k++) begin
      if (dim == 0) begin
        m[k] = 1;
      end else if (k <= s) begin
        m[k] = SOBOL_M[dim][k-1];
      end else begin
        m[k] = (m[k-s] << s) ^ m[k-s];
        for (int unsigned i = 1; i < s; i++) begin
          if (((a >> (s - 1 - i)) & 1) != 0) m[k] = m[k] ^ (m[k-i] << i);
        end
      end
    end
    return m[j+1] << (rw - 1 - j);
  endfunction

endpackage
