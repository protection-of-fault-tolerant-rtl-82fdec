// check_encoder: forms the inputs of the redundant (check) filters.
//
// Hamming-code encoding applied to filter inputs instead of bits: the XOR of
// a parity equation becomes an integer sum. For the four-filter bank
//   xc[0] = x5 = x1 + x2 + x3
//   xc[1] = x6 = x1 + x2 + x4
//   xc[2] = x7 = x1 + x3 + x4
// and, for any K, xc[j] is the sum of the inputs of the data filters that
// take part in check j (see ft_filter_pkg). Since the filters are linear,
// check filter j then produces the sum of those data filters' outputs.
//
// Each sum is built on its own, with no adder shared between two checks, so
// a fault in one adder corrupts one check input only. The scheme is described
// as built from reversible gates, but no gate or circuit is given for it; the
// adders here are plain word-level additions with the same function.
//
// Interface and timing: purely combinational. x holds the K signed data-filter
// inputs of the current sample, xc the R signed check-filter inputs, each
// CHK_IN_W = IN_W + clog2(terms) bits wide so no sum can overflow.
module check_encoder
  import ft_filter_pkg::*;
#(
  parameter int unsigned K        = K_DEF,
  parameter int unsigned IN_W     = IN_W_DEF,
  parameter int unsigned R        = num_checks(K),
  parameter int unsigned CHK_IN_W = chk_in_width(K, IN_W)
) (
  input  logic signed [IN_W-1:0]     x  [K],
  output logic signed [CHK_IN_W-1:0] xc [R]
);

  for (genvar j = 0; j < R; j++) begin : g_check
    always_comb begin
      xc[j] = '0;
      for (int unsigned i = 0; i < K; i++)
        if (in_check(K, j, i)) xc[j] += CHK_IN_W'(x[i]);
    end
  end

endmodule
