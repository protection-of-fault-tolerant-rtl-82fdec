// ft_filter_pkg: shared sizes and the Hamming check matrix of the protected
// parallel-filter bank.
//
// The bank protects K identical FIR filters with R redundant "check" filters.
// Check filter j is fed the sum of the inputs of the data filters whose
// Hamming column has bit (R-1-j) set, so that, by linearity, its output must
// equal the sum of those data filters' outputs.
//
// The column of data filter i is the i-th R-bit pattern of weight two or more,
// taken in descending numeric order; check filter j owns the weight-one
// pattern with bit (R-1-j) set. For K = 4 (R = 3) this gives the columns
// 111, 110, 101, 011 for d1..d4 and 100, 010, 001 for p1..p3, i.e. the parity
// equations p1 = d1^d2^d3, p2 = d1^d2^d4, p3 = d1^d3^d4 and the syndrome table
// of the four-filter scheme. For K = 11 the same rule yields a (15,11) Hamming
// code; that particular column order is this design's choice.
//
// Syndrome bit order: syndrome[R-1] is s1 (first check), syndrome[0] is sR, so
// printing the syndrome in binary reads "s1 s2 ... sR".
package ft_filter_pkg;

  // Sizes of the four-filter case study.
  localparam int unsigned K_DEF      = 4;   // parallel data filters
  localparam int unsigned TAPS_DEF   = 16;  // filter coefficients
  localparam int unsigned IN_W_DEF   = 8;   // input sample width
  localparam int unsigned COEF_W_DEF = 8;   // coefficient width
  localparam int unsigned OUT_W_DEF  = 18;  // data filter output width
  localparam int unsigned THRESH_DEF = 8;   // comparison threshold in output LSBs

  // Number of check bits of a single-error-correcting Hamming code for k
  // data bits: the smallest r with 2^r - r - 1 >= k.
  function automatic int unsigned num_checks(input int unsigned k);
    int unsigned r;
    r = 2;
    while (((1 << r) - r - 1) < k) r++;
    return r;
  endfunction

  function automatic int unsigned popcount(input int unsigned v);
    int unsigned c;
    c = 0;
    for (int b = 0; b < 32; b++) c += (v >> b) & 1;
    return c;
  endfunction

  // Hamming column (syndrome pattern) of data filter i, 0-based.
  function automatic int unsigned data_column(input int unsigned k, input int unsigned i);
    int unsigned r, cnt, col;
    r   = num_checks(k);
    cnt = 0;
    col = 0;
    for (int v = (1 << r) - 1; v > 0; v--) begin
      if (popcount(v) >= 2) begin
        if (cnt == i) col = v;
        cnt++;
      end
    end
    return col;
  endfunction

  // 1 when data filter i takes part in check j (0-based; j = 0 is s1).
  function automatic bit in_check(input int unsigned k, input int unsigned j,
                                  input int unsigned i);
    int unsigned r;
    r = num_checks(k);
    return bit'((data_column(k, i) >> (r - 1 - j)) & 1);
  endfunction

  // Number of data filters summed into check j.
  function automatic int unsigned check_weight(input int unsigned k, input int unsigned j);
    int unsigned w;
    w = 0;
    for (int unsigned i = 0; i < k; i++) w += in_check(k, j, i);
    return w;
  endfunction

  function automatic int unsigned max_check_weight(input int unsigned k);
    int unsigned w;
    w = 0;
    for (int unsigned j = 0; j < num_checks(k); j++)
      if (check_weight(k, j) > w) w = check_weight(k, j);
    return w;
  endfunction

  // Check used to rebuild data filter i: the first one it takes part in.
  function automatic int unsigned recon_check(input int unsigned k, input int unsigned i);
    int unsigned sel;
    sel = 0;
    for (int j = num_checks(k) - 1; j >= 0; j--)
      if (in_check(k, j, i)) sel = j;
    return sel;
  endfunction

  // Width of a check-filter input: the data input width plus the growth of
  // a sum of max_check_weight operands (10 bits for K = 4, 8-bit inputs).
  function automatic int unsigned chk_in_width(input int unsigned k, input int unsigned in_w);
    return in_w + $clog2(max_check_weight(k));
  endfunction

endpackage
