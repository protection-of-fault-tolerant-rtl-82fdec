// fault_corrector: the "single fault correction" stage of the protected bank.
//
// It checks, for every check filter j, whether its output z_j equals the sum
// of the outputs of the data filters it covers (z1 = y1 + y2 + y3, ... for
// the four-filter bank). This is s = y * H^T with the integer check matrix
// whose data columns are the Hamming columns and whose check columns are -1.
// Because the check filters and the data filters round differently, the two
// sides may differ by a few LSBs without any fault, so a check bit s_j is set
// only when |z_j - sum| > THRESH. The threshold value is this design's
// choice: 8 LSBs, above the worst rounding difference of the K = 4 and
// K = 11 banks (2 and 6 LSBs); errors of at most THRESH LSBs pass
// uncorrected.
//
// The syndrome is then decoded like a Hamming syndrome: if it equals the
// column of data filter i (111 -> y1, 110 -> y2, 101 -> y3, 011 -> y4 for
// K = 4), output i is replaced by its rebuilt value z_j - (the other outputs
// of check j), using the first check j filter i takes part in (y1 = z1 - y2 -
// y3). A syndrome that names a check filter, or zero, leaves the data outputs
// as they are.
//
// Fault containment: every check sum is computed on its own, so a fault in one
// only flips one syndrome bit; with TRIPLE = 1 each rebuilt output is computed
// by three separate output_rebuild instances and a bitwise majority vote
// picks the result. Synthesis may merge identical copies unless told to keep
// them.
//
// Interface and timing: y and z are sampled when in_valid is high; yc and
// syndrome (s1 in the MSB) are registered and appear one clock later with
// out_valid. Asynchronous active-low reset.
module fault_corrector
  import ft_filter_pkg::*;
#(
  parameter int unsigned K         = K_DEF,
  parameter int unsigned R         = num_checks(K),
  parameter int unsigned OUT_W     = OUT_W_DEF,
  parameter int unsigned CHK_OUT_W = OUT_W + $clog2(max_check_weight(K)),
  parameter int unsigned THRESH    = THRESH_DEF,
  parameter bit          TRIPLE    = 1'b1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [OUT_W-1:0]     y  [K],
  input  logic signed [CHK_OUT_W-1:0] z  [R],
  output logic                        out_valid,
  output logic signed [OUT_W-1:0]     yc [K],
  output logic [R-1:0]                syndrome
);

  localparam int unsigned DW     = CHK_OUT_W + 2;
  localparam int unsigned COPIES = TRIPLE ? 3 : 1;

  logic [R-1:0]            s;
  logic signed [OUT_W-1:0] rec   [K];
  logic signed [OUT_W-1:0] yc_d  [K];

  // Syndrome: one independent comparison per check filter.
  for (genvar j = 0; j < R; j++) begin : g_syn
    logic signed [DW-1:0] diff;
    logic        [DW-1:0] mag;
    always_comb begin
      diff = DW'(z[j]);
      for (int unsigned i = 0; i < K; i++)
        if (in_check(K, j, i)) diff -= DW'(y[i]);
      mag = (diff < 0) ? DW'(-diff) : DW'(diff);
      s[R-1-j] = (mag > DW'(THRESH));
    end
  end

  // Rebuilt outputs, one voted group per data filter.
  for (genvar i = 0; i < K; i++) begin : g_rec
    localparam int unsigned JR = recon_check(K, i);
    logic signed [OUT_W-1:0] cand [COPIES];
    for (genvar c = 0; c < COPIES; c++) begin : g_copy
      output_rebuild #(
        .K(K), .I(i), .J(JR), .OUT_W(OUT_W), .CHK_OUT_W(CHK_OUT_W)
      ) u_rebuild (
        .y  (y),
        .z  (z[JR]),
        .rec(cand[c])
      );
    end
    if (COPIES == 3) begin : g_vote
      assign rec[i] = (cand[0] & cand[1]) | (cand[0] & cand[2]) | (cand[1] & cand[2]);
    end else begin : g_single
      assign rec[i] = cand[0];
    end
  end

  // Table I decode: replace the output whose Hamming column matches.
  always_comb begin
    for (int unsigned i = 0; i < K; i++)
      yc_d[i] = (s == R'(data_column(K, i))) ? rec[i] : y[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      syndrome  <= '0;
      for (int unsigned i = 0; i < K; i++) yc[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        syndrome <= s;
        yc       <= yc_d;
      end
    end
  end

endmodule
