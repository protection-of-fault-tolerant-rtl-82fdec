// ft_parallel_filters: a bank of K parallel FIR filters with the same impulse
// response, protected against a fault in any one filter by a Hamming code
// applied at the word level.
//
// Each filter output is treated as one "bit" of a Hamming codeword. R extra
// check filters (3 for K = 4, 4 for K = 11) run the same response on sums of
// the data inputs (x5 = x1 + x2 + x3, x6 = x1 + x2 + x4, x7 = x1 + x3 + x4
// for K = 4). Linearity makes every check output equal to the sum of the
// data outputs it covers; the fault corrector compares the two with a small
// threshold, decodes the resulting syndrome as a Hamming syndrome and
// replaces the one faulty data output by a value rebuilt from a check output
// and the other data outputs. A fault in a check filter is recognised and
// ignored.
//
// Structure: check_encoder -> K data fir_filter + R check fir_filter ->
// fault_corrector. The four-filter arrangement, the sizes (16 taps, 8-bit
// inputs and coefficients, 18-bit data outputs, 10-bit check inputs) and
// the rule of not sharing adders between checks follow the described scheme;
// the sample handshake, the coefficient loading, the syndrome output, the
// threshold value and the rounding are this design's choices.
//
// Interface and timing: all samples are signed two's complement. Drive the
// K input samples x with in_valid high for one clock per sample (in_valid may
// have gaps). The corrected outputs yc and the syndrome (s1 in the MSB) of
// that sample appear two clocks later, with out_valid high for one clock.
// Coefficients: hold coef_in and raise coef_we for one clock; every filter
// copies them into its own registers. Asynchronous active-low reset.
//
// The lockstep assertion at the end samples rst_n on the clock (in its
// disable condition) while the flops use it asynchronously; lint reports
// this mix, which only concerns the simulation check, not the circuit.
module ft_parallel_filters
  import ft_filter_pkg::*;
#(
  parameter int unsigned K      = K_DEF,
  parameter int unsigned TAPS   = TAPS_DEF,
  parameter int unsigned IN_W   = IN_W_DEF,
  parameter int unsigned COEF_W = COEF_W_DEF,
  parameter int unsigned OUT_W  = OUT_W_DEF,
  parameter int unsigned THRESH = THRESH_DEF,
  parameter bit          TRIPLE = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     coef_we,
  input  logic signed [COEF_W-1:0] coef_in  [TAPS],
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   x        [K],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  yc       [K],
  output logic [num_checks(K)-1:0] syndrome
);

  localparam int unsigned R         = num_checks(K);
  localparam int unsigned CHK_IN_W  = chk_in_width(K, IN_W);
  localparam int unsigned CHK_OUT_W = OUT_W + (CHK_IN_W - IN_W);

  logic signed [CHK_IN_W-1:0]  xc [R];
  logic signed [OUT_W-1:0]     y  [K];
  logic signed [CHK_OUT_W-1:0] z  [R];
  logic [K-1:0]                y_valid;
  logic [R-1:0]                z_valid;

  check_encoder #(
    .K(K), .IN_W(IN_W), .R(R), .CHK_IN_W(CHK_IN_W)
  ) u_encoder (
    .x (x),
    .xc(xc)
  );

  // Original modules.
  for (genvar i = 0; i < K; i++) begin : g_data
    fir_filter #(
      .TAPS(TAPS), .IN_W(IN_W), .COEF_W(COEF_W), .OUT_W(OUT_W)
    ) u_fir (
      .clk      (clk),
      .rst_n    (rst_n),
      .coef_we  (coef_we),
      .coef_in  (coef_in),
      .in_valid (in_valid),
      .x        (x[i]),
      .out_valid(y_valid[i]),
      .y        (y[i])
    );
  end

  // Redundant modules.
  for (genvar j = 0; j < R; j++) begin : g_chk
    fir_filter #(
      .TAPS(TAPS), .IN_W(CHK_IN_W), .COEF_W(COEF_W), .OUT_W(CHK_OUT_W)
    ) u_fir (
      .clk      (clk),
      .rst_n    (rst_n),
      .coef_we  (coef_we),
      .coef_in  (coef_in),
      .in_valid (in_valid),
      .x        (xc[j]),
      .out_valid(z_valid[j]),
      .y        (z[j])
    );
  end

  fault_corrector #(
    .K(K), .R(R), .OUT_W(OUT_W), .CHK_OUT_W(CHK_OUT_W),
    .THRESH(THRESH), .TRIPLE(TRIPLE)
  ) u_corrector (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (y_valid[0]),
    .y        (y),
    .z        (z),
    .out_valid(out_valid),
    .yc       (yc),
    .syndrome (syndrome)
  );

  // All filters share one in_valid, so their valid flags move together.
  property p_valid_lockstep;
    @(posedge clk) disable iff (!rst_n) (y_valid == {K{y_valid[0]}}) && (z_valid == {R{y_valid[0]}});
  endproperty
  a_valid_lockstep: assert property (p_valid_lockstep);

endmodule
