// fir_filter: one TAPS-coefficient FIR filter, y[n] = sum_l x[n-l] * h[l].
//
// This is the filter block "H" of the protected bank. The same module serves
// as a data filter (IN_W = 8, OUT_W = 18) and as a check filter, whose input
// is a sum of data inputs and is therefore wider (10 bits for the four-filter
// bank). The 16 taps, the 8-bit inputs and coefficients and the 18-bit data
// output are the case-study sizes; the filter structure is this design's
// choice: a direct form with a TAPS-1 deep input delay line, a full-precision
// sum of products and a registered output.
//
// Quantization: the full-precision sum has ACC_W = IN_W + COEF_W +
// clog2(TAPS) bits (20 for a data filter). The output keeps its top OUT_W
// bits, i.e. drops DROP = ACC_W - OUT_W LSBs by arithmetic shift (floor).
// A check filter is given OUT_W two bits wider than a data filter, so that
// both drop the same number of LSBs and their outputs share one LSB weight.
//
// Every filter holds its own copy of the coefficients in coef_q, loaded from
// coef_in while coef_we is high, so a corrupted coefficient affects a single
// filter only.
//
// Interface and timing: samples are signed two's complement. On a clock edge
// with in_valid high the filter takes x as x[n], shifts its delay line and
// registers y[n]; out_valid is in_valid delayed by one clock. Synchronous
// operation, asynchronous active-low reset clearing the delay line, the
// coefficients and the output.
(* keep_hierarchy *)
module fir_filter #(
  parameter int unsigned TAPS   = 16,
  parameter int unsigned IN_W   = 8,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned OUT_W  = 18
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     coef_we,
  input  logic signed [COEF_W-1:0] coef_in [TAPS],
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   x,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y
);

  localparam int unsigned ACC_W = IN_W + COEF_W + $clog2(TAPS);
  localparam int unsigned DROP  = ACC_W - OUT_W;

  initial begin
    assert (OUT_W <= ACC_W) else $error("fir_filter: OUT_W wider than the full-precision sum");
    assert (TAPS >= 2) else $error("fir_filter: TAPS must be at least 2");
  end

  logic signed [COEF_W-1:0] coef_q [TAPS];
  logic signed [IN_W-1:0]   hist_q [TAPS-1];  // x[n-1] .. x[n-TAPS+1]
  logic signed [ACC_W-1:0]  acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < TAPS; l++) coef_q[l] <= '0;
    end else if (coef_we) begin
      coef_q <= coef_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < TAPS - 1; l++) hist_q[l] <= '0;
    end else if (in_valid) begin
      hist_q[0] <= x;
      for (int l = 1; l < TAPS - 1; l++) hist_q[l] <= hist_q[l-1];
    end
  end

  // Full-precision sum of products over x[n] (the current input) and the
  // delay line.
  always_comb begin
    acc = ACC_W'(x) * ACC_W'(coef_q[0]);
    for (int l = 1; l < TAPS; l++)
      acc += ACC_W'(hist_q[l-1]) * ACC_W'(coef_q[l]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= OUT_W'(acc >>> DROP);
    end
  end

endmodule
