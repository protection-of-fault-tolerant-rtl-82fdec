// tb_fir_filter: self-checking test of one FIR filter at the case-study
// sizes (16 taps, 8-bit input and coefficients, 18-bit output).
//
// The reference keeps its own record of past inputs and computes
// floor(sum x[n-l] * h[l] / 4) with plain integer arithmetic. Phases: an
// impulse of value 4, which must read the coefficients back one per sample;
// then random samples with random gaps in in_valid, a coefficient reload in
// the middle, and a check that out_valid follows in_valid after exactly one
// clock.
module tb_fir_filter;
  localparam int TAPS = 16, IN_W = 8, COEF_W = 8, OUT_W = 18;

  logic clk = 1'b0;
  logic rst_n, coef_we, in_valid, out_valid;
  logic signed [COEF_W-1:0] coef_in [TAPS];
  logic signed [IN_W-1:0]   x;
  logic signed [OUT_W-1:0]  y;

  int checks = 0, failures = 0;
  int hist [TAPS];     // hist[0] = most recent input
  int coef [TAPS];

  fir_filter #(.TAPS(TAPS), .IN_W(IN_W), .COEF_W(COEF_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_out();
    longint acc = 0;
    for (int l = 0; l < TAPS; l++) acc += longint'(hist[l]) * longint'(coef[l]);
    // floor division by 4 (two dropped LSBs)
    return int'(acc >>> 2);
  endfunction

  task automatic load_coefs(input bit impulse_only);
    for (int l = 0; l < TAPS; l++) begin
      coef[l] = impulse_only ? (l * 7 - 50) : ($urandom_range(255) - 128);
      coef_in[l] = COEF_W'(coef[l]);
    end
    in_valid = 1'b0;
    coef_we = 1'b1;
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  task automatic sample(input int value, input bit valid);
    int exp_y;
    x = IN_W'(value);
    in_valid = valid;
    if (valid) begin
      for (int l = TAPS - 1; l > 0; l--) hist[l] = hist[l-1];
      hist[0] = value;
    end
    exp_y = ref_out();
    @(negedge clk);
    checks++;
    if (out_valid !== valid) begin
      failures++;
      $display("FAIL out_valid=%b expected %b", out_valid, valid);
    end
    if (valid) begin
      checks++;
      if (int'(y) != exp_y) begin
        failures++;
        $display("FAIL y=%0d expected %0d", y, exp_y);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; coef_we = 1'b0; in_valid = 1'b0; x = '0;
    foreach (coef_in[l]) coef_in[l] = '0;
    foreach (hist[l]) hist[l] = 0;
    foreach (coef[l]) coef[l] = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    load_coefs(1'b1);
    // Impulse: an input of 4 reads out h[l] exactly.
    sample(4, 1'b1);
    for (int l = 1; l < TAPS + 2; l++) sample(0, 1'b1);
    // Random data, random valid gaps.
    load_coefs(1'b0);
    for (int n = 0; n < 2000; n++) begin
      if (n == 1000) load_coefs(1'b0);
      sample($urandom_range(255) - 128, ($urandom_range(3) != 0));
    end
    // Extreme values.
    for (int l = 0; l < TAPS; l++) begin coef[l] = -128; coef_in[l] = 8'sh80; end
    in_valid = 1'b0; coef_we = 1'b1; @(negedge clk); coef_we = 1'b0;
    for (int n = 0; n < 40; n++) sample(-128, 1'b1);
    for (int n = 0; n < 40; n++) sample(127, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
