// tb_fault_corrector: checks the single-fault-correction stage of the
// four-filter bank on its own.
//
// Consistent data/check outputs are made up with a rounding difference of
// 0..2 LSBs on each check; then one of the seven outputs (y1..y4, z1..z3) is
// corrupted, or none. The expected syndrome comes from a hand-written copy
// of the Hamming syndrome table and the expected corrected value from the
// hand-written rebuild equations (y1 = z1-y2-y3, y2 = z1-y1-y3,
// y3 = z1-y1-y2, y4 = z2-y1-y2). Also covered: errors below the threshold
// (left alone), extreme output values, the one-clock latency, and a wrong
// value forced onto one of the three rebuild copies, which the vote must
// hide.
module tb_fault_corrector;
  localparam int K = 4, R = 3, OUT_W = 18, CHK_OUT_W = 20, THRESH = 8;

  logic clk = 1'b0;
  logic rst_n, in_valid, out_valid;
  logic signed [OUT_W-1:0]     y  [K];
  logic signed [CHK_OUT_W-1:0] z  [R];
  logic signed [OUT_W-1:0]     yc [K];
  logic [R-1:0]                syndrome;

  int checks = 0, failures = 0;
  int n_corr [K];
  int n_chk_fault = 0, n_below = 0, n_vote = 0;

  // Syndrome s1s2s3 for an error on y1..y4, z1..z3 (index 0..6).
  localparam logic [2:0] SYN [7] = '{3'b111, 3'b110, 3'b101, 3'b011, 3'b100, 3'b010, 3'b001};

  fault_corrector #(.K(K), .OUT_W(OUT_W), .CHK_OUT_W(CHK_OUT_W), .THRESH(THRESH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input int lim);
    return $urandom_range(2 * lim) - lim;
  endfunction

  // One vector. pos: -1 none, 0..3 data, 4..6 check. e: error added.
  task automatic run(input int yt [K], input int noise [R], input int pos, input int e,
                     input bit big);
    int yv [K], zv [R], ey [K];
    logic [2:0] es;
    zv[0] = yt[0] + yt[1] + yt[2] + noise[0];
    zv[1] = yt[0] + yt[1] + yt[3] + noise[1];
    zv[2] = yt[0] + yt[2] + yt[3] + noise[2];
    yv = yt;
    if (pos >= 0 && pos < K) yv[pos] += e;
    if (pos >= K) zv[pos-K] += e;
    foreach (yv[i]) y[i] = OUT_W'(yv[i]);
    foreach (zv[j]) z[j] = CHK_OUT_W'(zv[j]);
    ey = yv;
    es = 3'b000;
    if (big) begin
      es = SYN[pos];
      case (pos)
        0: ey[0] = zv[0] - yv[1] - yv[2];
        1: ey[1] = zv[0] - yv[0] - yv[2];
        2: ey[2] = zv[0] - yv[0] - yv[1];
        3: ey[3] = zv[1] - yv[0] - yv[1];
        default: ;
      endcase
      if (pos < K) n_corr[pos]++; else n_chk_fault++;
    end else if (pos >= 0) n_below++;
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || syndrome !== es) begin
      failures++;
      $display("FAIL pos=%0d e=%0d: out_valid=%b syndrome=%b expected %b", pos, e, out_valid, syndrome, es);
    end
    for (int i = 0; i < K; i++) begin
      checks++;
      if (int'(yc[i]) != ey[i]) begin
        failures++;
        $display("FAIL pos=%0d e=%0d: yc[%0d]=%0d expected %0d", pos, e, i, yc[i], ey[i]);
      end
    end
    // A corrected output is within the rounding difference of the truth.
    if (big && pos < K) begin
      checks++;
      if (int'(yc[pos]) - yt[pos] < 0 || int'(yc[pos]) - yt[pos] > 2) begin
        failures++;
        $display("FAIL pos=%0d: corrected %0d, true %0d", pos, yc[pos], yt[pos]);
      end
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid high without in_valid");
    end
  endtask

  initial begin
    int yt [K], noise [R], pos, e, lim;
    rst_n = 1'b0; in_valid = 1'b0;
    foreach (y[i]) y[i] = '0;
    foreach (z[j]) z[j] = '0;
    foreach (n_corr[i]) n_corr[i] = 0;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      lim = (n % 4 == 0) ? 40000 : 2000;
      foreach (yt[i]) yt[i] = rnd(lim);
      foreach (noise[j]) noise[j] = $urandom_range(2);
      pos = int'($urandom_range(7)) - 1;
      if (n % 5 == 4 && pos >= 0) begin
        // Below the threshold, with no rounding difference.
        foreach (noise[j]) noise[j] = 0;
        e = rnd(THRESH);
        run(yt, noise, pos, e, 1'b0);
      end else begin
        e = $urandom_range(30000) + THRESH + 3;
        if ($urandom_range(1)) e = -e;
        run(yt, noise, pos, e, pos >= 0);
      end
    end
    // Extremes of the 18-bit output range.
    yt = '{131071, -131072, 131071, -131072};
    noise = '{0, 0, 0};
    for (int p = 0; p < 7; p++) run(yt, noise, p, (p % 2) ? 5000 : -5000, 1'b1);
    // One faulty rebuild copy is outvoted.
    for (int i = 0; i < K; i++) begin
      yt = '{100, -200, 300, -400};
      noise = '{1, 0, 2};
      case (i)
        0: force dut.g_rec[0].cand[1] = 18'sd12345;
        1: force dut.g_rec[1].cand[0] = 18'sd12345;
        2: force dut.g_rec[2].cand[2] = 18'sd12345;
        default: force dut.g_rec[3].cand[1] = 18'sd12345;
      endcase
      run(yt, noise, i, 777, 1'b1);
      n_vote++;
      release dut.g_rec[0].cand[1];
      release dut.g_rec[1].cand[0];
      release dut.g_rec[2].cand[2];
      release dut.g_rec[3].cand[1];
    end
    for (int i = 0; i < K; i++) begin
      checks++;
      if (n_corr[i] == 0) begin failures++; $display("FAIL y%0d never corrected", i + 1); end
    end
    checks++;
    if (n_chk_fault == 0 || n_below == 0) begin failures++; $display("FAIL a case never happened"); end
    $display("corrected per output: %0d %0d %0d %0d, check faults %0d, below threshold %0d, voted %0d",
             n_corr[0], n_corr[1], n_corr[2], n_corr[3], n_chk_fault, n_below, n_vote);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
