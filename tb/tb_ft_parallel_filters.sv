// tb_ft_parallel_filters: end-to-end fault-injection test of the protected
// filter bank at its default size (four 16-tap filters, Hamming (7,4)).
//
// Random 8-bit samples stream through the bank (with random idle clocks)
// while single-event upsets are injected, one at a time, into the registers
// of one filter: a bit of a stored input sample (an input error, which lasts
// until the sample leaves the delay line) or a bit of a coefficient (which
// lasts until the coefficients are reloaded). Faults hit data and check
// filters alike. 8000 input and 8000 coefficient upsets are injected.
//
// The reference model is written independently of the RTL: it recomputes
// every filter with integer arithmetic from its own copies of the inputs and
// coefficients (upsets mirrored), forms the checks, thresholds them, decodes
// the syndrome from its own list of Hamming columns and rebuilds the faulty
// output. Each output sample is compared bit-exactly (yc and syndrome), its
// latency must be two clocks, and every corrected output must stay within
// THRESH + 2*W LSBs of a fault-free bank (W = terms per check), the residue
// the threshold allows. Every mechanism (correction of each data filter,
// recognised check-filter faults, faults below the threshold, both fault
// kinds, idle clocks, coefficient reloads) must occur at least once.
module tb_ft_parallel_filters;
  import ft_filter_pkg::*;

  localparam int K = K_DEF;
  localparam int N_INPUT_ERR = 8000;
  localparam int N_COEF_ERR  = 8000;
  localparam int TAPS = TAPS_DEF, IN_W = IN_W_DEF, COEF_W = COEF_W_DEF, OUT_W = OUT_W_DEF;
  localparam int THRESH = THRESH_DEF;

  // Own derivation of the code: R checks, columns of weight >= 2 in
  // descending order for the data filters.
  function automatic int calc_r(input int k);
    int r = 2;
    while ((1 << r) - r - 1 < k) r++;
    return r;
  endfunction
  localparam int R = calc_r(K);
  localparam int F = K + R;

  logic clk = 1'b0;
  logic rst_n, coef_we, in_valid, out_valid;
  logic signed [COEF_W-1:0] coef_in [TAPS];
  logic signed [IN_W-1:0]   x  [K];
  logic signed [OUT_W-1:0]  yc [K];
  logic [R-1:0]             syndrome;

  ft_parallel_filters dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int col [K];
  int member [R][K];   // member[j][i] = 1 when data i is in check j
  int wmax, chk_w;
  int coef_ok [TAPS];
  int mcoef [F][TAPS];
  int mhist [F][TAPS];   // mhist[f][l] = x_f[n-1-l], l < TAPS-1
  int ghist [K][TAPS];   // fault-free data histories

  typedef struct { int yc [K]; int syn; int gold [K]; longint t; } exp_t;
  exp_t q [$];

  int n_corr [K];
  int n_chk_fault = 0, n_below = 0, n_idle = 0, n_reload = 0, n_in_seu = 0, n_coef_seu = 0;
  int n_clean = 0;

  function automatic int wrap(input longint v, input int w);
    longint m = (longint'(1) << w) - 1;
    longint u = v & m;
    if (u >= (longint'(1) << (w - 1))) u -= (longint'(1) << w);
    return int'(u);
  endfunction

  function automatic int in_width(input int f);
    return (f < K) ? IN_W : chk_w;
  endfunction

  function automatic int filt(input int f, input int xin);
    longint acc = longint'(xin) * mcoef[f][0];
    for (int l = 1; l < TAPS; l++) acc += longint'(mhist[f][l-1]) * mcoef[f][l];
    return int'(acc >>> 2);
  endfunction

  function automatic int gfilt(input int i, input int xin);
    longint acc = longint'(xin) * coef_ok[0];
    for (int l = 1; l < TAPS; l++) acc += longint'(ghist[i][l-1]) * coef_ok[l];
    return int'(acc >>> 2);
  endfunction

  // Builds the expected output of one sample and advances the model.
  function automatic exp_t model_step(input int xs [K]);
    exp_t e;
    int xin [F], yo [F], syn, sel, j0;
    longint d;
    for (int i = 0; i < K; i++) xin[i] = xs[i];
    for (int j = 0; j < R; j++) begin
      xin[K+j] = 0;
      for (int i = 0; i < K; i++) if (member[j][i] != 0) xin[K+j] += xs[i];
    end
    for (int f = 0; f < F; f++) yo[f] = filt(f, xin[f]);
    for (int i = 0; i < K; i++) e.gold[i] = gfilt(i, xs[i]);
    syn = 0;
    for (int j = 0; j < R; j++) begin
      d = yo[K+j];
      for (int i = 0; i < K; i++) if (member[j][i] != 0) d -= yo[i];
      if (d > THRESH || d < -THRESH) syn |= 1 << (R - 1 - j);
    end
    e.syn = syn;
    for (int i = 0; i < K; i++) begin
      e.yc[i] = yo[i];
      if (syn == col[i]) begin
        j0 = -1;
        for (int j = R - 1; j >= 0; j--) if (member[j][i] != 0) j0 = j;
        sel = yo[K+j0];
        for (int m = 0; m < K; m++) if (m != i && member[j0][m] != 0) sel -= yo[m];
        e.yc[i] = wrap(sel, OUT_W);
      end
    end
    for (int f = 0; f < F; f++) begin
      for (int l = TAPS - 2; l > 0; l--) mhist[f][l] = mhist[f][l-1];
      mhist[f][0] = xin[f];
    end
    for (int i = 0; i < K; i++) begin
      for (int l = TAPS - 2; l > 0; l--) ghist[i][l] = ghist[i][l-1];
      ghist[i][0] = xs[i];
    end
    return e;
  endfunction

  // ---------------- fault injection into the DUT ----------------
  event inj_ev;
  int inj_f, inj_p, inj_b;
  bit inj_coef;

  for (genvar g = 0; g < K; g++) begin : g_inj_data
    always @(inj_ev) if (inj_f == g) begin
      if (inj_coef) dut.g_data[g].u_fir.coef_q[inj_p] ^= COEF_W'(1 << inj_b);
      else          dut.g_data[g].u_fir.hist_q[inj_p] ^= IN_W'(1 << inj_b);
    end
  end
  for (genvar g = 0; g < R; g++) begin : g_inj_chk
    always @(inj_ev) if (inj_f == K + g) begin
      if (inj_coef) dut.g_chk[g].u_fir.coef_q[inj_p] ^= COEF_W'(1 << inj_b);
      else          dut.g_chk[g].u_fir.hist_q[inj_p] ^= $bits(dut.g_chk[g].u_fir.hist_q[0])'(1 << inj_b);
    end
  end

  task automatic inject(input bit is_coef);
    inj_coef = is_coef;
    inj_f = $urandom_range(F - 1);
    inj_p = is_coef ? $urandom_range(TAPS - 1) : $urandom_range(TAPS - 2);
    inj_b = is_coef ? $urandom_range(COEF_W - 1) : $urandom_range(in_width(inj_f) - 1);
    if (is_coef) begin
      mcoef[inj_f][inj_p] = wrap(longint'(mcoef[inj_f][inj_p]) ^ (longint'(1) << inj_b), COEF_W);
      n_coef_seu++;
    end else begin
      mhist[inj_f][inj_p] = wrap(longint'(mhist[inj_f][inj_p]) ^ (longint'(1) << inj_b), in_width(inj_f));
      n_in_seu++;
    end
    -> inj_ev;
  endtask

  // ---------------- stimulus and checking ----------------
  bit fault_active;

  // Compares the DUT outputs present after a clock edge.
  task automatic check_outputs();
    exp_t e;
    int err;
    if (!out_valid) return;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL unexpected out_valid");
      return;
    end
    e = q.pop_front();
    checks++;
    if (cycle - e.t != 2) begin
      failures++;
      $display("FAIL latency %0d clocks", cycle - e.t);
    end
    checks++;
    if (int'(syndrome) != e.syn) begin
      failures++;
      $display("FAIL syndrome %b expected %b (last upset: filter %0d, %s %0d bit %0d)",
               syndrome, R'(e.syn), inj_f, inj_coef ? "coefficient" : "sample", inj_p, inj_b);
    end
    for (int i = 0; i < K; i++) begin
      checks++;
      if (int'(yc[i]) != e.yc[i]) begin
        failures++;
        $display("FAIL yc[%0d]=%0d expected %0d", i, yc[i], e.yc[i]);
      end
      err = int'(yc[i]) - e.gold[i];
      checks++;
      if (err > THRESH + 2 * wmax || err < -(THRESH + 2 * wmax)) begin
        failures++;
        $display("FAIL yc[%0d]=%0d differs from fault-free %0d", i, yc[i], e.gold[i]);
      end
    end
    // Mechanism tally.
    if (e.syn == 0) begin
      for (int i = 0; i < K; i++) if (e.yc[i] != e.gold[i] && fault_active) begin n_below++; break; end
      n_clean++;
    end else begin
      for (int i = 0; i < K; i++) if (e.syn == col[i]) n_corr[i]++;
      for (int j = 0; j < R; j++) if (e.syn == (1 << (R - 1 - j))) n_chk_fault++;
    end
  endtask

  task automatic clock_once();
    @(negedge clk);
    check_outputs();
  endtask

  task automatic send_sample();
    int xs [K];
    exp_t e;
    if ($urandom_range(7) == 0) begin
      in_valid = 1'b0;
      n_idle++;
      clock_once();
    end
    for (int i = 0; i < K; i++) begin
      xs[i] = $urandom_range(255) - 128;
      x[i] = IN_W'(xs[i]);
    end
    in_valid = 1'b1;
    e = model_step(xs);
    e.t = cycle;
    q.push_back(e);
    clock_once();
    in_valid = 1'b0;
  endtask

  task automatic reload_coefs();
    in_valid = 1'b0;
    for (int l = 0; l < TAPS; l++) coef_in[l] = COEF_W'(coef_ok[l]);
    coef_we = 1'b1;
    for (int f = 0; f < F; f++) for (int l = 0; l < TAPS; l++) mcoef[f][l] = coef_ok[l];
    clock_once();
    coef_we = 1'b0;
    n_reload++;
  endtask

  initial begin
    int cnt;
    // Code tables.
    cnt = 0;
    for (int v = (1 << R) - 1; v > 0; v--) if ($countones(v) >= 2 && cnt < K) begin col[cnt] = v; cnt++; end
    wmax = 0;
    for (int j = 0; j < R; j++) begin
      int w;
      w = 0;
      for (int i = 0; i < K; i++) begin
        member[j][i] = (col[i] >> (R - 1 - j)) & 1;
        w += member[j][i];
      end
      if (w > wmax) wmax = w;
    end
    chk_w = IN_W + $clog2(wmax);
    foreach (n_corr[i]) n_corr[i] = 0;
    foreach (mhist[f, l]) mhist[f][l] = 0;
    foreach (ghist[i, l]) ghist[i][l] = 0;
    foreach (mcoef[f, l]) mcoef[f][l] = 0;
    // A low-pass-like response with full 8-bit range, plus random taps.
    for (int l = 0; l < TAPS; l++) coef_ok[l] = (l == TAPS / 2) ? 127 : (l == 0 ? -128 : $urandom_range(255) - 128);

    rst_n = 1'b0; coef_we = 1'b0; in_valid = 1'b0;
    foreach (x[i]) x[i] = '0;
    foreach (coef_in[l]) coef_in[l] = '0;
    fault_active = 1'b0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    reload_coefs();
    for (int n = 0; n < 3 * TAPS; n++) send_sample();

    for (int n = 0; n < N_INPUT_ERR + N_COEF_ERR; n++) begin
      bit is_coef;
      is_coef = (n % 2 == 1) ? (n / 2 < N_COEF_ERR) : (n / 2 >= N_INPUT_ERR);
      fault_active = 1'b1;
      inject(is_coef);
      for (int s = 0; s < TAPS; s++) send_sample();
      if (is_coef) reload_coefs();
      clock_once(); clock_once();
      fault_active = 1'b0;
      for (int s = 0; s < 2; s++) send_sample();
    end
    clock_once(); clock_once(); clock_once();

    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d samples never came out", q.size()); end
    for (int i = 0; i < K; i++) begin
      checks++;
      if (n_corr[i] == 0) begin failures++; $display("FAIL output %0d never corrected", i + 1); end
    end
    checks++;
    if (n_chk_fault == 0 || n_below == 0 || n_idle == 0 || n_reload < 2 || n_in_seu == 0 || n_coef_seu == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $write("upsets: %0d input, %0d coefficient; corrected samples per output:", n_in_seu, n_coef_seu);
    for (int i = 0; i < K; i++) $write(" %0d", n_corr[i]);
    $display("; check-filter faults %0d; below threshold %0d; clean %0d; idle clocks %0d; reloads %0d",
             n_chk_fault, n_below, n_clean, n_idle, n_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
