// tb_ktron_channels -- channel-equalization experiments on the KTRON core.
//
// Runs the three nonlinear channel models
//   x~(n) = sum_k h_k u(n-k),  x(n) = sum_p c_p x~(n)^p + e(n)
//   Model 1: h = (1, 0.5),              c = (1, 0, -0.9), white noise
//   Model 2: h = (0.5, 1),              c = (1, 0.1, 0.05), coloured noise
//   Model 3: h = (0.3482, 0.9704, 0.3482), c = (1, 0.2),  coloured noise
// (coloured noise: e(n) = s/sqrt(1+xi^2) w(n) + s*xi/sqrt(1+xi^2) w(n-1),
// xi = 0.75) in the configurations of the published experiments:
//   Models 1 and 2, delays D = 0, 1, 2, noise variance 0.2, r = 2;
//   Model 3, r = 3, D = 2, 64 and 32 training samples, noise 0.1 .. 0.4,
// each with its published C and sigma^2. The published Model 1/2 runs used
// 500 training samples; the core holds 100 support vectors, so 100 are used.
// 2*sigma^2 is rounded to the nearest power of two (the core divides by a
// shift) and weights are limited to the Q3.13 range, alpha_i <= 3.99.
//
// For each configuration the testbench trains in floating point (kernel
// adatron with box constraint, bias from the free support vectors), loads
// the quantized classifier, and classifies 3000 fresh symbols with the core.
// Every result is checked bit-exactly against the integer reference model,
// and every start-to-done time against 2 + m*(4r+3). It prints the bit
// error rate next to the published SVM figure and requires the core to agree
// with the floating-point classifier on at least 95 % of the symbols and the
// error rate to stay below 30 %.
module tb_ktron_channels;
  import ktron_pkg::*;
  import ktron_ref_pkg::*;

  localparam int N_TEST = 3000, MAX_TRAIN = 100, MAX_RR = 3;
  localparam real XI = 0.75;

  logic clk = 0, rst_n = 0;
  logic host_we = 0;
  logic [12:0] host_addr = '0;
  logic [15:0] host_wdata = '0;
  logic start = 0;
  logic busy, done, y_pos;
  data_t y;
  acc_t y_acc;

  ktron dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int lut_m[];

  // ---------------------------------------------------------------- channel
  int  model_q;
  real sig_e;
  int  u_hist[4];
  real w_prev;
  real x_hist[4];

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1_000_000)) + 1.0) / 1_000_001.0;
    u2 = real'($urandom_range(1_000_000)) / 1_000_001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // Advances the channel one symbol: u_hist[k] = u(n-k), x_hist[k] = x(n-k).
  function automatic void channel_step();
    real xt, xh, w, e;
    for (int k = 3; k > 0; k--) begin
      u_hist[k] = u_hist[k-1];
      x_hist[k] = x_hist[k-1];
    end
    u_hist[0] = ($urandom_range(1) != 0) ? 1 : -1;
    case (model_q)
      1: begin xt = 1.0 * u_hist[0] + 0.5 * u_hist[1];           xh = xt - 0.9 * xt * xt * xt; end
      2: begin xt = 0.5 * u_hist[0] + 1.0 * u_hist[1];           xh = xt + 0.1 * xt * xt + 0.05 * xt * xt * xt; end
      default: begin
         xt = 0.3482 * u_hist[0] + 0.9704 * u_hist[1] + 0.3482 * u_hist[2];
         xh = xt + 0.2 * xt * xt;
      end
    endcase
    w = gauss();
    if (model_q == 1) e = sig_e * w;
    else              e = sig_e / $sqrt(1.0 + XI * XI) * w + sig_e * XI / $sqrt(1.0 + XI * XI) * w_prev;
    w_prev = w;
    x_hist[0] = xh + e;
  endfunction

  task automatic hw(region_e rg, int a, int d);
    @(negedge clk);
    host_we = 1; host_addr = {rg, 10'(a)}; host_wdata = 16'(d);
    @(negedge clk);
    host_we = 0;
  endtask

  // One experiment; returns nothing, counts checks and failures.
  task automatic run_config(int model, int dly, int r, int m_train, real var_e,
                            real c_box, real sigma2, real paper_svm);
    real tx[MAX_TRAIN][MAX_RR];
    int  tu[MAX_TRAIN];
    real kmat[MAX_TRAIN][MAX_TRAIN];
    real alpha[MAX_TRAIN];
    real bias, bsum, two_s2, c_eff;
    int  k_pow, shift, nfree, m_sv, errors, agree, b_q, bad_lat, bad_val;
    int  sv_m[], x_m[], w_m[];

    sv_m = new[MAX_TRAIN*r]; x_m = new[r]; w_m = new[MAX_TRAIN];
    model_q = model;
    sig_e = $sqrt(var_e);
    w_prev = 0.0;
    u_hist = '{1, 1, 1, 1};
    x_hist = '{0.0, 0.0, 0.0, 0.0};
    for (int k = 0; k < 4; k++) channel_step();
    // kernel width rounded to a power of two
    k_pow = int'($floor($ln(2.0 * sigma2) / $ln(2.0) + 0.5));
    two_s2 = 2.0 ** k_pow;
    shift = 19 + k_pow;
    c_eff = (c_box > 3.99) ? 3.99 : c_box;

    // ---- training set: feature [x(n) .. x(n-r+1)], label u(n-D)
    for (int i = 0; i < m_train; i++) begin
      channel_step();
      for (int j = 0; j < r; j++) tx[i][j] = x_hist[j];
      tu[i] = u_hist[dly];
    end
    for (int i = 0; i < m_train; i++)
      for (int j = 0; j < m_train; j++) begin
        real d2;
        d2 = 0.0;
        for (int f = 0; f < r; f++) d2 += (tx[i][f] - tx[j][f]) ** 2;
        kmat[i][j] = $exp(-d2 / two_s2);
      end
    for (int i = 0; i < m_train; i++) alpha[i] = 0.0;
    for (int ep = 0; ep < 300; ep++)
      for (int i = 0; i < m_train; i++) begin
        real z;
        z = 0.0;
        for (int j = 0; j < m_train; j++) z += alpha[j] * tu[j] * kmat[i][j];
        alpha[i] += 0.5 * (1.0 - tu[i] * z);
        if (alpha[i] < 0.0)   alpha[i] = 0.0;
        if (alpha[i] > c_eff) alpha[i] = c_eff;
      end
    bsum = 0.0; nfree = 0;
    for (int i = 0; i < m_train; i++)
      if (alpha[i] > 1e-3 && alpha[i] < c_eff - 1e-3) begin
        real z;
        z = 0.0;
        for (int j = 0; j < m_train; j++) z += alpha[j] * tu[j] * kmat[i][j];
        bsum += tu[i] - z; nfree++;
      end
    bias = (nfree > 0) ? bsum / nfree : 0.0;
    if (bias > 3.9) bias = 3.9;
    if (bias < -3.9) bias = -3.9;

    // ---- load
    m_sv = 0;
    for (int i = 0; i < m_train; i++) begin
      int wq;
      wq = to_q13(alpha[i] * tu[i]);
      if (wq != 0) begin
        for (int j = 0; j < r; j++) begin
          sv_m[m_sv*r + j] = to_q13(tx[i][j]);
          hw(RGN_SV, m_sv*r + j, sv_m[m_sv*r + j]);
        end
        w_m[m_sv] = wq;
        hw(RGN_W, m_sv, wq);
        m_sv++;
      end
    end
    b_q = to_q13(bias);
    hw(RGN_CFG, int'(CFG_KTYPE), int'(KT_NORM));
    hw(RGN_CFG, int'(CFG_M), m_sv);
    hw(RGN_CFG, int'(CFG_R), r);
    hw(RGN_CFG, int'(CFG_B), b_q);
    hw(RGN_CFG, int'(CFG_SHIFT), shift);

    // ---- forward phase
    errors = 0; agree = 0; bad_lat = 0; bad_val = 0;
    for (int t = 0; t < N_TEST; t++) begin
      int cyc;
      longint model_v;
      real f;
      channel_step();
      for (int j = 0; j < r; j++) begin
        x_m[j] = to_q13(x_hist[j]);
        hw(RGN_X, j, x_m[j]);
      end
      f = bias;
      for (int i = 0; i < m_train; i++) begin
        real d2;
        d2 = 0.0;
        for (int j = 0; j < r; j++) d2 += (tx[i][j] - x_hist[j]) ** 2;
        f += alpha[i] * tu[i] * $exp(-d2 / two_s2);
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 10000) begin @(negedge clk); cyc++; end
      model_v = estimate(0, shift, m_sv, r, sv_m, x_m, w_m, lut_m, b_q);
      checks += 2;
      if (longint'(y_acc) != model_v) bad_val++;
      if (cyc != 2 + m_sv*(4*r + 3)) bad_lat++;
      if ((y_pos ? 1 : -1) != u_hist[dly]) errors++;
      if (y_pos == (f >= 0.0)) agree++;
    end
    failures += bad_val + bad_lat;
    $display("Model %0d D=%0d r=%0d m=%3d var=%0.1f C=%4.1f 2s2=%5.2f(->%5.2f) SVs=%3d | BER %5.2f %% (published SVM %4.1f %%) | agree %6.2f %% | %0d clocks",
             model, dly, r, m_train, var_e, c_box, 2.0*sigma2, two_s2, m_sv,
             100.0 * errors / N_TEST, paper_svm, 100.0 * agree / N_TEST, 2 + m_sv*(4*r+3));
    checks += 2;
    if (bad_val != 0 || bad_lat != 0) $display("FAIL %0d results and %0d latencies differ", bad_val, bad_lat);
    if (agree < N_TEST * 95 / 100) begin failures++; $display("FAIL agreement with floating point"); end
    if (errors > N_TEST * 30 / 100) begin failures++; $display("FAIL error rate"); end
  endtask

  initial begin
    repeat (100_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lut_m = new[1024];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1024; n++) begin
      lut_m[n] = gauss_entry(n);
      hw(RGN_LUT, n, lut_m[n]);
    end
    // Models 1 and 2, noise variance 0.2
    run_config(1, 0, 2, 100, 0.2, 1.6, 0.4, 15.6);
    run_config(1, 1, 2, 100, 0.2, 1.6, 0.4, 5.4);
    run_config(1, 2, 2, 100, 0.2, 3.2, 1.6, 3.5);
    run_config(2, 0, 2, 100, 0.2, 1.6, 1.0, 12.1);
    run_config(2, 1, 2, 100, 0.2, 1.6, 1.0, 4.6);
    run_config(2, 2, 2, 100, 0.2, 1.6, 1.0, 0.7);
    // Model 3, r = 3, D = 2
    run_config(3, 2, 3, 64, 0.1, 16.0, 1.6, 1.8);
    run_config(3, 2, 3, 64, 0.2, 16.0, 0.8, 7.5);
    run_config(3, 2, 3, 64, 0.3,  8.0, 6.4, 9.0);
    run_config(3, 2, 3, 64, 0.4, 32.0, 12.8, 11.9);
    run_config(3, 2, 3, 32, 0.1,  8.0, 0.8, 2.0);
    run_config(3, 2, 3, 32, 0.2, 16.0, 0.8, 8.1);
    run_config(3, 2, 3, 32, 0.3,  8.0, 3.2, 10.8);
    run_config(3, 2, 3, 32, 0.4,  8.0, 12.8, 13.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
