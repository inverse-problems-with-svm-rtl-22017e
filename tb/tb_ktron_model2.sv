// tb_ktron_model2 -- channel-equalization workload on the KTRON core.
//
// Nonlinear channel "Model 2": x~(n) = 0.5 u(n) + u(n-1),
// x^(n) = x~ + 0.1 x~^2 + 0.05 x~^3, x(n) = x^(n) + e(n), with coloured noise
// e(n) = s/sqrt(1+xi^2) w(n) + s*xi/sqrt(1+xi^2) w(n-1), xi = 0.75,
// s^2 = 0.2, and symbols u(n) in {+1,-1}. The receiver estimates u(n-1) from
// x_n = [x(n), x(n-1)] (r = 2, delay D = 1) with a Gaussian kernel,
// 2*sigma^2 = 1 and C = 1.6, trained on 32 samples as in the prototype.
//
// The learning phase is not part of this core, so the testbench trains the
// classifier itself in floating point (kernel adatron, bias from the free
// support vectors), quantizes alpha_i*u_i, b and the support vectors to Q3.13
// and loads them. It then classifies 3000 fresh samples with the core and
// checks for every one that the core's accumulator equals the integer
// reference model and the start-to-done time is 2 + m*(4r+3) clocks. It
// reports the bit error rate and how often the core's decision agrees with
// the floating-point classifier (required: at least 97 %), and requires the
// error rate to stay below 15 % (the published figure for this set-up is
// about 4 %).
module tb_ktron_model2;
  import ktron_pkg::*;
  import ktron_ref_pkg::*;

  localparam int M_TRAIN = 32, N_TEST = 3000, R = 2;
  localparam real XI = 0.75, SIGMA_E2 = 0.2, C_BOX = 1.6;

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

  // ---------------------------------------------------------------- channel
  int  u_hist[3];
  real w_prev, x_prev;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1_000_000)) + 1.0) / 1_000_001.0;
    u2 = real'($urandom_range(1_000_000)) / 1_000_001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // Advances the channel one symbol; returns x(n), u_hist[0] = u(n).
  function automatic real channel_step();
    real xt, xh, w, e, s;
    u_hist[2] = u_hist[1];
    u_hist[1] = u_hist[0];
    u_hist[0] = ($urandom_range(1) != 0) ? 1 : -1;
    xt = 0.5 * u_hist[0] + 1.0 * u_hist[1];
    xh = xt + 0.1 * xt * xt + 0.05 * xt * xt * xt;
    w  = gauss();
    s  = $sqrt(SIGMA_E2);
    e  = s / $sqrt(1.0 + XI * XI) * w + s * XI / $sqrt(1.0 + XI * XI) * w_prev;
    w_prev = w;
    return xh + e;
  endfunction

  task automatic hw(region_e rg, int a, int d);
    @(negedge clk);
    host_we = 1; host_addr = {rg, 10'(a)}; host_wdata = 16'(d);
    @(negedge clk);
    host_we = 0;
  endtask

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real tx[M_TRAIN][R];
    int  tu[M_TRAIN];
    real kmat[M_TRAIN][M_TRAIN];
    real alpha[M_TRAIN];
    real bias, bsum;
    int  nfree, m_sv, errors, agree;
    int  sv_m[], x_m[], w_m[], lut_m[];
    int  b_q;
    real xn;

    sv_m = new[M_TRAIN*R]; x_m = new[R]; w_m = new[M_TRAIN]; lut_m = new[1024];
    w_prev = 0.0;
    u_hist = '{1, 1, 1};
    x_prev = channel_step();
    x_prev = channel_step();

    // ---- training set: feature [x(n), x(n-1)], label u(n-1)
    for (int i = 0; i < M_TRAIN; i++) begin
      xn = channel_step();
      tx[i][0] = xn; tx[i][1] = x_prev; tu[i] = u_hist[1];
      x_prev = xn;
    end
    for (int i = 0; i < M_TRAIN; i++)
      for (int j = 0; j < M_TRAIN; j++)
        kmat[i][j] = $exp(-((tx[i][0]-tx[j][0])**2 + (tx[i][1]-tx[j][1])**2));
    // kernel adatron with box constraint [0, C]
    foreach (alpha[i]) alpha[i] = 0.0;
    for (int ep = 0; ep < 500; ep++)
      for (int i = 0; i < M_TRAIN; i++) begin
        real z;
        z = 0.0;
        for (int j = 0; j < M_TRAIN; j++) z += alpha[j] * tu[j] * kmat[i][j];
        alpha[i] += 0.5 * (1.0 - tu[i] * z);
        if (alpha[i] < 0.0)   alpha[i] = 0.0;
        if (alpha[i] > C_BOX) alpha[i] = C_BOX;
      end
    bsum = 0.0; nfree = 0;
    for (int i = 0; i < M_TRAIN; i++)
      if (alpha[i] > 1e-3 && alpha[i] < C_BOX - 1e-3) begin
        real z;
        z = 0.0;
        for (int j = 0; j < M_TRAIN; j++) z += alpha[j] * tu[j] * kmat[i][j];
        bsum += tu[i] - z; nfree++;
      end
    bias = (nfree > 0) ? bsum / nfree : 0.0;

    // ---- quantize and load the support vectors (alpha_i != 0)
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1024; n++) begin
      lut_m[n] = gauss_entry(n);
      hw(RGN_LUT, n, lut_m[n]);
    end
    m_sv = 0;
    for (int i = 0; i < M_TRAIN; i++) begin
      int wq;
      wq = to_q13(alpha[i] * tu[i]);
      if (wq != 0) begin
        for (int j = 0; j < R; j++) begin
          sv_m[m_sv*R + j] = to_q13(tx[i][j]);
          hw(RGN_SV, m_sv*R + j, sv_m[m_sv*R + j]);
        end
        w_m[m_sv] = wq;
        hw(RGN_W, m_sv, wq);
        m_sv++;
      end
    end
    b_q = to_q13(bias);
    hw(RGN_CFG, int'(CFG_KTYPE), int'(KT_NORM));
    hw(RGN_CFG, int'(CFG_M), m_sv);
    hw(RGN_CFG, int'(CFG_R), R);
    hw(RGN_CFG, int'(CFG_B), b_q);
    hw(RGN_CFG, int'(CFG_SHIFT), 19);
    $display("trained: %0d support vectors of %0d samples, b = %f", m_sv, M_TRAIN, bias);

    // ---- forward phase on fresh samples
    errors = 0; agree = 0;
    for (int t = 0; t < N_TEST; t++) begin
      int cyc;
      longint model;
      real f;
      xn = channel_step();
      x_m[0] = to_q13(xn); x_m[1] = to_q13(x_prev);
      hw(RGN_X, 0, x_m[0]);
      hw(RGN_X, 1, x_m[1]);
      f = bias;
      for (int i = 0; i < M_TRAIN; i++)
        f += alpha[i] * tu[i] * $exp(-((tx[i][0]-xn)**2 + (tx[i][1]-x_prev)**2));
      x_prev = xn;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 5000) begin @(negedge clk); cyc++; end
      model = estimate(0, 19, m_sv, R, sv_m, x_m, w_m, lut_m, b_q);
      checks += 2;
      if (longint'(y_acc) != model) begin
        failures++; $display("FAIL sample %0d: y_acc %0d expected %0d", t, y_acc, model);
      end
      if (cyc != 2 + m_sv*(4*R + 3)) begin
        failures++; $display("FAIL sample %0d: latency %0d", t, cyc);
      end
      if ((y_pos ? 1 : -1) != u_hist[1]) errors++;
      if (y_pos == (f >= 0.0)) agree++;
    end
    $display("bit error rate %0.2f %% over %0d symbols; decisions equal to floating point: %0.2f %%",
             100.0 * errors / N_TEST, N_TEST, 100.0 * agree / N_TEST);
    $display("clocks per classification: %0d (m = %0d, r = %0d)", 2 + m_sv*(4*R+3), m_sv, R);
    checks += 2;
    if (agree < N_TEST * 97 / 100) begin failures++; $display("FAIL agreement with floating point"); end
    if (errors > N_TEST * 15 / 100) begin failures++; $display("FAIL error rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
