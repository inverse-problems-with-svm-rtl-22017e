// tb_ktron -- end-to-end test of the KTRON core at its default sizes.
//
// Acts as the supervising processor: loads support vectors, input vector,
// weights, bias, kernel table and configuration through the host bus, starts
// the core and compares y_acc, y and y_pos with the integer reference model,
// and the start-to-done time with 2 + m*(4r+3) clocks. The runs cover:
// the prototype configuration (m = 32, r = 2, Gaussian, 2*sigma^2 = 1), other
// kernel widths, the inner-product mode with a polynomial table, distances
// past the end of the table, output saturation, both class decisions, m = 0,
// clamping of out-of-range m and r, a start and a write issued while busy
// (both ignored) and kernel-type switches between runs. Each of these
// mechanisms is counted and one that never happened counts as a failure.
module tb_ktron;
  import ktron_pkg::*;
  import ktron_ref_pkg::*;

  localparam int MAX_SV = 100, MAX_R = 10;

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
  int sv_m[], x_m[], w_m[], lut_m[];
  int m_cfg, r_cfg, b_cfg, shift_cfg;
  bit dot_cfg;
  // mechanism counters
  int n_norm, n_dot, n_clamp_end, n_sat, n_pos, n_neg, n_m0, n_cfg_clamp;
  int n_busy_start, n_busy_write, n_mode_switch, n_proto;

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  task automatic hw(region_e rg, int a, int d);
    @(negedge clk);
    host_we = 1; host_addr = {rg, 10'(a)}; host_wdata = 16'(d);
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic load_gauss_lut();
    for (int n = 0; n < 1024; n++) begin
      lut_m[n] = gauss_entry(n);
      hw(RGN_LUT, n, lut_m[n]);
    end
  endtask

  // (1 + p)^2 with p = (n - 512)/128, saturated to Q3.13
  task automatic load_poly_lut();
    for (int n = 0; n < 1024; n++) begin
      real pv;
      pv = (n - 512) / 128.0;
      lut_m[n] = to_q13((1.0 + pv) * (1.0 + pv));
      hw(RGN_LUT, n, lut_m[n]);
    end
  endtask

  task automatic set_cfg(bit dot, int m, int r, int b, int shift);
    if (dot != dot_cfg) n_mode_switch++;
    hw(RGN_CFG, int'(CFG_KTYPE), int'(dot));
    hw(RGN_CFG, int'(CFG_M), m);
    hw(RGN_CFG, int'(CFG_R), r);
    hw(RGN_CFG, int'(CFG_B), b);
    hw(RGN_CFG, int'(CFG_SHIFT), shift);
    dot_cfg = dot;
    m_cfg = (m > MAX_SV) ? MAX_SV : m;
    r_cfg = (r == 0) ? 1 : (r > MAX_R) ? MAX_R : r;
    if (m_cfg != m || r_cfg != r) n_cfg_clamp++;
    b_cfg = int'($signed(16'(b)));
    shift_cfg = shift;
  endtask

  // random vectors; spread sets the feature range in Q3.13 units
  task automatic load_data(int spread, int wmax, int x_off);
    for (int i = 0; i < m_cfg; i++)
      for (int j = 0; j < r_cfg; j++) begin
        sv_m[i*r_cfg + j] = int'($urandom_range(2*spread)) - spread;
        hw(RGN_SV, i*r_cfg + j, sv_m[i*r_cfg + j]);
      end
    for (int j = 0; j < r_cfg; j++) begin
      x_m[j] = int'($urandom_range(2*spread)) - spread + x_off;
      if (x_m[j] > 32767) x_m[j] = 32767;
      hw(RGN_X, j, x_m[j]);
    end
    for (int i = 0; i < m_cfg; i++) begin
      w_m[i] = int'($urandom_range(2*wmax)) - wmax;
      hw(RGN_W, i, w_m[i]);
    end
  endtask

  task automatic run_and_check(string name, bit poke_busy);
    int cyc, exp_cyc, idx;
    longint model;
    bit clamp_end;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 20000) begin
      if (poke_busy && cyc == 3) begin
        start = 1; n_busy_start++;                 // ignored: core is busy
        host_we = 1; host_addr = {RGN_CFG, CFG_B}; host_wdata = 16'h7fff;
        n_busy_write++;                           // ignored: core is busy
      end else begin
        start = 0; host_we = 0;
      end
      @(negedge clk);
      cyc++;
    end
    start = 0; host_we = 0;
    model = estimate(dot_cfg, shift_cfg, m_cfg, r_cfg, sv_m, x_m, w_m, lut_m, b_cfg);
    // mechanism bookkeeping from the reference model
    clamp_end = 0;
    for (int i = 0; i < m_cfg; i++) begin
      int row[];
      row = new[r_cfg];
      for (int j = 0; j < r_cfg; j++) row[j] = sv_m[i*r_cfg + j];
      idx = lut_index(dot_cfg, shift_cfg, pre_kernel(dot_cfg, r_cfg, row, x_m));
      if ((!dot_cfg && idx == 1023) || (dot_cfg && (idx == 0 || idx == 1023))) clamp_end = 1;
    end
    if (clamp_end) n_clamp_end++;
    if (dot_cfg) n_dot++; else n_norm++;
    if (m_cfg == 0) n_m0++;
    if (saturate_q13(model) == 32767 || saturate_q13(model) == -32768) n_sat++;
    if (model >= 0) n_pos++; else n_neg++;
    exp_cyc = 2 + m_cfg*(4*r_cfg + 3);
    checks += 4;
    if (cyc != exp_cyc) fail($sformatf("%s: latency %0d expected %0d", name, cyc, exp_cyc));
    if (longint'(y_acc) != model) fail($sformatf("%s: y_acc %0d expected %0d", name, y_acc, model));
    if (int'(y) != saturate_q13(model)) fail($sformatf("%s: y %0d expected %0d", name, y, saturate_q13(model)));
    if (y_pos != (model >= 0)) fail($sformatf("%s: class", name));
    $display("%-22s m=%0d r=%0d %s shift=%0d  y=%f  class=%s  %0d clocks",
             name, m_cfg, r_cfg, dot_cfg ? "dot " : "norm", shift_cfg,
             real'(y) / 8192.0, y_pos ? "+1" : "-1", cyc);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sv_m = new[MAX_SV*MAX_R]; x_m = new[MAX_R]; w_m = new[MAX_SV]; lut_m = new[1024];
    dot_cfg = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_gauss_lut();

    // prototype: 32 support vectors, r = 2, 2*sigma^2 = 1 (shift 19)
    for (int t = 0; t < 4; t++) begin
      set_cfg(0, 32, 2, int'($urandom_range(4096)) - 2048, 19);
      load_data(8192, 13107, 0);
      run_and_check("prototype m=32 r=2", t == 1);
      n_proto++;
    end
    // other kernel widths and sizes, Gaussian
    for (int t = 0; t < 6; t++) begin
      set_cfg(0, $urandom_range(1, 60), $urandom_range(1, 10), int'($urandom_range(4096)) - 2048,
              18 + $urandom_range(4));
      load_data(8192, 13107, 0);
      run_and_check("gaussian random", 0);
    end
    // input far from every support vector: distances past the table
    set_cfg(0, 20, 4, 0, 19);
    load_data(4096, 8192, 24576);
    run_and_check("far input", 0);
    // m = 0: the result is the bias alone
    set_cfg(0, 0, 3, -1234, 19);
    run_and_check("no support vectors", 0);
    // out-of-range m and r are clamped
    set_cfg(0, 200, 15, 100, 20);
    load_data(4096, 4096, 0);
    run_and_check("clamped m and r", 0);
    set_cfg(0, 5, 0, 100, 20);
    load_data(4096, 4096, 0);
    run_and_check("r written as 0", 0);
    // inner-product mode with a polynomial table (1 + x_i.x)^2
    load_poly_lut();
    for (int t = 0; t < 4; t++) begin
      set_cfg(1, $urandom_range(1, 40), $urandom_range(1, 10), int'($urandom_range(4096)) - 2048, 19 + t % 3);
      load_data(8192, 8192, 0);
      run_and_check("polynomial", t == 2);
    end
    // large weights: output saturates
    set_cfg(1, 100, 10, 0, 21);
    load_data(16384, 32767, 0);
    run_and_check("large weights", 0);
    // back to the Gaussian kernel
    load_gauss_lut();
    set_cfg(0, 32, 2, 0, 19);
    load_data(8192, 13107, 0);
    run_and_check("gaussian again", 0);

    $display("mechanisms: norm=%0d dot=%0d table_end=%0d saturate=%0d class+1=%0d class-1=%0d m0=%0d cfg_clamp=%0d busy_start=%0d busy_write=%0d mode_switch=%0d prototype=%0d",
             n_norm, n_dot, n_clamp_end, n_sat, n_pos, n_neg, n_m0, n_cfg_clamp,
             n_busy_start, n_busy_write, n_mode_switch, n_proto);
    checks++;
    if (n_norm == 0 || n_dot == 0 || n_clamp_end == 0 || n_sat == 0 || n_pos == 0 || n_neg == 0 ||
        n_m0 == 0 || n_cfg_clamp == 0 || n_busy_start == 0 || n_busy_write == 0 || n_mode_switch == 0 ||
        n_proto == 0)
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
