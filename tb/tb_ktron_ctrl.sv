// tb_ktron_ctrl -- self-checking test of the KTRON controller.
// For random sizes (m = 0..100, r = 1..10) it watches the strobes and
// addresses the controller issues and checks them against the expected
// schedule: every feature (i, j) is addressed as i*r+j / j in the clock before
// its load strobe, load, mul and acc follow on consecutive clocks, each
// vector's weight address is i at its mul strobe, the Pre_Kernel is cleared
// once per vector plus once at the start, and done arrives exactly
// 2 + m*(4r+3) clocks after start. A start while busy must be ignored.
module tb_ktron_ctrl;
  import ktron_pkg::*;

  localparam int MAX_SV = 100, MAX_R = 10;
  logic clk = 0, rst_n = 0, start = 0;
  logic [6:0] m = '0;
  logic [3:0] r = 4'd1;
  logic busy, done;
  logic [9:0] sv_addr;
  logic [3:0] x_addr;
  logic [6:0] w_addr;
  logic pk_clear, pk_load, pk_mul, pk_acc, mac_init, mac_mul, mac_acc;
  int checks = 0, failures = 0, n_ignored_start = 0;

  ktron_ctrl #(.MAX_SV(MAX_SV), .MAX_R(MAX_R)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 60; t++) begin
      int mm, rr, cyc, n_load, n_clear, n_macacc, n_init;
      int exp_i, exp_j;
      logic [9:0] prev_sv;
      logic [3:0] prev_x;
      logic prev_load, prev_mul;
      mm = (t == 0) ? 0 : (t == 1) ? MAX_SV : $urandom_range(MAX_SV);
      rr = (t == 2) ? MAX_R : $urandom_range(1, MAX_R);
      m = 7'(mm); r = 4'(rr);
      start = 1;
      @(negedge clk);
      start = 0;
      m = 7'($urandom); r = 4'($urandom);   // must have been sampled at start
      cyc = 1; n_load = 0; n_clear = 0; n_macacc = 0; n_init = 0;
      exp_i = 0; exp_j = 0;
      prev_load = 0; prev_mul = 0; prev_sv = '0; prev_x = '0;
      while (!done && cyc < 10000) begin
        if (cyc == 5 && mm > 0) begin
          start = 1;                         // ignored while busy
          n_ignored_start++;
        end else start = 0;
        if (pk_clear) n_clear++;
        if (mac_init) n_init++;
        if (pk_load) begin
          checks++;
          if (prev_sv != 10'(exp_i*rr + exp_j) || prev_x != 4'(exp_j))
            fail($sformatf("feature (%0d,%0d) addressed %0d/%0d", exp_i, exp_j, prev_sv, prev_x));
          n_load++;
        end
        if (pk_mul) begin checks++; if (!prev_load) fail("mul not right after load"); end
        if (pk_acc) begin
          checks++;
          if (!prev_mul) fail("acc not right after mul");
          exp_j++;
        end
        if (mac_mul) begin
          checks++;
          if (w_addr != 7'(exp_i)) fail($sformatf("weight address %0d expected %0d", w_addr, exp_i));
          if (exp_j != rr) fail("vector multiplied before all features");
        end
        if (mac_acc) begin
          n_macacc++;
          exp_i++; exp_j = 0;
        end
        checks++;
        if (!busy) fail("busy low during run");
        prev_load = pk_load; prev_mul = pk_mul; prev_sv = sv_addr; prev_x = x_addr;
        @(negedge clk);
        cyc++;
      end
      start = 0;
      checks += 5;
      if (cyc != 2 + mm*(4*rr + 3)) fail($sformatf("m=%0d r=%0d latency %0d expected %0d", mm, rr, cyc, 2 + mm*(4*rr+3)));
      if (n_load != mm*rr) fail($sformatf("loads %0d expected %0d", n_load, mm*rr));
      if (n_macacc != mm) fail("mac acc count");
      if (n_clear != mm + 1 || n_init != 1) fail("clear/init count");
      @(negedge clk);
      if (busy || done) fail("not idle after done");
    end
    checks++;
    if (n_ignored_start == 0) fail("start while busy never tried");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
