// tb_ktron_out_mac -- self-checking test of the Out_MAC unit.
// Loads random weights and a bias, runs init and then m mul/acc steps with
// random kernel values, and compares the accumulator, the saturated Q3.13
// output and the class bit with an integer model. Large weights drive the
// output into both saturation limits.
module tb_ktron_out_mac;
  import ktron_pkg::*;
  import ktron_ref_pkg::*;

  localparam int MAX_SV = 100;
  logic clk = 0, rst_n = 0;
  mem_wr_t w_wr;
  logic b_we = 0;
  data_t b_data = '0;
  logic [6:0] w_addr = '0;
  data_t k_value = '0;
  logic init = 0, mul = 0, acc = 0;
  acc_t y_acc;
  data_t y;
  logic y_pos;
  int w_m [MAX_SV];
  int checks = 0, failures = 0, n_sat = 0, n_pos = 0, n_neg = 0;

  ktron_out_mac #(.MAX_SV(MAX_SV)) dut (.clk(clk), .rst_n(rst_n), .w_wr(w_wr), .b_we(b_we),
    .b_data(b_data), .w_addr(w_addr), .k_value(k_value), .init(init), .mul(mul), .acc(acc),
    .y_acc(y_acc), .y(y), .y_pos(y_pos));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_wr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int m, b, big;
      longint model;
      big = (t % 3 == 0);
      for (int i = 0; i < MAX_SV; i++) begin
        @(negedge clk);
        w_m[i] = big ? int'($signed(16'($urandom))) : int'($urandom_range(8192)) - 4096;
        w_wr = '{we: 1'b1, addr: 10'(i), data: 16'(w_m[i])};
      end
      @(negedge clk);
      w_wr.we = 1'b0;
      b = int'($urandom_range(16383)) - 8192;
      b_data = data_t'(b); b_we = 1;
      @(negedge clk);
      b_we = 0;
      m = $urandom_range(MAX_SV);
      init = 1; @(negedge clk); init = 0;
      model = longint'(b) * 8192;
      for (int i = 0; i < m; i++) begin
        int k;
        k = $urandom_range(8192);
        w_addr = 7'(i);
        @(negedge clk);                    // weight read
        k_value = data_t'(k);
        mul = 1; @(negedge clk); mul = 0;
        acc = 1; @(negedge clk); acc = 0;
        model += longint'(w_m[i]) * longint'(k);
      end
      checks += 3;
      if (longint'(y_acc) != model) begin failures++; $display("FAIL acc got %0d expected %0d", y_acc, model); end
      if (int'(y) != saturate_q13(model)) begin failures++; $display("FAIL y got %0d expected %0d", y, saturate_q13(model)); end
      if (y_pos != (model >= 0)) begin failures++; $display("FAIL class"); end
      if (saturate_q13(model) == 32767 || saturate_q13(model) == -32768) n_sat++;
      if (model >= 0) n_pos++; else n_neg++;
    end
    checks++;
    if (n_sat == 0 || n_pos == 0 || n_neg == 0) begin
      failures++; $display("FAIL coverage sat=%0d pos=%0d neg=%0d", n_sat, n_pos, n_neg);
    end
    $display("saturated=%0d positive=%0d negative=%0d", n_sat, n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
