// tb_ktron_pre_kernel -- self-checking test of the Pre_Kernel unit.
// Feeds random vectors (r = 1..10, including full-scale values) through the
// load / mul / acc strobe sequence in both modes and compares the
// accumulated squared distance or inner product with the reference model.
// Also checks that clear empties the accumulator and that a feature takes
// exactly three strobed clocks.
module tb_ktron_pre_kernel;
  import ktron_pkg::*;
  import ktron_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  ktype_e ktype = KT_NORM;
  logic clear = 0, load = 0, mul = 0, acc = 0;
  data_t a = '0, b = '0;
  acc_t result;
  int checks = 0, failures = 0;

  ktron_pre_kernel dut (.clk(clk), .rst_n(rst_n), .ktype(ktype), .clear(clear),
    .load(load), .mul(mul), .acc(acc), .a(a), .b(b), .result(result));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_q13(int mode);
    case (mode)
      0: return ($urandom_range(1) != 0) ? 32767 : -32768;      // extremes
      1: return int'($signed(16'($urandom)));              // full range
      default: return int'($urandom_range(16383)) - 8192;  // within +-1
    endcase
  endfunction

  initial begin
    int av[], bv[];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int r, mode;
      longint exp_v;
      r = $urandom_range(1, 10);
      mode = $urandom_range(2);
      ktype = (t % 2) ? KT_DOT : KT_NORM;
      av = new[r];
      bv = new[r];
      clear = 1; @(negedge clk); clear = 0;
      checks++;
      if (result != 0) begin failures++; $display("FAIL clear"); end
      for (int j = 0; j < r; j++) begin
        av[j] = rnd_q13(mode);
        bv[j] = rnd_q13(mode);
        a = data_t'(av[j]); b = data_t'(bv[j]);
        load = 1; @(negedge clk); load = 0;
        a = data_t'($urandom); b = data_t'($urandom);  // operands only matter at load
        mul = 1;  @(negedge clk); mul = 0;
        acc = 1;  @(negedge clk); acc = 0;
      end
      exp_v = pre_kernel(ktype == KT_DOT, r, av, bv);
      checks++;
      if (longint'(result) != exp_v) begin
        failures++;
        $display("FAIL t=%0d mode=%0d ktype=%0d r=%0d got %0d expected %0d", t, mode, ktype, r, result, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
