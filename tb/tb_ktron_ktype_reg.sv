// tb_ktron_ktype_reg -- self-checking test of the K_Type flag register.
// Checks the reset value (KT_NORM), that a write changes the flag one clock
// later, and that the flag holds while we is low.
module tb_ktron_ktype_reg;
  import ktron_pkg::*;

  logic clk = 0, rst_n = 0, we = 0;
  ktype_e d = KT_DOT, q;
  ktype_e model;
  int checks = 0, failures = 0;

  ktron_ktype_reg dut (.clk(clk), .rst_n(rst_n), .we(we), .d(d), .ktype(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (q != KT_NORM) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    model = KT_NORM;
    for (int k = 0; k < 200; k++) begin
      we = 1'($urandom);
      d  = ktype_e'($urandom_range(1));
      @(negedge clk);
      if (we) model = d;
      checks++;
      if (q != model) begin failures++; $display("FAIL step %0d: got %0d expected %0d", k, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
