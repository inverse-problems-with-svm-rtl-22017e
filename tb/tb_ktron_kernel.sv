// tb_ktron_kernel -- self-checking test of the Kernel unit.
// Loads the Gaussian table (entry n = round(8192*exp(-n/128))), then checks
// the kernel value one clock after a Pre_Kernel result is presented, for
// random results and shifts in both modes, including results below, inside
// and past the table's range (clamping) and the prototype's 2*sigma^2 = 1
// setting (shift 19) against exp(-d) computed in floating point.
module tb_ktron_kernel;
  import ktron_pkg::*;
  import ktron_ref_pkg::*;

  logic clk = 0;
  ktype_e ktype = KT_NORM;
  logic [5:0] shift = 6'd19;
  acc_t p = '0;
  mem_wr_t lut_wr;
  data_t k_value;
  int lut[];
  int checks = 0, failures = 0;
  int n_clamp_hi = 0, n_clamp_lo = 0;

  ktron_kernel dut (.clk(clk), .ktype(ktype), .shift(shift), .p(p), .lut_wr(lut_wr), .k_value(k_value));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lut = new[1024];
    lut_wr = '0;
    for (int n = 0; n < 1024; n++) begin
      @(negedge clk);
      lut[n] = gauss_entry(n);
      lut_wr = '{we: 1'b1, addr: 10'(n), data: 16'(lut[n])};
    end
    @(negedge clk);
    lut_wr.we = 1'b0;
    // prototype setting: K = exp(-d), d in Q.26
    for (int t = 0; t < 200; t++) begin
      real d, kr;
      d = $urandom_range(10000) / 1000.0;          // 0 .. 10
      p = acc_t'(longint'(d * 67108864.0));
      ktype = KT_NORM; shift = 6'd19;
      @(negedge clk);
      kr = $exp(-d) * 8192.0;
      checks++;
      // table step 1/128 and clamping at d = 8 bound the error
      if ((real'(k_value) - kr) > 70.0 || (kr - real'(k_value)) > 70.0) begin
        failures++; $display("FAIL gaussian d=%f got %0d expected about %f", d, k_value, kr);
      end
    end
    // random results and shifts, both modes, exact index check
    for (int t = 0; t < 3000; t++) begin
      longint pv;
      int idx, sh;
      bit dot;
      dot = t[0];
      sh  = $urandom_range(8, 27);   // keeps p within the 40-bit accumulator range
      case ($urandom_range(3))
        0: pv = longint'($urandom_range(2000)) <<< sh;           // in range
        1: pv = longint'($urandom) <<< 6;                        // often past the end
        2: pv = -(longint'($urandom_range(2000)) <<< sh);        // negative
        default: pv = longint'($signed($urandom)) <<< 4;
      endcase
      if (!dot && pv < 0) pv = -pv;                              // a distance is never negative
      ktype = dot ? KT_DOT : KT_NORM;
      shift = 6'(sh);
      p = acc_t'(pv);
      @(negedge clk);
      idx = lut_index(dot, sh, pv);
      if (!dot && idx == 1023) n_clamp_hi++;
      if (dot && idx == 0) n_clamp_lo++;
      checks++;
      if (int'(k_value) != lut[idx]) begin
        failures++; $display("FAIL dot=%0d p=%0d sh=%0d got %0d expected lut[%0d]=%0d", dot, pv, sh, k_value, idx, lut[idx]);
      end
    end
    checks++;
    if (n_clamp_hi == 0 || n_clamp_lo == 0) begin failures++; $display("FAIL clamping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
