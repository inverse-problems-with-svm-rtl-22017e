// ktron_ktype_reg -- the K_Type flag of the KTRON core.
//
// A single flip-flop, written by the host, that tells the Pre_Kernel unit
// whether to form the squared distance ||x_i - x||^2 (KT_NORM, used by the
// Gaussian kernel) or the inner product x_i . x (KT_DOT). That the flag is a
// plain flip-flop follows the published design; the write strobe and the reset value
// (KT_NORM, the Gaussian kernel of the prototype) are this design's choices.
// Timing: ktype follows d one clock after we.
module ktron_ktype_reg
  import ktron_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   we,
  input  ktype_e d,
  output ktype_e ktype
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  ktype <= KT_NORM;
    else if (we) ktype <= d;
  end

endmodule
