// ktron_pre_kernel -- first processing unit of the KTRON core (Pre_Kernel).
//
// Accumulates, one feature per step, either the squared distance
// sum_j (a_j - b_j)^2 (ktype = KT_NORM) or the inner product sum_j a_j*b_j
// (ktype = KT_DOT) of a support vector a and the input vector b. It contains
// the core's first multiplier, a 17 x 17-bit signed one: in KT_NORM mode both
// multiplier operands are the 17-bit difference a - b, in KT_DOT mode they
// are a and b. Inputs are Q3.13, the result is Q14.26 in ACC_W bits.
//
// The unit is stepped by the controller, one strobe per stage, so a feature
// takes three clocks after its operands are valid:
//   load  : capture the operands (difference or raw values)
//   mul   : register their product
//   acc   : add the product to the accumulator
// clear zeroes the accumulator (at the start of every support vector) and
// has priority over acc. The stage split is this design's choice; the
// published design gives what the unit computes and that it has one
// multiplier.
module ktron_pre_kernel
  import ktron_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  ktype_e ktype,
  input  logic   clear,
  input  logic   load,
  input  logic   mul,
  input  logic   acc,
  input  data_t  a,
  input  data_t  b,
  output acc_t   result
);

  logic signed [DATA_W:0]     op_a, op_b;      // 17-bit multiplier operands
  logic signed [2*DATA_W+1:0] prod;            // 34-bit product
  logic signed [DATA_W:0]     diff;

  assign diff = {a[DATA_W-1], a} - {b[DATA_W-1], b};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_a   <= '0;
      op_b   <= '0;
      prod   <= '0;
      result <= '0;
    end else begin
      if (load) begin
        if (ktype == KT_NORM) begin
          op_a <= diff;
          op_b <= diff;
        end else begin
          op_a <= {a[DATA_W-1], a};
          op_b <= {b[DATA_W-1], b};
        end
      end
      if (mul)
        prod <= op_a * op_b;
      if (clear)
        result <= '0;
      else if (acc)
        result <= result + ACC_W'(prod);
    end
  end

endmodule
