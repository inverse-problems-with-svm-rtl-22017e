// ktron_kernel -- second processing unit of the KTRON core (Kernel).
//
// Turns the Pre_Kernel result p into the kernel value K by a table look-up.
// The table (1024 x 16-bit Q3.13 words in one block RAM) is loaded by the
// host, so the same unit serves any kernel of the form f(p). The division of
// the squared distance by 2*sigma^2 is done, as in the published prototype,
// by taking 2*sigma^2 as a power of two and shifting: p is shifted right
// (arithmetically) by `shift` bits and the result is the table index.
//   ktype = KT_NORM : index = p >> shift, clamped to 0..1023. For a Gaussian
//                     kernel with 2*sigma^2 = 2^k and table step 2^-7
//                     (entry n = exp(-n/128)), shift = 26 - 7 + k; the
//                     prototype's 2*sigma^2 = 1 gives shift = 19. Distances
//                     past the table's end read its last entry.
//   ktype = KT_DOT  : index = (p >> shift) clamped to -512..511, plus 512, so
//                     the table holds f over a signed range centred on 0.
// The table size, the clamping and the signed layout in KT_DOT mode are this
// design's choices; the published design says only that kernel values are kept in a
// look-up table and that the division is a shift.
// Timing: k_value is the entry for the p presented one clock earlier.
module ktron_kernel
  import ktron_pkg::*;
(
  input  logic               clk,
  input  ktype_e             ktype,
  input  logic [SHIFT_W-1:0] shift,
  input  acc_t               p,
  input  mem_wr_t            lut_wr,
  output data_t              k_value
);

  localparam int unsigned DEPTH    = 1 << LUT_AW;
  localparam acc_t         NORM_MAX = {{(ACC_W-LUT_AW){1'b0}}, {LUT_AW{1'b1}}};      // 1023
  localparam acc_t         DOT_MAX  = {{(ACC_W-LUT_AW+1){1'b0}}, {(LUT_AW-1){1'b1}}}; // 511
  localparam acc_t         DOT_MIN  = ~DOT_MAX;                                        // -512

  acc_t              scaled;
  logic [LUT_AW-1:0] index;

  assign scaled = p >>> shift;

  always_comb begin
    if (ktype == KT_NORM) begin
      if (scaled < 0)
        index = '0;
      else if (scaled > NORM_MAX)
        index = '1;
      else
        index = scaled[LUT_AW-1:0];
    end else begin
      if (scaled < DOT_MIN)
        index = '0;
      else if (scaled > DOT_MAX)
        index = '1;
      else
        index = {~scaled[LUT_AW-1], scaled[LUT_AW-2:0]};  // add 512 (offset binary)
    end
  end

  ktron_bram #(.DEPTH(DEPTH), .AW(LUT_AW)) u_lut (
    .clk     (clk),
    .wr      (lut_wr),
    .rd_addr (index),
    .rd_data (k_value)
  );

endmodule
