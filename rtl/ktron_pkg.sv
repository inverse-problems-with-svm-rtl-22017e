// ktron_pkg -- shared types and constants of the KTRON SVM forward-phase core.
//
// Number format: every stored quantity (support-vector features, the input
// vector, weights alpha_i*u_i, the bias b and the kernel table entries) is a
// 16-bit two's-complement number with 3 integer bits and 13 fractional bits
// (Q3.13), as in the published prototype this design follows. Sums of products are
// carried in 40-bit accumulators with 26 fractional bits (Q14.26), wide enough
// for ten 17x17-bit products without overflow. The accumulator width and the
// host address map below are this design's own choices.
//
// Host address map (16-bit data, 13-bit word address, bits [12:10] select):
//   0 : support-vector RAM, word (i*r + j) holds feature j of vector i
//   1 : input-vector RAM x, word j holds x(n-j)
//   2 : weight RAM, word i holds alpha_i*u_i
//   3 : kernel look-up table, 1024 words
//   4 : configuration registers, see CFG_* below
package ktron_pkg;

  localparam int unsigned DATA_W   = 16;  // data word, Q3.13
  localparam int unsigned FRAC_W   = 13;  // fractional bits of a data word
  localparam int unsigned ACC_W    = 40;  // accumulators, Q14.26
  localparam int unsigned LUT_AW   = 10;  // kernel table: 1024 entries
  localparam int unsigned HADDR_W  = 13;  // host word address
  localparam int unsigned SHIFT_W  = 6;   // kernel index shift amount

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Contents of the K_Type flag: what the Pre_Kernel unit computes.
  typedef enum logic {
    KT_NORM = 1'b0,   // squared Euclidean distance ||x_i - x||^2 (Gaussian kernel)
    KT_DOT  = 1'b1    // inner product x_i . x (linear / polynomial kernels)
  } ktype_e;

  // Host address regions.
  typedef enum logic [2:0] {
    RGN_SV  = 3'd0,
    RGN_X   = 3'd1,
    RGN_W   = 3'd2,
    RGN_LUT = 3'd3,
    RGN_CFG = 3'd4
  } region_e;

  // Configuration register offsets inside RGN_CFG.
  localparam logic [9:0] CFG_KTYPE = 10'd0;  // bit 0: ktype_e
  localparam logic [9:0] CFG_M     = 10'd1;  // number of support vectors
  localparam logic [9:0] CFG_R     = 10'd2;  // features per vector (1..MAX_R)
  localparam logic [9:0] CFG_B     = 10'd3;  // bias b, Q3.13
  localparam logic [9:0] CFG_SHIFT = 10'd4;  // kernel index shift amount

  // One write into a memory: the bundle the host bus fans out to every RAM.
  typedef struct packed {
    logic              we;
    logic [9:0]        addr;
    logic [DATA_W-1:0] data;
  } mem_wr_t;

endpackage
