// ktron -- KTRON: forward-phase (classification) core of an SVM equalizer.
//
// Given support vectors x_i, weights w_i = alpha_i*u_i, a bias b and an input
// vector x = [x(n), x(n-1), ..., x(n-r+1)], the core computes
//     y = b + sum_{i<m} w_i * K(x_i, x)
// and its sign, the estimate of the transmitted symbol u(n-D). The kernel is
// a Gaussian exp(-||x_i - x||^2 / 2 sigma^2) (K_Type = KT_NORM) or any
// function of the inner product x_i . x (K_Type = KT_DOT), both read from a
// table the host loads. Data are 16-bit Q3.13 throughout.
//
// Structure, following the published block diagram: K_Type flag
// (ktron_ktype_reg), operand RAMs (ktron_drive), Pre_Kernel (distance or
// inner product, one multiplier), Kernel (shift and table), Out_MAC (weights
// RAM, second multiplier, accumulator) and the controller (ktron_ctrl). The
// default sizes hold up to 100 support vectors of 10 features, four block
// RAMs in all, as the published prototype.
//
// Host interface (this design's own; in the published system a general
// purpose processor supervises the core): a word-write bus host_we /
// host_addr / host_wdata with the address map given in ktron_pkg, a start
// strobe, and busy / done. Writes while busy are ignored. m is clamped to
// MAX_SV and r to 1..MAX_R when written. After done, y (Q3.13, saturated),
// y_acc (Q14.26) and y_pos (1 = class +1) hold until the next start.
// Latency: done comes 2 + m*(4r + 3) clocks after start.
module ktron
  import ktron_pkg::*;
#(
  parameter int unsigned MAX_SV = 100,
  parameter int unsigned MAX_R  = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               host_we,
  input  logic [HADDR_W-1:0] host_addr,
  input  logic [DATA_W-1:0]  host_wdata,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output data_t              y,
  output acc_t               y_acc,
  output logic               y_pos
);

  localparam int unsigned SV_AW = $clog2(MAX_SV*MAX_R);
  localparam int unsigned X_AW  = (MAX_R > 1) ? $clog2(MAX_R) : 1;
  localparam int unsigned W_AW  = (MAX_SV > 1) ? $clog2(MAX_SV) : 1;
  localparam int unsigned M_W   = $clog2(MAX_SV + 1);
  localparam int unsigned R_W   = $clog2(MAX_R + 1);

  // ---------------------------------------------------------------- host bus
  region_e    region;
  logic       wr_ok;
  mem_wr_t    bus_wr, sv_wr, x_wr, w_wr, lut_wr;
  logic       cfg_we;

  assign region = region_e'(host_addr[HADDR_W-1:10]);
  assign wr_ok  = host_we && !busy;
  assign bus_wr = '{we: 1'b0, addr: host_addr[9:0], data: host_wdata};

  always_comb begin
    sv_wr  = bus_wr;
    x_wr   = bus_wr;
    w_wr   = bus_wr;
    lut_wr = bus_wr;
    sv_wr.we  = wr_ok && (region == RGN_SV);
    x_wr.we   = wr_ok && (region == RGN_X);
    w_wr.we   = wr_ok && (region == RGN_W);
    lut_wr.we = wr_ok && (region == RGN_LUT);
    cfg_we    = wr_ok && (region == RGN_CFG);
  end

  // Configuration registers.
  logic [M_W-1:0]     m_q;
  logic [R_W-1:0]     r_q;
  logic [SHIFT_W-1:0] shift_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q     <= '0;
      r_q     <= R_W'(1);
      shift_q <= SHIFT_W'(19);   // Gaussian kernel, 2*sigma^2 = 1
    end else if (cfg_we) begin
      unique case (host_addr[9:0])
        CFG_M:
          m_q <= (32'(host_wdata) > MAX_SV) ? M_W'(MAX_SV) : M_W'(host_wdata);
        CFG_R:
          r_q <= (host_wdata == '0)          ? R_W'(1) :
                 (32'(host_wdata) > MAX_R)   ? R_W'(MAX_R) : R_W'(host_wdata);
        CFG_SHIFT:
          shift_q <= host_wdata[SHIFT_W-1:0];
        default: ;
      endcase
    end
  end

  ktype_e ktype;

  ktron_ktype_reg u_ktype (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (cfg_we && (host_addr[9:0] == CFG_KTYPE)),
    .d     (ktype_e'(host_wdata[0])),
    .ktype (ktype)
  );

  // ------------------------------------------------------------- controller
  logic [SV_AW-1:0] sv_addr;
  logic [X_AW-1:0]  x_addr;
  logic [W_AW-1:0]  w_addr;
  logic pk_clear, pk_load, pk_mul, pk_acc, mac_init, mac_mul, mac_acc;

  ktron_ctrl #(.MAX_SV(MAX_SV), .MAX_R(MAX_R)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .m        (m_q),
    .r        (r_q),
    .busy     (busy),
    .done     (done),
    .sv_addr  (sv_addr),
    .x_addr   (x_addr),
    .w_addr   (w_addr),
    .pk_clear (pk_clear),
    .pk_load  (pk_load),
    .pk_mul   (pk_mul),
    .pk_acc   (pk_acc),
    .mac_init (mac_init),
    .mac_mul  (mac_mul),
    .mac_acc  (mac_acc)
  );

  // --------------------------------------------------------------- datapath
  data_t sv_data, x_data, k_value;
  acc_t  p;

  ktron_drive #(.MAX_SV(MAX_SV), .MAX_R(MAX_R)) u_drive (
    .clk     (clk),
    .sv_wr   (sv_wr),
    .x_wr    (x_wr),
    .sv_addr (sv_addr),
    .x_addr  (x_addr),
    .sv_data (sv_data),
    .x_data  (x_data)
  );

  ktron_pre_kernel u_pre_kernel (
    .clk    (clk),
    .rst_n  (rst_n),
    .ktype  (ktype),
    .clear  (pk_clear),
    .load   (pk_load),
    .mul    (pk_mul),
    .acc    (pk_acc),
    .a      (sv_data),
    .b      (x_data),
    .result (p)
  );

  ktron_kernel u_kernel (
    .clk     (clk),
    .ktype   (ktype),
    .shift   (shift_q),
    .p       (p),
    .lut_wr  (lut_wr),
    .k_value (k_value)
  );

  ktron_out_mac #(.MAX_SV(MAX_SV)) u_out_mac (
    .clk     (clk),
    .rst_n   (rst_n),
    .w_wr    (w_wr),
    .b_we    (cfg_we && (host_addr[9:0] == CFG_B)),
    .b_data  (host_wdata),
    .w_addr  (w_addr),
    .k_value (k_value),
    .init    (mac_init),
    .mul     (mac_mul),
    .acc     (mac_acc),
    .y_acc   (y_acc),
    .y       (y),
    .y_pos   (y_pos)
  );

  // The host must not write while the core is busy (such writes are dropped).
  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !host_we)
    else $warning("ktron: host write while busy ignored");

endmodule
