// ktron_drive -- support-vector and input-vector storage (Ktron_Drive).
//
// Holds the two operand memories of the kernel computation: the support
// vectors x_i, stored row by row (feature j of vector i at word i*r + j, so
// MAX_SV*MAX_R words), and the input vector x to classify (MAX_R words). Each
// is one block RAM. The host fills both through write ports; the controller
// reads one feature of x_i and the matching feature of x per access.
// Timing: sv_data and x_data show the words at sv_addr and x_addr one clock
// after the addresses are presented.
module ktron_drive
  import ktron_pkg::*;
#(
  parameter int unsigned MAX_SV = 100,
  parameter int unsigned MAX_R  = 10,
  parameter int unsigned SV_AW  = $clog2(MAX_SV*MAX_R),
  parameter int unsigned X_AW   = (MAX_R > 1) ? $clog2(MAX_R) : 1
) (
  input  logic             clk,
  input  mem_wr_t          sv_wr,
  input  mem_wr_t          x_wr,
  input  logic [SV_AW-1:0] sv_addr,
  input  logic [X_AW-1:0]  x_addr,
  output data_t            sv_data,
  output data_t            x_data
);

  ktron_bram #(.DEPTH(MAX_SV*MAX_R), .AW(SV_AW)) u_sv_ram (
    .clk     (clk),
    .wr      (sv_wr),
    .rd_addr (sv_addr),
    .rd_data (sv_data)
  );

  ktron_bram #(.DEPTH(MAX_R), .AW(X_AW)) u_x_ram (
    .clk     (clk),
    .wr      (x_wr),
    .rd_addr (x_addr),
    .rd_data (x_data)
  );

endmodule
