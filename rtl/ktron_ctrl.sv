// ktron_ctrl -- main control unit of the KTRON core (Ktron_ctrl).
//
// Sequences one forward-phase evaluation  y = b + sum_i w_i K(x_i, x)  over
// m support vectors of r features each. The units are not pipelined against
// each other: the controller walks a fixed state sequence, giving each unit
// one strobe per stage, which keeps the core to the two multipliers of the
// Pre_Kernel and Out_MAC units.
//
//   IDLE  -start->  INIT  (clear Pre_Kernel, load b into Out_MAC)
//   for each support vector i < m:
//     for each feature j < r:
//       E_RD  (present addresses i*r+j and j to the operand RAMs)
//       E_OP  (Pre_Kernel captures the operands)
//       E_MUL (Pre_Kernel multiplies)
//       E_ACC (Pre_Kernel accumulates)
//     K_LUT (kernel table read; weight i is already being read)
//     M_MUL (Out_MAC multiplies w_i * K_i)
//     M_ACC (Out_MAC accumulates, Pre_Kernel cleared)
//   DONE  (done high for one clock, result valid until the next start)
//
// Latency, counted from the clock in which start is high to the clock in
// which done is high: 2 + m*(4r + 3) clocks (m = 0 gives 2, the result is
// then b). For the published prototype size m = 32, r = 2 this is 354
// clocks, and 4302 for m = 100, r = 10; the published implementation, whose
// state sequence is not given, needs about 430 and 7300. m and r are sampled
// at start; r must be 1..MAX_R and m at most MAX_SV (the top module clamps
// them). start while busy is ignored.
module ktron_ctrl
  import ktron_pkg::*;
#(
  parameter int unsigned MAX_SV = 100,
  parameter int unsigned MAX_R  = 10,
  parameter int unsigned SV_AW  = $clog2(MAX_SV*MAX_R),
  parameter int unsigned X_AW   = (MAX_R > 1) ? $clog2(MAX_R) : 1,
  parameter int unsigned W_AW   = (MAX_SV > 1) ? $clog2(MAX_SV) : 1,
  parameter int unsigned M_W    = $clog2(MAX_SV + 1),
  parameter int unsigned R_W    = $clog2(MAX_R + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [M_W-1:0]   m,
  input  logic [R_W-1:0]   r,
  output logic             busy,
  output logic             done,
  // operand RAM addresses (Ktron_Drive) and weight address (Out_MAC)
  output logic [SV_AW-1:0] sv_addr,
  output logic [X_AW-1:0]  x_addr,
  output logic [W_AW-1:0]  w_addr,
  // Pre_Kernel strobes
  output logic             pk_clear,
  output logic             pk_load,
  output logic             pk_mul,
  output logic             pk_acc,
  // Out_MAC strobes
  output logic             mac_init,
  output logic             mac_mul,
  output logic             mac_acc
);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_E_RD, S_E_OP, S_E_MUL, S_E_ACC,
    S_K_LUT, S_M_MUL, S_M_ACC, S_DONE
  } state_e;

  state_e           state, state_nx;
  logic [M_W-1:0]   m_q, i_q;
  logic [R_W-1:0]   r_q, j_q;
  logic [SV_AW-1:0] base_q;        // i*r, the first word of vector i

  wire last_j = (j_q == r_q - R_W'(1));
  wire last_i = (i_q == m_q - M_W'(1));

  always_comb begin
    state_nx = state;
    unique case (state)
      S_IDLE:  if (start) state_nx = S_INIT;
      S_INIT:  state_nx = (m_q == '0) ? S_DONE : S_E_RD;
      S_E_RD:  state_nx = S_E_OP;
      S_E_OP:  state_nx = S_E_MUL;
      S_E_MUL: state_nx = S_E_ACC;
      S_E_ACC: state_nx = last_j ? S_K_LUT : S_E_RD;
      S_K_LUT: state_nx = S_M_MUL;
      S_M_MUL: state_nx = S_M_ACC;
      S_M_ACC: state_nx = last_i ? S_DONE : S_E_RD;
      S_DONE:  state_nx = S_IDLE;
      default: state_nx = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      m_q    <= '0;
      r_q    <= R_W'(1);
      i_q    <= '0;
      j_q    <= '0;
      base_q <= '0;
    end else begin
      state <= state_nx;
      unique case (state)
        S_IDLE: if (start) begin
          m_q <= m;
          r_q <= r;
        end
        S_INIT: begin
          i_q    <= '0;
          j_q    <= '0;
          base_q <= '0;
        end
        S_E_ACC: j_q <= last_j ? '0 : j_q + R_W'(1);
        S_M_ACC: begin
          i_q    <= i_q + M_W'(1);
          base_q <= base_q + SV_AW'(r_q);
        end
        default: ;
      endcase
    end
  end

  assign sv_addr  = base_q + SV_AW'(j_q);
  assign x_addr   = X_AW'(j_q);
  assign w_addr   = W_AW'(i_q);

  assign busy     = (state != S_IDLE);
  assign done     = (state == S_DONE);
  assign pk_clear = (state == S_INIT) || (state == S_M_ACC);
  assign pk_load  = (state == S_E_OP);
  assign pk_mul   = (state == S_E_MUL);
  assign pk_acc   = (state == S_E_ACC);
  assign mac_init = (state == S_INIT);
  assign mac_mul  = (state == S_M_MUL);
  assign mac_acc  = (state == S_M_ACC);

  // done is a single-clock pulse and is always followed by IDLE.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  // The feature and vector counters never run past the sampled sizes.
  a_j_range: assert property (@(posedge clk) disable iff (!rst_n) busy |-> j_q < r_q);

endmodule
