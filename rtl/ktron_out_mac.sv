// ktron_out_mac -- last processing unit of the KTRON core (Out_MAC).
//
// Forms the estimate  y = b + sum_i w_i * K_i  where w_i = alpha_i*u_i is the
// weight of support vector i and K_i its kernel value. The weights sit in a
// block RAM (MAX_SV words, Q3.13) written by the host, and b in a register.
// It holds the core's second multiplier (16 x 16-bit signed). The
// accumulator is ACC_W bits, Q14.26.
// Controller strobes:
//   init : accumulator <= b (aligned to 26 fractional bits)
//   mul  : product <= w_i * K_i   (w_i read at w_addr one clock before)
//   acc  : accumulator += product
// Outputs: y_acc is the full accumulator; y is it rounded down to Q3.13 and
// saturated to 16 bits; y_pos is the class decision (1 for +1, 0 for -1,
// y >= 0 counts as +1). The saturation and the tie rule are this design's
// choices.
module ktron_out_mac
  import ktron_pkg::*;
#(
  parameter int unsigned MAX_SV = 100,
  parameter int unsigned W_AW   = (MAX_SV > 1) ? $clog2(MAX_SV) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  mem_wr_t         w_wr,
  input  logic            b_we,
  input  data_t           b_data,
  input  logic [W_AW-1:0] w_addr,
  input  data_t           k_value,
  input  logic            init,
  input  logic            mul,
  input  logic            acc,
  output acc_t            y_acc,
  output data_t           y,
  output logic            y_pos
);

  localparam acc_t Y_MAX = acc_t'(2**(DATA_W-1) - 1);
  localparam acc_t Y_MIN = -acc_t'(2**(DATA_W-1));

  data_t                      bias;
  data_t                      w_data;
  logic signed [2*DATA_W-1:0] prod;
  acc_t                       y_shr;

  ktron_bram #(.DEPTH(MAX_SV), .AW(W_AW)) u_w_ram (
    .clk     (clk),
    .wr      (w_wr),
    .rd_addr (w_addr),
    .rd_data (w_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bias  <= '0;
      prod  <= '0;
      y_acc <= '0;
    end else begin
      if (b_we)
        bias <= b_data;
      if (mul)
        prod <= w_data * k_value;
      if (init)
        y_acc <= acc_t'(bias) <<< FRAC_W;
      else if (acc)
        y_acc <= y_acc + acc_t'(prod);
    end
  end

  assign y_shr = y_acc >>> FRAC_W;
  assign y     = (y_shr > Y_MAX) ? DATA_W'(Y_MAX) :
                 (y_shr < Y_MIN) ? DATA_W'(Y_MIN) : y_shr[DATA_W-1:0];
  assign y_pos = ~y_acc[ACC_W-1];

endmodule
