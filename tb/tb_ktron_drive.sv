// tb_ktron_drive -- self-checking test of the operand storage (Ktron_Drive).
// Loads 100 support vectors of 10 features and an input vector of 10
// features, then reads random (vector, feature) pairs the way the controller
// does (address i*10+j and j) and checks both outputs one clock later.
module tb_ktron_drive;
  import ktron_pkg::*;

  localparam int MAX_SV = 100, MAX_R = 10;
  logic clk = 0;
  mem_wr_t sv_wr, x_wr;
  logic [9:0] sv_addr;
  logic [3:0] x_addr;
  data_t sv_data, x_data;
  int sv_m [MAX_SV*MAX_R];
  int x_m  [MAX_R];
  int checks = 0, failures = 0;

  ktron_drive #(.MAX_SV(MAX_SV), .MAX_R(MAX_R)) dut (
    .clk(clk), .sv_wr(sv_wr), .x_wr(x_wr), .sv_addr(sv_addr), .x_addr(x_addr),
    .sv_data(sv_data), .x_data(x_data));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sv_wr = '0; x_wr = '0; sv_addr = '0; x_addr = '0;
    for (int a = 0; a < MAX_SV*MAX_R; a++) begin
      @(negedge clk);
      sv_m[a] = int'($signed(16'($urandom)));
      sv_wr = '{we: 1'b1, addr: 10'(a), data: 16'(sv_m[a])};
      if (a < MAX_R) begin
        x_m[a] = int'($signed(16'($urandom)));
        x_wr = '{we: 1'b1, addr: 10'(a), data: 16'(x_m[a])};
      end else x_wr.we = 1'b0;
    end
    @(negedge clk);
    sv_wr.we = 1'b0;
    for (int k = 0; k < 600; k++) begin
      int i, j;
      i = $urandom_range(MAX_SV - 1);
      j = $urandom_range(MAX_R - 1);
      sv_addr = 10'(i*MAX_R + j);
      x_addr  = 4'(j);
      @(negedge clk);
      checks += 2;
      if (int'(sv_data) != sv_m[i*MAX_R + j]) begin
        failures++; $display("FAIL sv[%0d][%0d] got %0d exp %0d", i, j, sv_data, sv_m[i*MAX_R+j]);
      end
      if (int'(x_data) != x_m[j]) begin
        failures++; $display("FAIL x[%0d] got %0d exp %0d", j, x_data, x_m[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
