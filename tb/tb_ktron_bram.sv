// tb_ktron_bram -- self-checking test of the block RAM model.
// Writes random words, reads them back, checks the one-clock read latency,
// read-before-write on a same-address collision and that writes past DEPTH
// are dropped (the 1000-word support-vector RAM shape is used).
module tb_ktron_bram;
  import ktron_pkg::*;

  localparam int DEPTH = 1000;
  logic clk = 0;
  mem_wr_t wr;
  logic [9:0] rd_addr;
  logic [15:0] rd_data;
  int checks = 0, failures = 0;
  logic [15:0] model [DEPTH];

  ktron_bram #(.DEPTH(DEPTH)) dut (.clk(clk), .wr(wr), .rd_addr(rd_addr), .rd_data(rd_data));

  always #5 clk = ~clk;

  task automatic check(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = '0;
    rd_addr = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr = '{we: 1'b1, addr: 10'(a), data: 16'($urandom)};
      model[a] = wr.data;
    end
    // write beyond the end must not alias onto low addresses
    @(negedge clk);
    wr = '{we: 1'b1, addr: 10'd1000 + 10'd5, data: 16'hdead};
    @(negedge clk);
    wr.we = 1'b0;
    for (int k = 0; k < 400; k++) begin
      int a;
      a = (k < 200) ? k : $urandom_range(DEPTH - 1);
      rd_addr = 10'(a);
      @(negedge clk);
      check(rd_data, model[a], $sformatf("read %0d", a));
    end
    // latency: data changes only at the clock edge after the address
    rd_addr = 10'd7;
    @(negedge clk);
    rd_addr = 10'd8;
    #1 check(rd_data, model[7], "hold until edge");
    @(negedge clk);
    check(rd_data, model[8], "next word after edge");
    // collision: read and write same word in the same clock -> old data
    rd_addr = 10'd9;
    wr = '{we: 1'b1, addr: 10'd9, data: ~model[9]};
    @(negedge clk);
    check(rd_data, model[9], "read-before-write");
    wr.we = 1'b0;
    model[9] = ~model[9];
    @(negedge clk);
    check(rd_data, model[9], "written word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
