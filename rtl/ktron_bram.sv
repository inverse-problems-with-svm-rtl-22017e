// ktron_bram -- simple dual-port block RAM, one write port and one read port.
//
// Models one embedded FPGA block RAM of the kind the KTRON core uses for its
// support vectors, weights, input vector and kernel table (1024 x 16 bits,
// 2 KByte). The write port belongs to the host; the read port to the core.
// Timing: a write with wr.we high lands at the clock edge; a read is
// synchronous, rd_data shows the word at rd_addr one clock after rd_addr is
// presented (read-before-write when both ports hit the same word). The
// contents are not reset: the host loads every word the core reads.
module ktron_bram
  import ktron_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  mem_wr_t           wr,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rd_data
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr.we && (32'(wr.addr) < DEPTH))
      mem[wr.addr[AW-1:0]] <= wr.data;
    rd_data <= mem[rd_addr];
  end

endmodule
