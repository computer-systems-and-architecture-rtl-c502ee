// data_mem: data memory, 2**AW words of 16 bits, addressed in words.
// Read combinationally at addr (lw result is written back in the same cycle);
// written on the rising clock edge when we is high (sw). Only the low AW bits
// of the 16-bit effective address are used, so addresses wrap. A second,
// read-only port (dbg_addr/dbg_data) lets a test inspect memory at the end of
// a program. Size, wrap-around and the debug port are this design's choices.
module data_mem
  import cpu_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  word_t         addr,
  output word_t         rdata,
  input  logic          we,
  input  word_t         wdata,
  input  logic [AW-1:0] dbg_addr,
  output word_t         dbg_data
);

  word_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW-1:0]] <= wdata;
  end

  assign rdata    = mem[addr[AW-1:0]];
  assign dbg_data = mem[dbg_addr];

endmodule
