// instr_mem: instruction memory, 2**AW words of 16 bits, addressed in words.
// The read port is combinational (the PC selects the word in the same cycle,
// as a single-cycle datapath needs); only the low AW bits of the 16-bit PC are
// used, so the program space wraps. A clocked write port (we/waddr/wdata) loads
// the program before it runs; words that were never loaded hold no defined
// value. The default size of 4096 words matches the reach of the 12-bit jump
// target; size and load port are this design's choices.
module instr_mem
  import cpu_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  word_t         raddr,
  output word_t         rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  word_t         wdata
);

  word_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr[AW-1:0]];

endmodule
