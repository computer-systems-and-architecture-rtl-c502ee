// regfile: the processor's eight 16-bit general registers r0..r7.
// Two combinational read ports (ra1/rd1, ra2/rd2) and one write port that is
// written on the rising clock edge when we is high, so a value written by one
// instruction is seen by the next. A third read port (dbg_addr/dbg_data) lets a
// test observe the registers at the end of a program. r0 is an ordinary
// register (the instruction set has an explicit "zero rd" instead of a wired
// zero) and r7 receives the jal return address by convention of the control
// unit. Synchronous active-low reset clears all registers; the reset and the
// debug port are this design's choices.
module regfile
  import cpu_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  reg_addr_t ra1,
  output word_t     rd1,
  input  reg_addr_t ra2,
  output word_t     rd2,
  input  logic      we,
  input  reg_addr_t wa,
  input  word_t     wd,
  input  reg_addr_t dbg_addr,
  output word_t     dbg_data
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd1      = regs[ra1];
  assign rd2      = regs[ra2];
  assign dbg_data = regs[dbg_addr];

endmodule
