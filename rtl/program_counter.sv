// program_counter: the PC register and its next-address logic.
// Each rising clock edge the PC is loaded with the next address, chosen by
// pc_sel from the control unit:
//   PC_SEQ     pc + 1
//   PC_BRANCH  pc + 1 + imm when cond (bit 0 of the ALU compare) is 1, else pc + 1
//   PC_ALU     alu_y (jr: rd + imm)
//   PC_IMM     imm   (j, jal: absolute 12-bit target, already zero-extended)
// Addresses count 16-bit words, so sequential flow adds 1. pc_plus1 is also
// the jal return address. Synchronous active-low reset starts execution at
// address 0 (reset value and style are this design's choice).
module program_counter
  import cpu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  pcsel_e pc_sel,
  input  logic   cond,
  input  word_t  imm,
  input  word_t  alu_y,
  output word_t  pc,
  output word_t  pc_plus1,
  output word_t  pc_next
);

  assign pc_plus1 = pc + word_t'(1);

  always_comb begin
    unique case (pc_sel)
      PC_SEQ:    pc_next = pc_plus1;
      PC_BRANCH: pc_next = cond ? pc_plus1 + imm : pc_plus1;
      PC_ALU:    pc_next = alu_y;
      PC_IMM:    pc_next = imm;
      default:   pc_next = pc_plus1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) pc <= '0;
    else        pc <= pc_next;
  end

endmodule
