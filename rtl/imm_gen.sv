// imm_gen: immediate circuit. Turns the immediate field of an instruction into a
// 16-bit operand, chosen by the major opcode instr[15:13]:
//   lw, sw, beq, blt (011, 101)   6-bit field 5..0, sign-extended
//   ori, addi, subi  (100)        8-bit field 7..0, zero-extended
//   lui              (100, 01)    8-bit field 7..0 shifted left by 8
//   jr               (110)        8-bit field 7..0, sign-extended
//   j, jal           (111)        12-bit target 11..0, zero-extended
//   ALU class (000, 001, 010)     0 (no immediate)
// The widths and extensions follow the instruction set; zero-extending the jump
// target and outputting 0 for the ALU class are this design's choices.
// Combinational, no clock.
module imm_gen
  import cpu_pkg::*;
(
  input  word_t instr,
  output word_t imm
);

  opcode_e opc;
  assign opc = opcode_e'(instr[15:13]);

  always_comb begin
    unique case (opc)
      OPC_MEM, OPC_BR: imm = word_t'($signed(instr[5:0]));
      OPC_IMM:         imm = (instr[12:11] == 2'b01) ? {instr[7:0], 8'h00}
                                                     : {8'h00, instr[7:0]};
      OPC_JR:          imm = word_t'($signed(instr[7:0]));
      OPC_JMP:         imm = {4'h0, instr[11:0]};
      default:         imm = '0;
    endcase
  end

endmodule
