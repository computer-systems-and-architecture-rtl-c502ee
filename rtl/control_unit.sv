// control_unit: main decoder of the single-cycle processor. Input is the 16-bit
// instruction; output is one ctrl_t struct with every control line of the
// datapath: the three register addresses and the register write enable, the
// ALU op-code and second-operand select, the data memory write enable, the
// write-back source and the next-PC source.
//
// Because the register fields sit at different bit positions in the different
// instruction formats, the decoder also selects the register addresses, so the
// register file needs no address multiplexers of its own. Port usage:
//   ALU class   read rs (port 1) and rt (port 2), write rd; unary ops get b = 1
//   lw / sw     address = rs + imm; sw stores rd (port 2), lw writes rd
//   ori..subi   rd op imm written back to rd; lui writes the shifted immediate
//   beq / blt   ALU compares rd (port 1) with rs (port 2); the PC unit branches
//               when the result is 1
//   jr          next PC = rd + imm through the ALU
//   j / jal     next PC = 12-bit target; jal writes pc + 1 to r7
// Decoding follows the instruction table. Undefined encodings are this design's
// choice: the ALU class always executes its function field (so 000 with a
// nonzero function acts like a binary op), and 110 ignores bits 12..11.
// Combinational, no clock.
module control_unit
  import cpu_pkg::*;
(
  input  word_t instr,
  output ctrl_t ctrl
);

  opcode_e opc;
  assign opc = opcode_e'(instr[15:13]);

  always_comb begin
    // Defaults: no state change, sequential PC
    ctrl        = '0;
    ctrl.alu_op = ALU_ADD;
    ctrl.b_sel  = BSEL_REG;
    ctrl.wb_sel = WB_ALU;
    ctrl.pc_sel = PC_SEQ;

    unique case (opc)
      OPC_ZERO, OPC_UNARY, OPC_BIN: begin
        ctrl.ra1    = instr[5:3];
        ctrl.ra2    = instr[2:0];
        ctrl.wa     = instr[8:6];
        ctrl.reg_we = 1'b1;
        ctrl.alu_op = alu_op_e'(instr[12:9]);
        ctrl.b_sel  = (opc == OPC_UNARY) ? BSEL_ONE : BSEL_REG;
      end
      OPC_MEM: begin
        ctrl.ra1    = instr[8:6];       // base rs
        ctrl.ra2    = instr[11:9];      // store data rd
        ctrl.wa     = instr[11:9];
        ctrl.reg_we = ~instr[12];       // lw
        ctrl.mem_we = instr[12];        // sw
        ctrl.alu_op = ALU_ADD;
        ctrl.b_sel  = BSEL_IMM;
        ctrl.wb_sel = WB_MEM;
      end
      OPC_IMM: begin
        ctrl.ra1    = instr[10:8];
        ctrl.ra2    = instr[10:8];
        ctrl.wa     = instr[10:8];
        ctrl.reg_we = 1'b1;
        ctrl.b_sel  = BSEL_IMM;
        unique case (instr[12:11])
          2'b00: ctrl.alu_op = ALU_OR;      // ori
          2'b01: ctrl.wb_sel = WB_IMM;      // lui
          2'b10: ctrl.alu_op = ALU_ADD;     // addi
          2'b11: ctrl.alu_op = ALU_SUB;     // subi
          default: ;
        endcase
      end
      OPC_BR: begin
        ctrl.ra1    = instr[11:9];
        ctrl.ra2    = instr[8:6];
        ctrl.alu_op = instr[12] ? ALU_LT : ALU_EQ;
        ctrl.pc_sel = PC_BRANCH;
      end
      OPC_JR: begin
        ctrl.ra1    = instr[10:8];
        ctrl.alu_op = ALU_ADD;
        ctrl.b_sel  = BSEL_IMM;
        ctrl.pc_sel = PC_ALU;
      end
      OPC_JMP: begin
        ctrl.wa     = LINK_REG;
        ctrl.reg_we = instr[12];        // jal
        ctrl.wb_sel = WB_PC1;
        ctrl.pc_sel = PC_IMM;
      end
      default: ;
    endcase
  end

endmodule
