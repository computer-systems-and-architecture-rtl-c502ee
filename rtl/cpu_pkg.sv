// cpu_pkg: types and constants shared by the 16-bit single-cycle processor.
//
// Instruction word (16 bits), major opcode in bits 15..13:
//   000/001/010  ALU class: bits 12..9 ALU function, rd 8..6, rs 5..3, rt 2..0
//                000 = zero, 001 = unary on rs, 010 = binary on rs, rt
//   011          memory: bit 12 (0 lw, 1 sw), rd 11..9, rs 8..6, signed imm 5..0
//   100          immediate: bits 12..11 (ori, lui, addi, subi), rd 10..8, unsigned imm 7..0
//   101          branch: bit 12 (0 beq, 1 blt), rd 11..9, rs 8..6, signed offset 5..0
//   110          jr: bits 12..11 = 00, rd 10..8, signed imm 7..0
//   111          jump: bit 12 (0 j, 1 jal), 12-bit absolute target 11..0
// The field layout and the ALU function codes follow the instruction set this
// design implements; the placement of rt in bits 2..0 and the encodings of the
// control-line enums below are this design's own choices.
package cpu_pkg;

  localparam int unsigned XLEN = 16;   // data and instruction width
  localparam int unsigned NREGS = 8;   // r0..r7
  localparam int unsigned RAW = 3;     // register address width
  localparam logic [RAW-1:0] LINK_REG = 3'd7;  // jal writes the return address here

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RAW-1:0]  reg_addr_t;

  // Major opcode, instr[15:13]
  typedef enum logic [2:0] {
    OPC_ZERO  = 3'b000,
    OPC_UNARY = 3'b001,
    OPC_BIN   = 3'b010,
    OPC_MEM   = 3'b011,
    OPC_IMM   = 3'b100,
    OPC_BR    = 3'b101,
    OPC_JR    = 3'b110,
    OPC_JMP   = 3'b111
  } opcode_e;

  // ALU function, instr[12:9] for the ALU class
  typedef enum logic [3:0] {
    ALU_ZERO = 4'b0000,
    ALU_NOT  = 4'b0001,
    ALU_AND  = 4'b0010,
    ALU_OR   = 4'b0011,
    ALU_ADD  = 4'b0100,   // add, inc
    ALU_SUB  = 4'b0101,   // sub, dec
    ALU_LT   = 4'b0110,
    ALU_GT   = 4'b0111,
    ALU_EQ   = 4'b1000,
    ALU_NEQ  = 4'b1001,
    ALU_INV  = 4'b1010,   // two's complement negate
    ALU_SLL  = 4'b1011,
    ALU_SRL  = 4'b1100,
    ALU_SLA  = 4'b1101,
    ALU_SRA  = 4'b1110,
    ALU_CP   = 4'b1111
  } alu_op_e;

  // Second ALU operand
  typedef enum logic [1:0] {
    BSEL_REG = 2'd0,   // register read port 2
    BSEL_IMM = 2'd1,   // immediate circuit output
    BSEL_ONE = 2'd2    // constant 1 (inc, dec)
  } bsel_e;

  // Register write-back source
  typedef enum logic [1:0] {
    WB_ALU  = 2'd0,
    WB_MEM  = 2'd1,
    WB_PC1  = 2'd2,    // pc + 1 (jal)
    WB_IMM  = 2'd3     // immediate (lui)
  } wbsel_e;

  // Next-PC source
  typedef enum logic [1:0] {
    PC_SEQ    = 2'd0,  // pc + 1
    PC_BRANCH = 2'd1,  // pc + 1 + imm when the ALU compare is true, else pc + 1
    PC_ALU    = 2'd2,  // ALU result (jr: rd + imm)
    PC_IMM    = 2'd3   // immediate (j, jal: absolute target)
  } pcsel_e;

  // All control lines produced by the control unit
  typedef struct packed {
    reg_addr_t ra1;       // register read port 1 (ALU operand a)
    reg_addr_t ra2;       // register read port 2 (ALU operand b, store data)
    reg_addr_t wa;        // register write address
    logic      reg_we;    // register write enable
    alu_op_e   alu_op;
    bsel_e     b_sel;
    logic      mem_we;    // data memory write (sw)
    wbsel_e    wb_sel;
    pcsel_e    pc_sel;
  } ctrl_t;

endpackage
