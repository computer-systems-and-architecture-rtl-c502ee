// cpu_top: complete single-cycle datapath of the 16-bit processor.
//
// Every clock cycle executes one instruction:
//   fetch      instr_mem[pc]
//   decode     control_unit -> ctrl (register addresses, ALU op, selects);
//              imm_gen -> 16-bit immediate
//   read       regfile ports 1 and 2
//   execute    alu(a = port 1, b = port 2 | immediate | 1)
//   memory     data_mem at the ALU result (lw reads, sw writes port 2)
//   write back ALU result | memory word | pc + 1 (jal) | immediate (lui)
//   next PC    pc + 1 | pc + 1 + imm if the branch compare is 1 | ALU (jr) | imm (j, jal)
// Register, data memory and PC updates all happen on the same rising edge.
//
// The program is written into instruction memory through prog_we/prog_addr/
// prog_data, normally while rst_n is low; the PC then starts at 0 when reset is
// released. A program has no halt instruction: it ends in a jump to itself,
// after which registers and data memory can be read through the dbg_* ports.
// The organisation follows the single-cycle datapath with a separate immediate
// circuit; memory sizes, reset, load and debug ports are this design's choices.
module cpu_top
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_AW = 12,
  parameter int unsigned DMEM_AW = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  // program load
  input  logic               prog_we,
  input  logic [IMEM_AW-1:0] prog_addr,
  input  logic [15:0]        prog_data,
  // state observation
  output logic [15:0]        pc,
  output logic [15:0]        instr,
  input  logic [2:0]         dbg_reg_addr,
  output logic [15:0]        dbg_reg_data,
  input  logic [DMEM_AW-1:0] dbg_mem_addr,
  output logic [15:0]        dbg_mem_data
);

  ctrl_t ctrl;
  word_t imm, rd1, rd2, alu_b, alu_y, mem_rdata, wb_data, pc_plus1;

  instr_mem #(.AW(IMEM_AW)) u_imem (
    .clk   (clk),
    .raddr (pc),
    .rdata (instr),
    .we    (prog_we),
    .waddr (prog_addr),
    .wdata (prog_data)
  );

  control_unit u_ctrl (
    .instr (instr),
    .ctrl  (ctrl)
  );

  imm_gen u_imm (
    .instr (instr),
    .imm   (imm)
  );

  regfile u_rf (
    .clk      (clk),
    .rst_n    (rst_n),
    .ra1      (ctrl.ra1),
    .rd1      (rd1),
    .ra2      (ctrl.ra2),
    .rd2      (rd2),
    .we       (ctrl.reg_we),
    .wa       (ctrl.wa),
    .wd       (wb_data),
    .dbg_addr (dbg_reg_addr),
    .dbg_data (dbg_reg_data)
  );

  always_comb begin
    unique case (ctrl.b_sel)
      BSEL_REG: alu_b = rd2;
      BSEL_IMM: alu_b = imm;
      BSEL_ONE: alu_b = word_t'(1);
      default:  alu_b = rd2;
    endcase
  end

  alu u_alu (
    .op (ctrl.alu_op),
    .a  (rd1),
    .b  (alu_b),
    .y  (alu_y)
  );

  // Stores are held off during reset so a program load cannot disturb memory
  data_mem #(.AW(DMEM_AW)) u_dmem (
    .clk      (clk),
    .addr     (alu_y),
    .rdata    (mem_rdata),
    .we       (ctrl.mem_we && rst_n),
    .wdata    (rd2),
    .dbg_addr (dbg_mem_addr),
    .dbg_data (dbg_mem_data)
  );

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_ALU:  wb_data = alu_y;
      WB_MEM:  wb_data = mem_rdata;
      WB_PC1:  wb_data = pc_plus1;
      WB_IMM:  wb_data = imm;
      default: wb_data = alu_y;
    endcase
  end

  program_counter u_pc (
    .clk      (clk),
    .rst_n    (rst_n),
    .pc_sel   (ctrl.pc_sel),
    .cond     (alu_y[0]),
    .imm      (imm),
    .alu_y    (alu_y),
    .pc       (pc),
    .pc_plus1 (pc_plus1),
    .pc_next  ()
  );

endmodule
