// tb_control_unit: self-checking test of the instruction decoder. Random
// instructions of each kind in the instruction table (ALU class, lw, sw, ori,
// lui, addi, subi, beq, blt, jr, j, jal) are decoded and every control line
// that matters for that kind is compared with the value the instruction's
// definition calls for, derived here from the field positions of the table.
// Lines that the instruction leaves unused are not checked, except that no
// instruction other than those that write a register or memory may do so.
module tb_control_unit;
  import cpu_pkg::*;

  word_t instr;
  ctrl_t ctrl;
  int    checks = 0, failures = 0;
  int    kinds_seen [12];

  control_unit dut (.instr(instr), .ctrl(ctrl));

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL instr=%b %s=%0d expected=%0d", instr, what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 12; k++) kinds_seen[k] = 0;
    repeat (3000) begin
      int kind;
      logic [2:0] f_rd, f_rs, f_rt;
      logic [3:0] fn;
      kind = $urandom_range(0, 11);
      kinds_seen[kind]++;
      f_rd = 3'($urandom);
      f_rs = 3'($urandom);
      f_rt = 3'($urandom);
      fn   = 4'($urandom);
      case (kind)
        0: begin  // ALU class: zero (000), unary (001) or binary (010)
          logic [2:0] cls;
          cls = 3'($urandom_range(0, 2));
          if (cls == 3'b000) fn = 4'b0000;
          instr = {cls, fn, f_rd, f_rs, f_rt};
          #1;
          expect_eq("reg_we", ctrl.reg_we, 1);
          expect_eq("wa", ctrl.wa, f_rd);
          expect_eq("ra1", ctrl.ra1, f_rs);
          if (cls == 3'b010) expect_eq("ra2", ctrl.ra2, f_rt);
          expect_eq("alu_op", ctrl.alu_op, fn);
          expect_eq("b_sel", ctrl.b_sel, (cls == 3'b001) ? BSEL_ONE : BSEL_REG);
          expect_eq("wb_sel", ctrl.wb_sel, WB_ALU);
          expect_eq("mem_we", ctrl.mem_we, 0);
          expect_eq("pc_sel", ctrl.pc_sel, PC_SEQ);
        end
        1, 2: begin  // lw (1), sw (2)
          instr = {3'b011, (kind == 2), f_rd, f_rs, 6'($urandom)};
          #1;
          expect_eq("ra1", ctrl.ra1, f_rs);
          expect_eq("alu_op", ctrl.alu_op, ALU_ADD);
          expect_eq("b_sel", ctrl.b_sel, BSEL_IMM);
          expect_eq("pc_sel", ctrl.pc_sel, PC_SEQ);
          if (kind == 1) begin
            expect_eq("reg_we", ctrl.reg_we, 1);
            expect_eq("wa", ctrl.wa, f_rd);
            expect_eq("wb_sel", ctrl.wb_sel, WB_MEM);
            expect_eq("mem_we", ctrl.mem_we, 0);
          end else begin
            expect_eq("reg_we", ctrl.reg_we, 0);
            expect_eq("ra2", ctrl.ra2, f_rd);
            expect_eq("mem_we", ctrl.mem_we, 1);
          end
        end
        3, 4, 5, 6: begin  // ori, lui, addi, subi
          instr = {3'b100, 2'(kind - 3), f_rd, 8'($urandom)};
          #1;
          expect_eq("reg_we", ctrl.reg_we, 1);
          expect_eq("wa", ctrl.wa, f_rd);
          expect_eq("mem_we", ctrl.mem_we, 0);
          expect_eq("pc_sel", ctrl.pc_sel, PC_SEQ);
          if (kind == 4) expect_eq("wb_sel", ctrl.wb_sel, WB_IMM);
          else begin
            expect_eq("wb_sel", ctrl.wb_sel, WB_ALU);
            expect_eq("ra1", ctrl.ra1, f_rd);
            expect_eq("b_sel", ctrl.b_sel, BSEL_IMM);
            expect_eq("alu_op", ctrl.alu_op,
                      (kind == 3) ? ALU_OR : (kind == 5) ? ALU_ADD : ALU_SUB);
          end
        end
        7, 8: begin  // beq, blt
          instr = {3'b101, (kind == 8), f_rd, f_rs, 6'($urandom)};
          #1;
          expect_eq("reg_we", ctrl.reg_we, 0);
          expect_eq("mem_we", ctrl.mem_we, 0);
          expect_eq("ra1", ctrl.ra1, f_rd);
          expect_eq("ra2", ctrl.ra2, f_rs);
          expect_eq("b_sel", ctrl.b_sel, BSEL_REG);
          expect_eq("alu_op", ctrl.alu_op, (kind == 7) ? ALU_EQ : ALU_LT);
          expect_eq("pc_sel", ctrl.pc_sel, PC_BRANCH);
        end
        9: begin  // jr
          instr = {3'b110, 2'b00, f_rd, 8'($urandom)};
          #1;
          expect_eq("reg_we", ctrl.reg_we, 0);
          expect_eq("mem_we", ctrl.mem_we, 0);
          expect_eq("ra1", ctrl.ra1, f_rd);
          expect_eq("b_sel", ctrl.b_sel, BSEL_IMM);
          expect_eq("alu_op", ctrl.alu_op, ALU_ADD);
          expect_eq("pc_sel", ctrl.pc_sel, PC_ALU);
        end
        default: begin  // j (10), jal (11)
          instr = {3'b111, (kind == 11), 12'($urandom)};
          #1;
          expect_eq("mem_we", ctrl.mem_we, 0);
          expect_eq("pc_sel", ctrl.pc_sel, PC_IMM);
          expect_eq("reg_we", ctrl.reg_we, (kind == 11) ? 1 : 0);
          if (kind == 11) begin
            expect_eq("wa", ctrl.wa, 7);
            expect_eq("wb_sel", ctrl.wb_sel, WB_PC1);
          end
        end
      endcase
    end
    for (int k = 0; k < 12; k++) expect_eq("kind covered", kinds_seen[k] > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
