// tb_cpu_top: end-to-end test of the single-cycle processor at its default
// sizes (4096-word instruction and data memories).
//
// Programs are assembled here by small encoder functions, loaded through the
// program port while reset is held, and run until the processor reaches a
// jump to itself. Registers and data memory are then read through the debug
// ports and compared with
//   * hand-worked values for a directed program (a counting loop with blt,
//     stores and a load, a not-taken and a taken beq, a jal call returned from
//     with jr, lui/ori/subi, and unary ALU ops), and
//   * an instruction-set reference model written in this file, for random
//     programs that use every ALU function, every immediate op, lw, sw and
//     forward beq/blt/j.
// The processor executes one instruction per clock, so the cycle count to the
// final jump must equal the model's instruction count. The testbench also counts
// how often each mechanism happened (every ALU function, branch taken and not
// taken, j, jal, jr, lw, sw, ori, lui, addi, subi) and fails any that never did.
module tb_cpu_top;
  import cpu_pkg::*;

  localparam int unsigned IAW = 12;
  localparam int unsigned DAW = 12;
  localparam int unsigned PMAX = 4096;
  localparam int unsigned NDATA = 32;   // data words the programs use

  logic           clk = 0, rst_n = 0, prog_we = 0;
  logic [IAW-1:0] prog_addr = '0;
  logic [15:0]    prog_data = '0, pc, instr, dbg_reg_data, dbg_mem_data;
  logic [2:0]     dbg_reg_addr = '0;
  logic [DAW-1:0] dbg_mem_addr = '0;

  cpu_top dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data, .pc, .instr,
    .dbg_reg_addr, .dbg_reg_data, .dbg_mem_addr, .dbg_mem_data
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- encoders
  function automatic logic [15:0] enc_alu(input logic [2:0] cls, input logic [3:0] fn,
                                          input int rd, input int rs, input int rt);
    return {cls, fn, 3'(rd), 3'(rs), 3'(rt)};
  endfunction
  function automatic logic [15:0] enc_mem(input bit store, input int rd, input int rs, input int imm);
    return {3'b011, store, 3'(rd), 3'(rs), 6'(imm)};
  endfunction
  function automatic logic [15:0] enc_imm(input logic [1:0] sub, input int rd, input int imm);
    return {3'b100, sub, 3'(rd), 8'(imm)};
  endfunction
  function automatic logic [15:0] enc_br(input bit lt, input int rd, input int rs, input int off);
    return {3'b101, lt, 3'(rd), 3'(rs), 6'(off)};
  endfunction
  function automatic logic [15:0] enc_jr(input int rd, input int imm);
    return {3'b110, 2'b00, 3'(rd), 8'(imm)};
  endfunction
  function automatic logic [15:0] enc_j(input bit link, input int target);
    return {3'b111, link, 12'(target)};
  endfunction

  // ------------------------------------------------------------ the program
  logic [15:0] prog [PMAX];
  int          plen;

  // --------------------------------------------------------- reference model
  int m_reg [8];
  int m_mem [NDATA];
  bit m_mem_valid [NDATA];
  int m_count;

  function automatic int s16(input int v);   // 16-bit two's complement value
    v = v & 16'hFFFF;
    return (v >= 32768) ? v - 65536 : v;
  endfunction
  function automatic int sfield(input int v, input int bits);
    return (v >= (1 << (bits - 1))) ? v - (1 << bits) : v;
  endfunction

  task automatic run_model;
    int p;
    p = 0;
    m_count = 0;
    for (int r = 0; r < 8; r++) m_reg[r] = 0;        // registers reset to 0
    for (int a = 0; a < NDATA; a++) m_mem_valid[a] = 0;
    forever begin
      int w, op, rd, rs, rt, a, b, res, nextp, addr;
      w = int'(prog[p]);
      op = w >> 13;
      nextp = (p + 1) & 16'hFFFF;
      if (op == 7 && ((w >> 12) & 1) == 0 && (w & 12'hFFF) == p) break;  // halt
      m_count++;
      case (op)
        0, 1, 2: begin
          int fn;
          fn = (w >> 9) & 15;
          rd = (w >> 6) & 7;
          a = m_reg[(w >> 3) & 7];
          b = (op == 1) ? 1 : m_reg[w & 7];
          case (fn)
            0:  res = 0;
            1:  res = a ^ 16'hFFFF;
            2:  res = a & b;
            3:  res = a | b;
            4:  res = a + b;
            5:  res = a - b;
            6:  res = (s16(a) < s16(b)) ? 1 : 0;
            7:  res = (s16(a) > s16(b)) ? 1 : 0;
            8:  res = (a == b) ? 1 : 0;
            9:  res = (a != b) ? 1 : 0;
            10: res = 0 - a;
            11: res = a * 4;
            12: res = a / 4;
            13: res = a * 2;
            14: res = (s16(a) < 0 && (s16(a) % 2) != 0) ? s16(a) / 2 - 1 : s16(a) / 2;
            default: res = a;
          endcase
          m_reg[rd] = res & 16'hFFFF;
        end
        3: begin
          rd = (w >> 9) & 7;
          addr = (m_reg[(w >> 6) & 7] + sfield(w & 63, 6)) & 16'hFFFF;
          if (addr >= NDATA) begin
            $display("model: data address %0d outside the checked range", addr);
            failures++;
          end else if ((w >> 12) & 1) begin
            m_mem[addr] = m_reg[rd];
            m_mem_valid[addr] = 1;
          end else begin
            if (!m_mem_valid[addr]) begin
              $display("model: load from unwritten address %0d", addr);
              failures++;
            end
            m_reg[rd] = m_mem[addr];
          end
        end
        4: begin
          rd = (w >> 8) & 7;
          case ((w >> 11) & 3)
            0: m_reg[rd] = m_reg[rd] | (w & 255);
            1: m_reg[rd] = (w & 255) * 256;
            2: m_reg[rd] = (m_reg[rd] + (w & 255)) & 16'hFFFF;
            default: m_reg[rd] = (m_reg[rd] - (w & 255)) & 16'hFFFF;
          endcase
        end
        5: begin
          bit taken;
          a = m_reg[(w >> 9) & 7];
          b = m_reg[(w >> 6) & 7];
          taken = ((w >> 12) & 1) ? (s16(a) < s16(b)) : (a == b);
          if (taken) nextp = (p + 1 + sfield(w & 63, 6)) & 16'hFFFF;
        end
        6: nextp = (m_reg[(w >> 8) & 7] + sfield(w & 255, 8)) & 16'hFFFF;
        default: begin
          if ((w >> 12) & 1) m_reg[7] = (p + 1) & 16'hFFFF;
          nextp = w & 12'hFFF;
        end
      endcase
      p = nextp;
      if (m_count > 100000) begin
        $display("model: program does not end");
        failures++;
        break;
      end
    end
  endtask

  // ------------------------------------------------------- mechanism counters
  int n_alu_fn [16];
  int n_br_taken, n_br_not, n_j, n_jal, n_jr, n_lw, n_sw, n_ori, n_lui, n_addi, n_subi;
  bit counting = 0;

  always @(posedge clk) begin
    if (counting && rst_n) begin
      logic [2:0] op;
      op = instr[15:13];
      case (op)
        3'b000, 3'b001, 3'b010: n_alu_fn[instr[12:9]]++;
        3'b011: if (instr[12]) n_sw++; else n_lw++;
        3'b100: case (instr[12:11])
                  2'b00: n_ori++;
                  2'b01: n_lui++;
                  2'b10: n_addi++;
                  default: n_subi++;
                endcase
        3'b101: if (dut.u_pc.pc_next != pc + 16'd1) n_br_taken++; else n_br_not++;
        3'b110: n_jr++;
        default: if (instr[12]) n_jal++;
                 else if (instr[11:0] != pc[11:0]) n_j++;
      endcase
    end
  end

  // ------------------------------------------------------------- run helpers
  int cycles;

  task automatic load_and_run(input int max_cycles);
    @(negedge clk);
    rst_n = 0;
    for (int i = 0; i < plen; i++) begin
      prog_we = 1;
      prog_addr = IAW'(i);
      prog_data = prog[i];
      @(negedge clk);
    end
    prog_we = 0;
    @(negedge clk);
    rst_n = 1;
    counting = 1;
    cycles = 0;
    // run until the current instruction is a jump to itself
    while (!(instr == {3'b111, 1'b0, pc[11:0]}) && cycles < max_cycles) begin
      @(negedge clk);
      cycles++;
    end
    counting = 0;
    checks++;
    if (cycles >= max_cycles) begin
      failures++;
      $display("FAIL program did not reach its final jump in %0d cycles", max_cycles);
    end
  endtask

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%h expected=%h", what, got, exp);
    end
  endtask

  task automatic check_against_model(input string name);
    run_model();
    expect_eq({name, " cycles"}, cycles, m_count);
    for (int r = 0; r < 8; r++) begin
      dbg_reg_addr = 3'(r);
      #1;
      expect_eq($sformatf("%s r%0d", name, r), int'(dbg_reg_data), m_reg[r]);
    end
    for (int a = 0; a < NDATA; a++) begin
      if (m_mem_valid[a]) begin
        dbg_mem_addr = DAW'(a);
        #1;
        expect_eq($sformatf("%s mem[%0d]", name, a), int'(dbg_mem_data), m_mem[a]);
      end
    end
  endtask

  // ---------------------------------------------------------- the programs
  task automatic build_directed;
    for (int i = 0; i < 40; i++) prog[i] = enc_alu(3'b000, 4'd0, 0, 0, 0);
    prog[0]  = enc_alu(3'b000, 4'd0, 0, 0, 0);        // zero r0
    prog[1]  = enc_alu(3'b000, 4'd0, 1, 0, 0);        // zero r1
    prog[2]  = enc_imm(2'b10, 1, 10);                 // addi r1 10
    prog[3]  = enc_alu(3'b000, 4'd0, 2, 0, 0);        // zero r2
    prog[4]  = enc_alu(3'b000, 4'd0, 3, 0, 0);        // zero r3
    prog[5]  = enc_alu(3'b001, 4'd4, 2, 2, 0);        // loop: inc r2 r2
    prog[6]  = enc_alu(3'b010, 4'd4, 3, 3, 2);        // add r3 r3 r2
    prog[7]  = enc_mem(1, 3, 2, 16);                  // sw r3 r2 16
    prog[8]  = enc_br(1, 2, 1, -4);                   // blt r2 r1 loop
    prog[9]  = enc_mem(0, 4, 0, 20);                  // lw r4 r0 20
    prog[10] = enc_br(0, 4, 3, 5);                    // beq r4 r3 +5 (not taken)
    prog[11] = enc_j(1, 20);                          // jal 20
    prog[12] = enc_imm(2'b01, 5, 8'h12);              // lui r5 0x12
    prog[13] = enc_imm(2'b00, 5, 8'h34);              // ori r5 0x34
    prog[14] = enc_imm(2'b11, 5, 4);                  // subi r5 4
    prog[15] = enc_br(0, 5, 5, 1);                    // beq r5 r5 +1 (taken)
    prog[16] = enc_alu(3'b000, 4'd0, 5, 0, 0);        // zero r5 (skipped)
    prog[17] = enc_j(0, 30);                          // j 30
    prog[20] = enc_alu(3'b001, 4'd11, 6, 3, 0);       // sll r6 r3
    prog[21] = enc_alu(3'b010, 4'd5, 6, 6, 4);        // sub r6 r6 r4
    prog[22] = enc_jr(7, 0);                          // jr r7 0
    prog[30] = enc_alu(3'b001, 4'd10, 1, 3, 0);       // inv r1 r3
    prog[31] = enc_alu(3'b001, 4'd14, 2, 1, 0);       // sra r2 r1
    prog[32] = enc_alu(3'b001, 4'd12, 4, 1, 0);       // srl r4 r1
    prog[33] = enc_alu(3'b010, 4'd6, 0, 1, 3);        // lt r0 r1 r3
    prog[34] = enc_j(0, 34);                          // j 34 (end)
    plen = 35;
  endtask

  task automatic check_directed;
    int exp_reg [8] = '{1, 16'hFFC9, 16'hFFE4, 55, 16'h3FF2, 16'h1230, 210, 12};
    int sum;
    expect_eq("directed cycles", cycles, 60);
    expect_eq("directed final pc", int'(pc), 34);
    for (int r = 0; r < 8; r++) begin
      dbg_reg_addr = 3'(r);
      #1;
      expect_eq($sformatf("directed r%0d", r), int'(dbg_reg_data), exp_reg[r]);
    end
    sum = 0;
    for (int i = 1; i <= 10; i++) begin
      sum += i;
      dbg_mem_addr = DAW'(16 + i);
      #1;
      expect_eq($sformatf("directed mem[%0d]", 16 + i), int'(dbg_mem_data), sum);
    end
  endtask

  task automatic build_random(input int body);
    int n;
    n = 0;
    prog[n++] = enc_alu(3'b000, 4'd0, 0, 0, 0);                 // r0 = 0, the base
    for (int r = 1; r < 8; r++) begin
      prog[n++] = enc_imm(2'b01, r, $urandom_range(0, 255));   // lui
      prog[n++] = enc_imm(2'b00, r, $urandom_range(0, 255));   // ori
    end
    for (int a = 0; a < 16; a++) prog[n++] = enc_mem(1, $urandom_range(1, 7), 0, a);
    for (int i = 0; i < body; i++) begin
      int k, remain;
      remain = body - i;              // instructions until the final jump
      k = $urandom_range(0, 9);
      case (k)
        0, 1, 2, 3: begin
          logic [2:0] cls;
          cls = 3'($urandom_range(1, 2));
          prog[n] = enc_alu(cls, 4'($urandom), $urandom_range(1, 7),
                            $urandom_range(0, 7), $urandom_range(0, 7));
          if ($urandom_range(0, 15) == 0) prog[n] = enc_alu(3'b000, 4'd0, $urandom_range(1, 7), 0, 0);
        end
        4: prog[n] = enc_imm(2'($urandom), $urandom_range(1, 7), $urandom_range(0, 255));
        5: prog[n] = enc_mem(0, $urandom_range(1, 7), 0, $urandom_range(0, 15));
        6: prog[n] = enc_mem(1, $urandom_range(0, 7), 0, $urandom_range(0, 15));
        7, 8: prog[n] = enc_br(1'($urandom), $urandom_range(0, 7), $urandom_range(0, 7),
                               $urandom_range(0, (remain - 1 < 6) ? remain - 1 : 6));
        default: prog[n] = enc_j(0, n + 1 + $urandom_range(0, (remain - 1 < 3) ? remain - 1 : 3));
      endcase
      n++;
    end
    prog[n] = enc_j(0, n);
    plen = n + 1;
  endtask

  // ------------------------------------------------------------ main sequence
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 16; f++) n_alu_fn[f] = 0;
    {n_br_taken, n_br_not, n_j, n_jal, n_jr, n_lw, n_sw, n_ori, n_lui, n_addi, n_subi} = '0;

    build_directed();
    load_and_run(1000);
    check_directed();
    check_against_model("directed");

    for (int t = 0; t < 40; t++) begin
      build_random(150);
      load_and_run(1000);
      check_against_model($sformatf("random%0d", t));
    end

    for (int f = 0; f < 16; f++) expect_eq($sformatf("ALU function %0d used", f), n_alu_fn[f] > 0, 1);
    expect_eq("branch taken seen", n_br_taken > 0, 1);
    expect_eq("branch not taken seen", n_br_not > 0, 1);
    expect_eq("j seen", n_j > 0, 1);
    expect_eq("jal seen", n_jal > 0, 1);
    expect_eq("jr seen", n_jr > 0, 1);
    expect_eq("lw seen", n_lw > 0, 1);
    expect_eq("sw seen", n_sw > 0, 1);
    expect_eq("ori seen", n_ori > 0, 1);
    expect_eq("lui seen", n_lui > 0, 1);
    expect_eq("addi seen", n_addi > 0, 1);
    expect_eq("subi seen", n_subi > 0, 1);
    $display("mechanisms: branch taken %0d, not taken %0d, j %0d, jal %0d, jr %0d, lw %0d, sw %0d, ori %0d, lui %0d, addi %0d, subi %0d",
             n_br_taken, n_br_not, n_j, n_jal, n_jr, n_lw, n_sw, n_ori, n_lui, n_addi, n_subi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
