// tb_program_counter: self-checking test of the PC register and next-address
// selection. After reset the PC must be 0. Each cycle a random source (pc + 1,
// branch taken or not taken, register jump, absolute jump) is applied and the
// PC after the edge is compared with the address worked out here with integer
// arithmetic modulo 2^16. Each source must occur.
module tb_program_counter;
  import cpu_pkg::*;

  logic   clk = 0, rst_n = 0, cond = 0;
  pcsel_e pc_sel = PC_SEQ;
  word_t  imm = '0, alu_y = '0, pc, pc_plus1, pc_next;
  int     checks = 0, failures = 0;
  int     seen [5];

  program_counter dut (.clk, .rst_n, .pc_sel, .cond, .imm, .alu_y, .pc, .pc_plus1, .pc_next);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%h expected=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cur, exp;
    for (int i = 0; i < 5; i++) seen[i] = 0;
    repeat (2) @(posedge clk);
    #1;
    expect_eq("reset pc", pc, 0);
    rst_n = 1;
    cur = 0;
    repeat (2000) begin
      int kind;
      @(negedge clk);
      kind  = $urandom_range(0, 4);
      imm   = 16'($urandom);
      alu_y = 16'($urandom);
      cond  = 1'($urandom);
      case (kind)
        0: begin pc_sel = PC_SEQ; exp = (cur + 1) % 65536; end
        1: begin pc_sel = PC_BRANCH; cond = 1; exp = (cur + 1 + int'(imm)) % 65536; end
        2: begin pc_sel = PC_BRANCH; cond = 0; exp = (cur + 1) % 65536; end
        3: begin pc_sel = PC_ALU; exp = int'(alu_y); end
        default: begin pc_sel = PC_IMM; exp = int'(imm); end
      endcase
      seen[kind]++;
      #1;
      expect_eq("pc_plus1", pc_plus1, (cur + 1) % 65536);
      expect_eq("pc_next", pc_next, exp);
      @(posedge clk);
      #1;
      expect_eq("pc", pc, exp);
      cur = exp;
    end
    // reset returns to 0
    @(negedge clk);
    rst_n = 0;
    @(posedge clk);
    #1;
    expect_eq("reset again", pc, 0);
    for (int i = 0; i < 5; i++) expect_eq("source used", seen[i] > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
