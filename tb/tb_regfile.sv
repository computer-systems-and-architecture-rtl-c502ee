// tb_regfile: self-checking test of the 8 x 16-bit register file. After reset
// all registers must read 0; then random writes and reads on all three read
// ports are compared with a shadow array kept by the testbench. Writes must
// become visible only after the clock edge, and never with we low.
module tb_regfile;
  import cpu_pkg::*;

  logic      clk = 0, rst_n = 0, we = 0;
  reg_addr_t ra1 = '0, ra2 = '0, wa = '0, dbg_addr = '0;
  word_t     rd1, rd2, wd = '0, dbg_data;
  word_t     shadow [8];
  int        checks = 0, failures = 0;

  regfile dut (.clk, .rst_n, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h expected=%h", what, got, exp);
    end
  endtask

  task automatic read_all;
    for (int r = 0; r < 8; r++) begin
      ra1 = 3'(r);
      ra2 = 3'(7 - r);
      dbg_addr = 3'(r);
      #1;
      expect_eq("rd1", rd1, shadow[r]);
      expect_eq("rd2", rd2, shadow[7 - r]);
      expect_eq("dbg", dbg_data, shadow[r]);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) shadow[r] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    read_all();
    repeat (500) begin
      @(negedge clk);
      we = 1'($urandom);
      wa = 3'($urandom);
      wd = 16'($urandom);
      ra1 = wa;
      #1;
      // write not yet visible before the edge
      expect_eq("pre-edge", rd1, shadow[wa]);
      @(posedge clk);
      if (we) shadow[wa] = wd;
      #1;
      expect_eq("post-edge", rd1, shadow[wa]);
      ra2 = 3'($urandom);
      #1;
      expect_eq("rd2", rd2, shadow[ra2]);
    end
    we = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
