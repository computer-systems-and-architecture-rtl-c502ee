// tb_data_mem: self-checking test of the data memory. A reduced-size memory
// (AW = 6) gets random writes and reads against a shadow array; a write may
// take effect only at the clock edge and only with we high. Reads go through
// both the combinational port (with random upper address bits, which must be
// ignored) and the debug port.
module tb_data_mem;
  import cpu_pkg::*;

  localparam int unsigned AW = 6;
  logic          clk = 0, we = 0;
  logic [AW-1:0] dbg_addr = '0;
  word_t         addr = '0, wdata = '0, rdata, dbg_data;
  word_t         shadow [2**AW];
  int            checks = 0, failures = 0;

  data_mem #(.AW(AW)) dut (.clk, .addr, .rdata, .we, .wdata, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
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
    // initialise every word
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      we = 1;
      addr = 16'(i);
      wdata = 16'($urandom);
      shadow[i] = wdata;
    end
    repeat (1500) begin
      int idx;
      @(negedge clk);
      idx = $urandom_range(0, 2**AW - 1);
      we = 1'($urandom);
      addr = (16'($urandom) & ~16'(2**AW - 1)) | 16'(idx);
      wdata = 16'($urandom);
      #1;
      expect_eq("pre-edge", rdata, shadow[idx]);
      @(posedge clk);
      if (we) shadow[idx] = wdata;
      #1;
      expect_eq("post-edge", rdata, shadow[idx]);
      dbg_addr = AW'($urandom);
      #1;
      expect_eq("dbg", dbg_data, shadow[dbg_addr]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
