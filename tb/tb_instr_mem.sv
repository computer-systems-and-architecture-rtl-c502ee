// tb_instr_mem: self-checking test of the instruction memory. A reduced-size
// memory (AW = 6) is loaded through the write port with random words, then
// read back at every address, also through PC values whose upper bits are
// set (they must be ignored). A read must be combinational: the word is
// checked without waiting for a clock edge.
module tb_instr_mem;
  import cpu_pkg::*;

  localparam int unsigned AW = 6;
  logic          clk = 0, we = 0;
  logic [AW-1:0] waddr = '0;
  word_t         wdata = '0, raddr = '0, rdata;
  word_t         shadow [2**AW];
  int            checks = 0, failures = 0;

  instr_mem #(.AW(AW)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      we = 1;
      waddr = AW'(i);
      wdata = 16'($urandom);
      shadow[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 2**AW; i++) begin
        raddr = (pass == 0) ? 16'(i) : (16'($urandom) & ~16'(2**AW - 1)) | 16'(i);
        #1;
        checks++;
        if (rdata !== shadow[i]) begin
          failures++;
          $display("FAIL raddr=%h rdata=%h expected=%h", raddr, rdata, shadow[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
