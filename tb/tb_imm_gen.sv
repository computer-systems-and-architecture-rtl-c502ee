// tb_imm_gen: self-checking test of the immediate circuit. For random
// instruction words of every major opcode the expected 16-bit immediate is
// built here from the field value as an integer (negative for a set sign bit of
// the signed fields), then compared with the circuit's output.
module tb_imm_gen;
  import cpu_pkg::*;

  word_t instr, imm;
  int    checks = 0, failures = 0;

  imm_gen dut (.instr(instr), .imm(imm));

  function automatic word_t model(input word_t w);
    int v;
    case (w[15:13])
      3'b011, 3'b101: begin            // 6-bit signed
        v = int'(w[5:0]);
        if (v >= 32) v -= 64;
      end
      3'b100: begin
        v = int'(w[7:0]);
        if (w[12:11] == 2'b01) v *= 256;   // lui
      end
      3'b110: begin                    // 8-bit signed
        v = int'(w[7:0]);
        if (v >= 128) v -= 256;
      end
      3'b111: v = int'(w[11:0]);
      default: v = 0;
    endcase
    return 16'((v + 65536) % 65536);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: lw r1, r2, -1 ; lui r3, 0xAB ; jr r1, -128 ; j 0xFFF ; beq offset +31
    word_t dir_in  [5] = '{16'b011_0_001_010_111111, 16'b100_01_011_10101011,
                           16'b110_00_001_10000000, 16'b111_0_111111111111,
                           16'b101_0_000_000_011111};
    word_t dir_out [5] = '{16'hFFFF, 16'hAB00, 16'hFF80, 16'h0FFF, 16'h001F};
    for (int i = 0; i < 5; i++) begin
      instr = dir_in[i];
      #1;
      checks++;
      if (imm !== dir_out[i]) begin
        failures++;
        $display("FAIL instr=%b imm=%h expected=%h", instr, imm, dir_out[i]);
      end
    end
    for (int o = 0; o < 8; o++) begin
      repeat (300) begin
        instr = {3'(o), 13'($urandom)};
        #1;
        checks++;
        if (imm !== model(instr)) begin
          failures++;
          $display("FAIL instr=%b imm=%h expected=%h", instr, imm, model(instr));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
