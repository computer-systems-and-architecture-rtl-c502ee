// tb_alu: self-checking test of the 16-bit ALU. Every op-code is applied to
// corner operands (0, 1, -1, most negative, most positive) and to random
// operands; the expected result is computed here from integer arithmetic on
// the operands' signed and unsigned values, not with the ALU's own operators.
module tb_alu;
  import cpu_pkg::*;

  alu_op_e op;
  word_t   a, b, y;
  int      checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic word_t model(input logic [3:0] f, input word_t x, input word_t z);
    int sx, sz;
    int ux, uz;
    sx = int'($signed(x));
    sz = int'($signed(z));
    ux = int'(x);
    uz = int'(z);
    case (f)
      4'd0:  return 16'd0;
      4'd1:  return 16'(65535 - ux);
      4'd2:  return x & z;
      4'd3:  return x | z;
      4'd4:  return 16'((ux + uz) % 65536);
      4'd5:  return 16'((ux - uz + 65536) % 65536);
      4'd6:  return (sx < sz) ? 16'd1 : 16'd0;
      4'd7:  return (sx > sz) ? 16'd1 : 16'd0;
      4'd8:  return (ux == uz) ? 16'd1 : 16'd0;
      4'd9:  return (ux != uz) ? 16'd1 : 16'd0;
      4'd10: return 16'((65536 - ux) % 65536);
      4'd11: return 16'((ux * 4) % 65536);
      4'd12: return 16'(ux / 4);
      4'd13: return 16'((ux * 2) % 65536);
      4'd14: return 16'((sx < 0 && (sx % 2) != 0) ? (sx / 2 - 1) : (sx / 2));
      default: return x;
    endcase
  endfunction

  task automatic check(input logic [3:0] f, input word_t x, input word_t z);
    word_t exp;
    op = alu_op_e'(f);
    a = x;
    b = z;
    #1;
    exp = model(f, x, z);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h expected=%h", f, x, z, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corners [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF, 16'h0005};
    for (int f = 0; f < 16; f++) begin
      foreach (corners[i]) foreach (corners[j]) check(4'(f), corners[i], corners[j]);
      repeat (200) check(4'(f), 16'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
