// alu: 16-bit combinational arithmetic and logic unit of the processor.
//
// The 4-bit op-code is the function field of the ALU-class instructions, so the
// control unit passes it through unchanged for those and picks ADD, OR, SUB, EQ
// or LT for the others (addresses, immediates, branch compares).
//   zero  y = 0               not  y = ~a (bitwise)     inv  y = -a
//   and   y = a & b           or   y = a | b
//   add   y = a + b           sub  y = a - b            (wrap around modulo 2^16)
//   lt/gt/eq/neq  y = 1 when the relation holds, else 0 (lt and gt signed)
//   sll   y = a << 2          srl  y = a >> 2 (logical)
//   sla   y = a * 2 (a << 1)  sra  y = a / 2 as arithmetic shift (rounds toward -inf)
//   cp    y = a
// Shift amounts are the ones of the instruction set this design follows; the
// signed reading of lt/gt and the bitwise reading of "not" are this design's
// choices. Purely combinational: no clock, result valid after the logic delay.
module alu
  import cpu_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  always_comb begin
    unique case (op)
      ALU_ZERO: y = '0;
      ALU_NOT:  y = ~a;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_LT:   y = word_t'($signed(a) < $signed(b));
      ALU_GT:   y = word_t'($signed(a) > $signed(b));
      ALU_EQ:   y = word_t'(a == b);
      ALU_NEQ:  y = word_t'(a != b);
      ALU_INV:  y = -a;
      ALU_SLL:  y = a << 2;
      ALU_SRL:  y = a >> 2;
      ALU_SLA:  y = a << 1;
      ALU_SRA:  y = word_t'($signed(a) >>> 1);
      ALU_CP:   y = a;
      default:  y = '0;
    endcase
  end

endmodule
