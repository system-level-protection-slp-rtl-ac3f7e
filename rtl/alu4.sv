// alu4: the 4-bit ALU used as the third-party IP core.
//
// The three redundant IP cores all implement this function. It is purely
// combinational: y follows op, a and b in the same cycle. Inputs are the
// 3-bit opcode and two 4-bit operands; the output is 4 bits wide (carries and
// bits shifted out are dropped). The operand and result widths follow the
// published four-bit ALU; the operation set and its encoding (slp_pkg::alu_op_e)
// are this design's own choice, since only "an ALU" is specified.
module alu4
  import slp_pkg::*;
(
  input  alu_op_e             op,
  input  logic [DATA_W-1:0]   a,
  input  logic [DATA_W-1:0]   b,
  output logic [DATA_W-1:0]   y
);

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_NOT:  y = ~a;
      OP_SHL:  y = a << 1;
      OP_SHR:  y = a >> 1;
      default: y = '0;
    endcase
  end

endmodule
