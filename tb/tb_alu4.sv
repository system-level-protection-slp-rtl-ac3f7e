// tb_alu4: exhaustive self-check of the 4-bit ALU.
// Every opcode is applied with every pair of 4-bit operands (2048 vectors);
// the expected result is computed with integer arithmetic in the testbench
// and truncated to 4 bits.
module tb_alu4;
  import slp_pkg::*;

  alu_op_e     op;
  logic [3:0]  a, b, y;
  int          checks = 0, failures = 0;

  alu4 dut (.op(op), .a(a), .b(b), .y(y));

  function automatic int expected(int o, int x, int z);
    case (o)
      0: return (x + z) % 16;
      1: return (x - z + 16) % 16;
      2: return x & z;
      3: return x | z;
      4: return x ^ z;
      5: return 15 - x;
      6: return (x * 2) % 16;
      default: return x / 2;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 8; o++)
      for (int x = 0; x < 16; x++)
        for (int z = 0; z < 16; z++) begin
          op = alu_op_e'(o); a = 4'(x); b = 4'(z);
          #1;
          checks++;
          if (int'(y) != expected(o, x, z)) begin
            failures++;
            if (failures < 10) $display("op=%0d a=%0d b=%0d y=%0d exp=%0d", o, x, z, y, expected(o, x, z));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
