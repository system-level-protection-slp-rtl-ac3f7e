// tb_trojan_ip: self-check of one Trojan-carrying IP core (ALU + SAZ).
// 4000 random vectors with the trigger high about one time in four. The
// expected value is the ALU result computed in the testbench with bit 2
// (the attacked bit of this instance) cleared while triggered.
module tb_trojan_ip;
  import slp_pkg::*;

  alu_op_e    op;
  logic [3:0] a, b, y;
  logic       trigger;
  int         checks = 0, failures = 0, hits = 0;

  trojan_ip #(.TARGET_BIT(2)) dut (.op(op), .a(a), .b(b), .trigger(trigger), .y(y));

  function automatic int alu_ref(int o, int x, int z);
    case (o)
      0: return (x + z) & 15;
      1: return (x - z) & 15;
      2: return x & z;
      3: return x | z;
      4: return x ^ z;
      5: return (~x) & 15;
      6: return (x << 1) & 15;
      default: return x >> 1;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int o, x, z, e;
      o = $urandom % 8; x = $urandom % 16; z = $urandom % 16;
      op = alu_op_e'(o); a = 4'(x); b = 4'(z);
      trigger = ($urandom % 4) == 0;
      #1;
      e = alu_ref(o, x, z);
      if (trigger && (e & 4) != 0) hits++;
      if (trigger) e = e & ~4;
      checks++;
      if (int'(y) != e) failures++;
    end
    checks++;
    if (hits == 0) failures++;   // the payload must have changed a result
    $display("tb_trojan_ip: payload changed %0d results", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
