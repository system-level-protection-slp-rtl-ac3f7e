// trojan_ip: one untrusted third-party IP core, a 4-bit ALU (alu4) whose
// result passes through a stuck-at-zero Trojan payload (saz_trojan).
//
// With trigger low the core behaves as a clean ALU; with trigger high, output
// bit TARGET_BIT is forced to 0. Combinational. The ALU-plus-SAZ structure
// follows the published Trojan model; which bit is attacked is a parameter.
module trojan_ip
  import slp_pkg::*;
#(
  parameter int unsigned TARGET_BIT = 0
) (
  input  alu_op_e           op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic              trigger,
  output logic [DATA_W-1:0] y
);

  logic [DATA_W-1:0] alu_y;

  alu4 u_alu (.op(op), .a(a), .b(b), .y(alu_y));

  saz_trojan #(.TARGET_BIT(TARGET_BIT)) u_trojan (
    .d_in(alu_y), .trigger(trigger), .d_out(y)
  );

endmodule
