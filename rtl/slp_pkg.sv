// slp_pkg: types and constants shared by the triple-modular-redundant (TMR)
// Trojan-detecting voter design.
//
// Three IP cores from different vendors compute the same 4-bit ALU function;
// a bank of per-bit voters masks a faulty or Trojan-infected core and learns
// one trust weight per core and output bit. The number of IP cores (3), the
// data width (4 bits), the initial weight of 1, the 0.25 grading step and the
// mistake threshold of 4 follow the published scheme. The opcode encoding and
// the register widths are this design's own choices.
package slp_pkg;

  // Three IP cores (triple modular redundancy).
  localparam int unsigned N_IP = 3;
  // Width of the ALU and of the voted output: one voter per bit.
  localparam int unsigned DATA_W = 4;

  // ALU operations. The set of operations is not fixed by the scheme; this
  // is a representative 8-entry set.
  typedef enum logic [2:0] {
    OP_ADD = 3'd0,
    OP_SUB = 3'd1,
    OP_AND = 3'd2,
    OP_OR  = 3'd3,
    OP_XOR = 3'd4,
    OP_NOT = 3'd5,
    OP_SHL = 3'd6,
    OP_SHR = 3'd7
  } alu_op_e;

  // Which voting algorithm a voter bank uses.
  typedef enum logic {
    VOTE_RANDOMIZED = 1'b0,
    VOTE_GRADED     = 1'b1
  } vote_kind_e;

  // Weight registers: unsigned, saturating. The graded voter keeps two
  // fractional bits (steps of 0.25); the randomized voter uses integers.
  localparam int unsigned WEIGHT_W  = 8;
  localparam int unsigned FRAC_BITS = 2;

  // Graded voter: reward/penalty counters saturate at 3 (steps 0.25, 0.5,
  // 0.75) and the voter switches an IP to plain weighted voting once its
  // mistake count reaches the threshold.
  localparam int unsigned MISTAKE_THRESHOLD = 4;
  localparam int unsigned GRADE_MAX         = 3;

  // Width of the uniform random number used by the randomized voter.
  localparam int unsigned RAND_W = 16;

endpackage
