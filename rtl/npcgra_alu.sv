// npcgra_alu: the PE's MULT+ALU unit with dual-mode MAC.
//
// Purely combinational. It computes one operation on operands a and b, and for
// OP_MAC also adds the accumulator acc (the PE's Output REG). The multiply and
// add can be chained in one cycle (multiply-accumulate) only when mac_chain is
// set. The mode is meant to be fixed for a whole application: with chaining
// off, the adder's input from the multiplier is cut so the critical path is a
// single multiply or add, and OP_MAC returns just the product; a MAC then needs
// an OP_MUL and an OP_ADD in separate cycles, as in a conventional PE.
// The architecture only states that MUL and ADD are chained configurably; the
// gating point, the opcode set and the low-DATA_W-bit wrap-around arithmetic
// are this design's choices.
module npcgra_alu #(
  parameter int unsigned DATA_W = npcgra_pkg::DATA_W
) (
  input  npcgra_pkg::op_e               op,
  input  logic              mac_chain,  // 1: single-cycle MAC mode
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [DATA_W-1:0] acc,
  output logic [DATA_W-1:0] y
);

  import npcgra_pkg::*;

  logic [2*DATA_W-1:0] prod_full;
  logic [DATA_W-1:0]   prod;
  logic [DATA_W-1:0]   add_in;   // second adder operand

  assign prod_full = a * b;
  assign prod      = prod_full[DATA_W-1:0];
  // Chain path: the adder only sees the product in MAC mode.
  assign add_in    = mac_chain ? prod : '0;

  always_comb begin
    unique case (op)
      OP_ADD:   y = a + b;
      OP_SUB:   y = a - b;
      OP_MUL:   y = prod;
      OP_MAC:   y = mac_chain ? (acc + add_in) : prod;
      OP_AND:   y = a & b;
      OP_OR:    y = a | b;
      OP_XOR:   y = a ^ b;
      OP_SLL:   y = a << b[$clog2(DATA_W)-1:0];
      OP_SRA:   y = DATA_W'($signed(a) >>> b[$clog2(DATA_W)-1:0]);
      OP_MAX:   y = ($signed(a) > $signed(b)) ? a : b;
      OP_MIN:   y = ($signed(a) < $signed(b)) ? a : b;
      OP_PASSA: y = a;
      OP_PASSB: y = b;
      default:  y = acc;   // OP_NOP and unused codes: hold
    endcase
  end

endmodule
