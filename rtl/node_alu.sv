// node_alu: the arithmetic unit of one grid node.
//
// Purely combinational: it evaluates the instruction that the node controller
// is issuing on the contents of operand buffers A and B and the instruction's
// 16-bit immediate. The node has one ALU driven by the issuing instruction
// slot. The document names multiply and add as the operations of its example;
// the rest of the opcode set (see trips_pkg) is this design's choice. The
// test opcodes TEQ and TLT give 0 or 1 and feed predicate operands.
// Multiplication keeps the low 32 bits of the product. Result is valid in the
// same cycle as its inputs.
module node_alu
  import trips_pkg::*;
(
  input  opcode_e           op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [15:0]       imm,
  output logic [DATA_W-1:0] y
);
  logic [DATA_W-1:0] simm;
  assign simm = {{(DATA_W-16){imm[15]}}, imm};

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_MUL:  y = a * b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_MOV:  y = a;
      OP_ADDI: y = a + simm;
      OP_GENC: y = simm;
      OP_TEQ:  y = DATA_W'(a == b);
      OP_TLT:  y = DATA_W'($signed(a) < $signed(b));
      default: y = '0;
    endcase
  end
endmodule
