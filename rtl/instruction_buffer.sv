// instruction_buffer: the 64 instruction slots of one grid node.
//
// Written one slot per cycle from the instruction-cache network (wr_en,
// wr_slot, wr_instr) and read combinationally at rd_slot by the node
// controller for the instruction it issues. For the issue logic it also
// presents, for every slot, whether it holds an instruction and whether that
// instruction needs operand A, operand B and a predicate. The slot count is the document's
// (64 per processing element, eight per hyperblock); reset empties every slot.
module instruction_buffer
  import trips_pkg::*;
#(
  parameter int SLOTS = NODE_SLOTS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(SLOTS)-1:0] wr_slot,
  input  instr_t                   wr_instr,
  input  logic [$clog2(SLOTS)-1:0] rd_slot,
  output instr_t                   rd_instr,
  output logic [SLOTS-1:0]         slot_valid,
  output logic [SLOTS-1:0]         need_a,
  output logic [SLOTS-1:0]         need_b,
  output logic [SLOTS-1:0]         need_p
);
  instr_t mem [SLOTS];

  assign rd_instr = mem[rd_slot];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_slot] <= wr_instr;
  end

  // Per-slot flags kept beside the array so the issue logic sees all slots.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_valid <= '0;
      need_a     <= '0;
      need_b     <= '0;
      need_p     <= '0;
    end else if (wr_en) begin
      slot_valid[wr_slot] <= wr_instr.valid;
      need_a[wr_slot]     <= op_needs_a(wr_instr.op);
      need_b[wr_slot]     <= op_needs_b(wr_instr.op);
      need_p[wr_slot]     <= instr_needs_p(wr_instr.op, wr_instr.pred);
    end
  end
endmodule
