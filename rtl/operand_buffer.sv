// operand_buffer: one operand (A or B) for each instruction slot of a node.
//
// Each slot holds a W-bit value (32 for operands A and B, 1 for the
// predicate operand) and a valid bit. Two write ports: port 0
// takes operands arriving from the network, port 1 takes results the node
// sends to one of its own slots. The node controller clears a slot's valid
// bit when the instruction in that slot issues (the operand is consumed), when
// a new instruction is loaded into the slot, or for all slots on flush (the
// block is committed or aborted). A write in the same cycle as a clear wins.
// The whole valid vector is visible for the issue logic; the value is read
// combinationally at rd_slot. The document shows the buffer as a block; its
// organisation is this design's choice.
module operand_buffer
  import trips_pkg::*;
#(
  parameter int SLOTS = NODE_SLOTS,
  parameter int W     = DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic                     wr0_en,
  input  logic [$clog2(SLOTS)-1:0] wr0_slot,
  input  logic [W-1:0]             wr0_data,
  input  logic                     wr1_en,
  input  logic [$clog2(SLOTS)-1:0] wr1_slot,
  input  logic [W-1:0]             wr1_data,
  input  logic                     clr_en,
  input  logic [$clog2(SLOTS)-1:0] clr_slot,
  input  logic                     clr2_en,
  input  logic [$clog2(SLOTS)-1:0] clr2_slot,
  input  logic [$clog2(SLOTS)-1:0] rd_slot,
  output logic [W-1:0]             rd_data,
  output logic [SLOTS-1:0]         valid
);
  logic [W-1:0] mem [SLOTS];

  assign rd_data = mem[rd_slot];

  always_ff @(posedge clk) begin
    if (wr0_en) mem[wr0_slot] <= wr0_data;
    if (wr1_en) mem[wr1_slot] <= wr1_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      if (flush) valid <= '0;
      if (clr_en)  valid[clr_slot]  <= 1'b0;
      if (clr2_en) valid[clr2_slot] <= 1'b0;
      if (wr0_en)  valid[wr0_slot]  <= 1'b1;
      if (wr1_en)  valid[wr1_slot]  <= 1'b1;
    end
  end
endmodule
