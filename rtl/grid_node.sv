// grid_node: one processing element of the TRIPS-style grid with a hop queue.
//
// Structure (after the node diagram of the RX-morph proposal): a node
// controller receives operands from the four neighbouring links and steers
// each one either into operand buffer A, B or P (predicate) of an instruction
// slot, or onto the hop path. The hop path runs through the hop queue to the
// operand router. The hop queue is built as four FCFS lanes, one per leaving
// direction: with a single shared queue, row-first routing can deadlock when
// two neighbours fill each other's queue with packets going opposite ways.
// Splitting by direction is this design's choice (the document draws one
// queue and speaks of one link per path direction per frame). An instruction
// issues from the instruction buffer when its operands are present; the ALU
// result goes to the operand router, which also feeds results aimed at the
// node's own slots back into the operand buffers.
//
// hq_en selects the reliable mode: with hq_en=1 an operand that passes
// through waits in the hop queue, and a new result waits in its result
// register, until the next frame starts, so each frame exercises at most one
// link per operand. With hq_en=0 operands move on as soon as a link is free.
//
// Links: in_valid/in_pkt/in_ready and out_valid/out_pkt/out_ready per
// direction (index = trips_pkg::dir_e); a packet moves when valid and ready
// are both high, and valid never waits for ready. il_* writes an instruction
// slot (the instruction-cache network). Every storage element is a flop, so a
// packet spends at least one cycle in each node it crosses.
module grid_node
  import trips_pkg::*;
#(
  parameter int ROW      = 0,
  parameter int COL      = 0,
  parameter int SLOTS    = NODE_SLOTS,
  parameter int HQ_DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     hq_en,
  input  logic                     frame_start,
  input  logic                     flush,
  input  logic                     il_en,
  input  logic [$clog2(SLOTS)-1:0] il_slot,
  input  instr_t                   il_instr,
  input  logic [3:0]               in_valid,
  input  pkt_t                     in_pkt [4],
  output logic [3:0]               in_ready,
  output logic [3:0]               out_valid,
  output pkt_t                     out_pkt [4],
  input  logic [3:0]               out_ready,
  // status for observation
  output logic                     issue,
  output logic                     hq_enq,      // an operand entered the hop path
  output logic                     hq_waiting,  // a hop-queue head is held for the next frame
  output logic                     res_wait,
  output logic                     issue_stall,
  output logic                     nullify,     // a predicated instruction was cancelled
  output logic [$clog2(4*HQ_DEPTH+1)-1:0] hq_count  // operands in all lanes
);
  localparam int SW = $clog2(SLOTS);

  localparam int CW = $clog2(HQ_DEPTH+1);
  logic [3:0]       hq_full, hq_head_valid, hq_deq, hq_lane_enq, hq_held;
  pkt_t             hq_enq_pkt;
  pkt_t             hq_head_pkt [4];
  logic [CW-1:0]    hq_lane_count [4];
  logic             wr0_a, wr0_b, wr0_p, wr1_a, wr1_b, wr1_p, p_bit;
  logic [SW-1:0]    wr0_slot, wr1_slot, issue_slot;
  logic [DATA_W-1:0] wr0_data, wr1_data, opa, opb, alu_y;
  logic             local_valid;
  pkt_t             local_pkt;
  logic [SLOTS-1:0] slot_valid, need_a, need_b, need_p, a_valid, b_valid, p_valid;
  instr_t           issue_instr;
  logic [1:0]       res_valid, res_done;
  pkt_t             res_pkt [2];

  node_controller #(.ROW(ROW), .COL(COL), .SLOTS(SLOTS)) u_ctrl (
    .clk, .rst_n, .en(hq_en), .frame_start, .flush,
    .in_valid, .in_pkt, .in_ready,
    .hq_full, .hq_enq(hq_lane_enq), .hq_enq_pkt,
    .wr0_a, .wr0_b, .wr0_p, .wr0_slot, .wr0_data,
    .local_valid, .local_pkt,
    .wr1_a, .wr1_b, .wr1_p, .wr1_slot, .wr1_data,
    .slot_valid, .need_a, .need_b, .need_p, .a_valid, .b_valid, .p_valid, .p_bit,
    .issue, .issue_slot, .issue_instr, .alu_y,
    .il_en, .il_slot,
    .res_valid, .res_pkt, .res_done,
    .res_wait, .issue_stall, .nullify
  );

  instruction_buffer #(.SLOTS(SLOTS)) u_ibuf (
    .clk, .rst_n,
    .wr_en(il_en), .wr_slot(il_slot), .wr_instr(il_instr),
    .rd_slot(issue_slot), .rd_instr(issue_instr),
    .slot_valid, .need_a, .need_b, .need_p
  );

  operand_buffer #(.SLOTS(SLOTS)) u_opa (
    .clk, .rst_n, .flush,
    .wr0_en(wr0_a), .wr0_slot, .wr0_data,
    .wr1_en(wr1_a), .wr1_slot, .wr1_data,
    .clr_en(issue), .clr_slot(issue_slot),
    .clr2_en(il_en), .clr2_slot(il_slot),
    .rd_slot(issue_slot), .rd_data(opa), .valid(a_valid)
  );

  operand_buffer #(.SLOTS(SLOTS)) u_opb (
    .clk, .rst_n, .flush,
    .wr0_en(wr0_b), .wr0_slot, .wr0_data,
    .wr1_en(wr1_b), .wr1_slot, .wr1_data,
    .clr_en(issue), .clr_slot(issue_slot),
    .clr2_en(il_en), .clr2_slot(il_slot),
    .rd_slot(issue_slot), .rd_data(opb), .valid(b_valid)
  );

  // predicate operand: one bit per slot (bit 0 of the arriving value)
  operand_buffer #(.SLOTS(SLOTS), .W(1)) u_opp (
    .clk, .rst_n, .flush,
    .wr0_en(wr0_p), .wr0_slot, .wr0_data(wr0_data[0]),
    .wr1_en(wr1_p), .wr1_slot, .wr1_data(wr1_data[0]),
    .clr_en(issue), .clr_slot(issue_slot),
    .clr2_en(il_en), .clr2_slot(il_slot),
    .rd_slot(issue_slot), .rd_data(p_bit), .valid(p_valid)
  );

  node_alu u_alu (
    .op(issue_instr.op), .a(opa), .b(opb), .imm(issue_instr.imm), .y(alu_y)
  );

  for (genvar d = 0; d < 4; d++) begin : g_lane
    hop_queue #(.DEPTH(HQ_DEPTH)) u_hq (
      .clk, .rst_n, .en(hq_en), .frame_start,
      .enq_valid(hq_lane_enq[d]), .enq_pkt(hq_enq_pkt), .full(hq_full[d]),
      .head_valid(hq_head_valid[d]), .head_pkt(hq_head_pkt[d]), .head_held(hq_held[d]),
      .deq(hq_deq[d]), .count(hq_lane_count[d])
    );
  end

  assign hq_enq     = |hq_lane_enq;
  assign hq_waiting = |hq_held;
  assign hq_count   = ($clog2(4*HQ_DEPTH+1))'(hq_lane_count[0]) + ($clog2(4*HQ_DEPTH+1))'(hq_lane_count[1])
                    + ($clog2(4*HQ_DEPTH+1))'(hq_lane_count[2]) + ($clog2(4*HQ_DEPTH+1))'(hq_lane_count[3]);

  operand_router #(.ROW(ROW), .COL(COL)) u_router (
    .hq_valid(hq_head_valid), .hq_pkt(hq_head_pkt),
    .res_valid, .res_pkt,
    .out_ready, .out_valid, .out_pkt,
    .hq_deq, .res_done,
    .local_valid, .local_pkt
  );
endmodule
