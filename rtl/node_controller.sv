// node_controller: control of one grid node.
//
// Input side: every cycle it takes at most one operand packet from the four
// link inputs (N, E, S, W), chosen round-robin. A packet addressed to this
// node is written into operand buffer A, B or P (predicate) of the named
// slot; any other packet goes onto the hop path, into the hop-queue lane of
// the direction in which it will leave (row first, then column), and is
// refused (in_ready low) while that lane is full. in_ready depends on
// in_valid but in_valid never on in_ready, so links form no combinational
// loop.
//
// Issue side: an instruction slot is ready when it holds an instruction that
// has not yet fired in this block and every operand it needs is present (a
// predicated instruction also needs its predicate). The lowest ready slot
// issues when both result registers are empty; the ALU result is then copied
// into one result register per non-NIL target, the slot's operands are
// consumed and the slot is marked fired. A predicated instruction whose
// predicate bit differs from its pred polarity is nullified instead: it is
// marked fired and its operands are consumed, but no result is produced
// (nullify pulses). In RX-morph (en=1) a new result is held until the next
// frame begins, so the path of one frame ends at the producing node, as in
// the document's hop example where an add executes in frame 3 and its result
// first moves in frame 4. flush (commit or abort of the block) clears all
// fired marks and operands; loading an instruction clears that slot's mark.
//
// Dataflow firing, the two targets, predication on a true or false value and
// the input/hop-path split follow the document; the one-packet-per-cycle
// input, round-robin choice, lowest-slot issue and two result registers are
// this design's choices.
module node_controller
  import trips_pkg::*;
#(
  parameter int ROW   = 0,
  parameter int COL   = 0,
  parameter int SLOTS = NODE_SLOTS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     frame_start,
  input  logic                     flush,
  // link inputs
  input  logic [3:0]               in_valid,
  input  pkt_t                     in_pkt [4],
  output logic [3:0]               in_ready,
  // hop path
  input  logic [3:0]               hq_full,    // per lane (leaving direction)
  output logic [3:0]               hq_enq,
  output pkt_t                     hq_enq_pkt,
  // operand buffer writes from the network (port 0) and from own results (port 1)
  output logic                     wr0_a, wr0_b, wr0_p,
  output logic [$clog2(SLOTS)-1:0] wr0_slot,
  output logic [DATA_W-1:0]        wr0_data,
  input  logic                     local_valid,
  input  pkt_t                     local_pkt,
  output logic                     wr1_a, wr1_b, wr1_p,
  output logic [$clog2(SLOTS)-1:0] wr1_slot,
  output logic [DATA_W-1:0]        wr1_data,
  // issue
  input  logic [SLOTS-1:0]         slot_valid,
  input  logic [SLOTS-1:0]         need_a,
  input  logic [SLOTS-1:0]         need_b,
  input  logic [SLOTS-1:0]         need_p,
  input  logic [SLOTS-1:0]         a_valid,
  input  logic [SLOTS-1:0]         b_valid,
  input  logic [SLOTS-1:0]         p_valid,
  input  logic                     p_bit,      // predicate of the issuing slot
  output logic                     issue,
  output logic [$clog2(SLOTS)-1:0] issue_slot,
  input  instr_t                   issue_instr,
  input  logic [DATA_W-1:0]        alu_y,
  input  logic                     il_en,
  input  logic [$clog2(SLOTS)-1:0] il_slot,
  // result registers towards the router
  output logic [1:0]               res_valid,
  output pkt_t                     res_pkt [2],
  input  logic [1:0]               res_done,
  // status
  output logic                     res_wait,   // a result is held for the next frame
  output logic                     issue_stall, // a ready slot waits for the result registers
  output logic                     nullify     // the issuing instruction is predicated off
);
  localparam int SW = $clog2(SLOTS);

  // ---------------- input arbitration ----------------
  logic [1:0] rr;        // input with highest priority this cycle
  logic       any_in;
  logic [1:0] pick;
  pkt_t       p;
  logic       is_here;
  logic       p_local;
  dir_e       p_dir;

  always_comb begin
    any_in = 1'b0;
    pick   = rr;
    for (int k = 0; k < 4; k++) begin
      if (!any_in && in_valid[2'(rr + 2'(k))]) begin
        any_in = 1'b1;
        pick   = 2'(rr + 2'(k));
      end
    end
    p        = in_pkt[pick];
    route(ROW_W'(ROW), COL_W'(COL), p.dst, p_local, p_dir);
    is_here  = (p.dst.kind inside {TGT_NODE, TGT_PRED}) && p_local;
    in_ready = '0;
    if (any_in && (is_here || !hq_full[p_dir])) in_ready[pick] = 1'b1;
    hq_enq     = '0;
    hq_enq[p_dir] = any_in && !is_here && !hq_full[p_dir];
    hq_enq_pkt = p;
    wr0_a      = any_in && is_here && (p.dst.kind == TGT_NODE) && !p.dst.opnd;
    wr0_b      = any_in && is_here && (p.dst.kind == TGT_NODE) &&  p.dst.opnd;
    wr0_p      = any_in && is_here && (p.dst.kind == TGT_PRED);
    wr0_slot   = SW'(p.dst.frame);
    wr0_data   = p.data;
    wr1_a      = local_valid && (local_pkt.dst.kind == TGT_NODE) && !local_pkt.dst.opnd;
    wr1_b      = local_valid && (local_pkt.dst.kind == TGT_NODE) &&  local_pkt.dst.opnd;
    wr1_p      = local_valid && (local_pkt.dst.kind == TGT_PRED);
    wr1_slot   = SW'(local_pkt.dst.frame);
    wr1_data   = local_pkt.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      rr <= '0;
    else if (any_in) rr <= pick + 2'd1;
  end

  // ---------------- issue ----------------
  logic [SLOTS-1:0] fired;
  logic [SLOTS-1:0] ready;
  logic             any_ready;
  logic [1:0]       res_full;
  logic [1:0]       res_held;
  pkt_t             res_q [2];

  assign ready = slot_valid & ~fired & (~need_a | a_valid) & (~need_b | b_valid)
               & (~need_p | p_valid);

  always_comb begin
    any_ready  = 1'b0;
    issue_slot = '0;
    for (int s = SLOTS - 1; s >= 0; s--) begin
      if (ready[s]) begin
        any_ready  = 1'b1;
        issue_slot = SW'(s);
      end
    end
  end

  assign issue       = any_ready && (res_full == 2'b00);
  assign issue_stall = any_ready && (res_full != 2'b00);
  assign nullify     = issue && need_p[issue_slot] && (p_bit != issue_instr.pred[0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fired    <= '0;
      res_full <= '0;
      res_held <= '0;
    end else begin
      if (flush) fired <= '0;
      if (il_en) fired[il_slot] <= 1'b0;
      if (frame_start) res_held <= '0;
      for (int k = 0; k < 2; k++)
        if (res_done[k]) res_full[k] <= 1'b0;
      if (issue) begin
        fired[issue_slot] <= 1'b1;
        res_full[0] <= !nullify && (issue_instr.t0.kind != TGT_NIL);
        res_full[1] <= !nullify && (issue_instr.t1.kind != TGT_NIL);
        res_held    <= 2'b11;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (issue) begin
      res_q[0] <= '{dst: issue_instr.t0, data: alu_y};
      res_q[1] <= '{dst: issue_instr.t1, data: alu_y};
    end
  end

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      res_valid[k] = res_full[k] && (!en || !res_held[k] || frame_start);
      res_pkt[k]   = res_q[k];
    end
    res_wait = |(res_full & res_held) && en && !frame_start;
  end
endmodule
