// tb_node_controller: self-checking test of node_controller at node (2,1).
// Input side: random packets on the four links, some addressed to this node,
// with a randomly full hop queue; the testbench keeps its own round-robin
// pointer and checks which input is taken and where the packet goes.
// Issue side: random per-slot instruction and operand flags; the testbench
// tracks fired slots and the result registers and checks the issued slot
// (lowest ready), stalls while results are pending, the result packets, and
// the RX-morph hold of new results until the next frame start. Predicated
// slots need their predicate; a mismatching predicate nullifies the issue
// (no result registers filled).
module tb_node_controller;
  import trips_pkg::*;

  localparam int ROW = 2, COL = 1, SLOTS = NODE_SLOTS, SW = $clog2(SLOTS);
  localparam int FRAME = 6;

  logic clk = 0, rst_n = 0;
  logic en, frame_start, flush;
  logic [3:0] in_valid, in_ready;
  pkt_t in_pkt [4];
  logic [3:0] hq_full, hq_enq;
  pkt_t hq_enq_pkt;
  logic wr0_a, wr0_b, wr0_p, wr1_a, wr1_b, wr1_p, p_bit, nullify;
  logic [SW-1:0] wr0_slot, wr1_slot, issue_slot, il_slot;
  logic [DATA_W-1:0] wr0_data, wr1_data, alu_y;
  logic local_valid, il_en, issue, res_wait, issue_stall;
  pkt_t local_pkt;
  logic [SLOTS-1:0] slot_valid, need_a, need_b, need_p, a_valid, b_valid, p_valid;
  instr_t issue_instr;
  logic [1:0] res_valid, res_done;
  pkt_t res_pkt [2];
  int checks = 0, failures = 0;

  node_controller #(.ROW(ROW), .COL(COL), .SLOTS(SLOTS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rr = 0;
  logic [SLOTS-1:0] fired = '0;
  bit   rfull [2];
  bit   rheld [2];
  pkt_t rq [2];
  int   n_null = 0, n_pexec = 0, n_issue = 0, n_stall = 0, n_held = 0, n_local = 0, n_hop = 0, n_refused = 0;

  initial begin
    int pick, lowest, pdir;
    bit here, any;
    logic [SLOTS-1:0] rdy;
    {en, frame_start, flush, in_valid, hq_full, local_valid, il_en, res_done} = '0;
    il_slot = '0; local_pkt = '0; alu_y = '0; issue_instr = '0;
    slot_valid = '0; need_a = '0; need_b = '0; a_valid = '0; b_valid = '0;
    need_p = '0; p_valid = '0; p_bit = 0;
    for (int d = 0; d < 4; d++) in_pkt[d] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      en          = (n / 1500) % 2 == 1;
      frame_start = (n % FRAME) == 0;
      flush       = ($urandom % 300) == 0;
      in_valid    = 4'($urandom);
      for (int d = 0; d < 4; d++) begin
        in_pkt[d] = pkt_t'({$urandom, $urandom});
        in_pkt[d].dst.kind = ($urandom % 4 == 0) ? TGT_PRED : TGT_NODE;
        if ($urandom % 2) begin in_pkt[d].dst.row = ROW_W'(ROW); in_pkt[d].dst.col = COL_W'(COL); end
      end
      hq_full     = 4'($urandom) & 4'($urandom);
      slot_valid  = {$urandom, $urandom};
      need_a      = {$urandom, $urandom};
      need_b      = {$urandom, $urandom};
      a_valid     = {$urandom, $urandom} & {$urandom, $urandom};
      b_valid     = {$urandom, $urandom} & {$urandom, $urandom};
      need_p      = {$urandom, $urandom} & {$urandom, $urandom};
      p_valid     = {$urandom, $urandom};
      p_bit       = 1'($urandom);
      il_en       = ($urandom % 8) == 0;
      il_slot     = SW'($urandom);
      issue_instr = instr_t'({$urandom, $urandom});
      issue_instr.t0.kind = tgt_kind_e'($urandom % 3);
      issue_instr.t1.kind = tgt_kind_e'($urandom % 3);
      alu_y       = $urandom;
      local_valid = ($urandom % 5) == 0;
      local_pkt   = pkt_t'({$urandom, $urandom});
      local_pkt.dst.kind = ($urandom % 3 == 0) ? TGT_PRED : TGT_NODE;
      #1;
      for (int k = 0; k < 2; k++) begin
        bit ev;
        ev = rfull[k] && (!en || !rheld[k] || frame_start);
        check(res_valid[k] == ev, "result offered");
        if (ev) check(res_pkt[k] == rq[k], "result packet");
        if (rfull[k] && !ev) n_held++;
      end
      res_done = res_valid & 2'($urandom);
      #1;
      // input side
      any = 0; pick = 0;
      for (int k = 0; k < 4; k++) if (!any && in_valid[(rr + k) % 4]) begin any = 1; pick = (rr + k) % 4; end
      here = any && in_pkt[pick].dst.row == ROW_W'(ROW) && in_pkt[pick].dst.col == COL_W'(COL);
      // leaving direction, row first: 0 N, 1 E, 2 S, 3 W
      pdir = (in_pkt[pick].dst.col > COL) ? 1 : (in_pkt[pick].dst.col < COL) ? 3 :
             (in_pkt[pick].dst.row > ROW) ? 2 : 0;
      check(in_ready == ((any && (here || !hq_full[pdir])) ? 4'(1 << pick) : 4'b0), "input taken");
      check(hq_enq == ((any && !here && !hq_full[pdir]) ? 4'(1 << pdir) : 4'b0), "hop path push into lane");
      if (hq_enq != 0) begin check(hq_enq_pkt == in_pkt[pick], "hop packet"); n_hop++; end
      if (any && !here && hq_full[pdir]) n_refused++;
      begin
        bit pk;
        pk = in_pkt[pick].dst.kind == TGT_PRED;
        check(wr0_a == (here && !pk && !in_pkt[pick].dst.opnd) && wr0_b == (here && !pk && in_pkt[pick].dst.opnd)
              && wr0_p == (here && pk), "operand write select");
        pk = local_pkt.dst.kind == TGT_PRED;
        check(wr1_a == (local_valid && !pk && !local_pkt.dst.opnd) && wr1_b == (local_valid && !pk && local_pkt.dst.opnd)
              && wr1_p == (local_valid && pk), "self write");
      end
      if (here) begin
        check(wr0_slot == in_pkt[pick].dst.frame && wr0_data == in_pkt[pick].data, "operand write slot/data");
        n_local++;
      end
      // issue side
      rdy = slot_valid & ~fired & (~need_a | a_valid) & (~need_b | b_valid) & (~need_p | p_valid);
      lowest = -1;
      for (int s = SLOTS - 1; s >= 0; s--) if (rdy[s]) lowest = s;
      check(issue == (lowest >= 0 && !rfull[0] && !rfull[1]), "issue");
      check(issue_stall == (lowest >= 0 && (rfull[0] || rfull[1])), "issue stall");
      if (lowest >= 0) check(issue_slot == SW'(lowest), "lowest ready slot issues");
      check(nullify == (issue && need_p[issue_slot] && p_bit != issue_instr.pred[0]), "nullify");
      if (nullify) n_null++;
      if (issue && need_p[issue_slot] && !nullify) n_pexec++;
      if (issue) n_issue++;
      if (issue_stall) n_stall++;
      @(posedge clk);
      if (any) rr = (pick + 1) % 4;
      if (flush) fired = '0;
      if (il_en) fired[il_slot] = 0;
      if (frame_start) begin rheld[0] = 0; rheld[1] = 0; end
      for (int k = 0; k < 2; k++) if (res_done[k]) rfull[k] = 0;
      if (issue) begin
        fired[issue_slot] = 1;
        rfull[0] = !nullify && issue_instr.t0.kind != TGT_NIL;
        rfull[1] = !nullify && issue_instr.t1.kind != TGT_NIL;
        rheld[0] = 1; rheld[1] = 1;
        rq[0] = '{dst: issue_instr.t0, data: alu_y};
        rq[1] = '{dst: issue_instr.t1, data: alu_y};
      end
    end
    check(n_issue > 50 && n_stall > 50 && n_held > 50 && n_local > 50 && n_hop > 50 && n_refused > 10
          && n_null > 20 && n_pexec > 20,
          "issue, stall, RX hold, local delivery, hop and refusal all exercised");
    $display("nullified=%0d predicated-executed=%0d", n_null, n_pexec);
    $display("issues=%0d stalls=%0d held=%0d local=%0d hop=%0d refused=%0d", n_issue, n_stall, n_held, n_local, n_hop, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
