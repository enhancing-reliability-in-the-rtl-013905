// tb_grid_node: self-checking test of one grid_node at (1,1).
// Loads two instructions: slot 3 adds operands A and B and sends the sum to
// its own slot 5 (operand A) and to node (2,1) slot 0 operand B; slot 5
// moves its operand to register r6 (bank 2, reached to the east). Operands
// for slot 3 arrive from the west and north links, and two packets only
// pass through (west->east and north->south). The run is made once with the
// hop queue disabled and once enabled. With it enabled, the testbench checks
// the frame in which each packet leaves: pass-through packets and the add's
// results one frame after they arrived, the move's result one frame later.
// A third test checks predication: a TLT writes its 0/1 result to the
// predicate operands of two moves in the same node, one predicated on true
// and one on false, both writing r10; exactly one of them must send its
// value and the other must be nullified, for both outcomes of the test.
module tb_grid_node;
  import trips_pkg::*;

  localparam int FRAME = 8;

  logic clk = 0, rst_n = 0;
  logic hq_en, frame_start, flush, il_en;
  logic [SLOT_W-1:0] il_slot;
  instr_t il_instr;
  logic [3:0] in_valid, in_ready, out_valid, out_ready;
  pkt_t in_pkt [4], out_pkt [4];
  logic issue, hq_enq, hq_waiting, res_wait, issue_stall, nullify;
  logic [$clog2(17)-1:0] hq_count;
  int checks = 0, failures = 0;
  int n_null = 0;
  int cyc = 0, frame = 0;

  grid_node #(.ROW(1), .COL(1), .HQ_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;
  assign frame_start = (cyc % FRAME) == 0;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic target_t node_tgt(int f, int r, int c, int o);
    target_t t;
    t = '0; t.kind = TGT_NODE; t.frame = SLOT_W'(f); t.row = ROW_W'(r); t.col = COL_W'(c); t.opnd = 1'(o);
    return t;
  endfunction

  // collected outputs
  typedef struct { int dir; pkt_t p; int frame; } obs_t;
  obs_t seen [$];
  always @(posedge clk) begin
    for (int d = 0; d < 4; d++)
      if (rst_n && out_valid[d] && out_ready[d]) seen.push_back('{d, out_pkt[d], cyc / FRAME});
  end

  task automatic send(int d, pkt_t p);
    @(negedge clk);
    in_valid = '0; in_valid[d] = 1'b1; in_pkt[d] = p;
    do @(posedge clk); while (!in_ready[d]);
    #1 in_valid = '0;
  endtask

  task automatic run(bit rx);
    instr_t i3, i5;
    target_t r6;
    pkt_t pa, pb, h1, h2;
    int f0;
    bit got [4];
    hq_en = rx;
    seen.delete();
    // load
    i3 = '0; i3.valid = 1; i3.op = OP_ADD; i3.t0 = node_tgt(5, 1, 1, 0); i3.t1 = node_tgt(0, 2, 1, 1);
    i5 = '0; i5.valid = 1; i5.op = OP_MOV; r6 = '0; r6.kind = TGT_REG; r6.rnum = 7'd6; i5.t0 = r6;
    @(negedge clk); il_en = 1; il_slot = 3; il_instr = i3;
    @(negedge clk); il_slot = 5; il_instr = i5;
    @(negedge clk); il_en = 0;
    // wait for a frame start so all inputs arrive within one frame
    while (!frame_start) @(negedge clk);
    f0 = cyc / FRAME;
    pa = '{dst: node_tgt(3, 1, 1, 0), data: 32'd1000 + rx};
    pb = '{dst: node_tgt(3, 1, 1, 1), data: 32'd234};
    h1 = '{dst: node_tgt(9, 1, 3, 0), data: 32'hAAAA};
    h2 = '{dst: node_tgt(9, 3, 1, 1), data: 32'hBBBB};
    send(DIR_W, pa);
    send(DIR_N, pb);
    send(DIR_W, h1);
    send(DIR_N, h2);
    check(cyc / FRAME == f0, "inputs delivered within one frame");
    repeat (4 * FRAME) @(posedge clk);
    for (int k = 0; k < 4; k++) got[k] = 0;
    foreach (seen[k]) begin
      if (seen[k].dir == DIR_E && seen[k].p == h1) begin
        got[0] = 1; if (rx) check(seen[k].frame == f0 + 1, "RX: west-east hop leaves next frame");
      end else if (seen[k].dir == DIR_S && seen[k].p == h2) begin
        got[1] = 1; if (rx) check(seen[k].frame == f0 + 1, "RX: north-south hop leaves next frame");
      end else if (seen[k].dir == DIR_S && seen[k].p.dst == node_tgt(0, 2, 1, 1)) begin
        got[2] = 1; check(seen[k].p.data == 1234 + rx, "sum to node (2,1)");
        if (rx) check(seen[k].frame == f0 + 1, "RX: add result leaves next frame");
      end else if (seen[k].dir == DIR_E && seen[k].p.dst.kind == TGT_REG) begin
        got[3] = 1; check(seen[k].p.data == 1234 + rx && seen[k].p.dst.rnum == 6, "move to r6");
        if (rx) check(seen[k].frame == f0 + 2, "RX: dependent result one frame later");
        else    check(seen[k].frame == f0, "X: all done within the frame");
      end else begin
        check(0, "unexpected output packet");
      end
    end
    for (int k = 0; k < 4; k++) check(got[k], "expected output seen");
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
  endtask

  function automatic target_t pred_tgt(int f);
    target_t t;
    t = node_tgt(f, 1, 1, 0); t.kind = TGT_PRED;
    return t;
  endfunction

  task automatic run_pred(int a, int b);
    instr_t it, i8, i9;
    target_t r10;
    int outs, val;
    hq_en = 0;
    seen.delete();
    n_null = 0;
    r10 = '0; r10.kind = TGT_REG; r10.rnum = 7'd10;
    it = '0; it.valid = 1; it.op = OP_TLT; it.t0 = pred_tgt(8); it.t1 = pred_tgt(9);
    i8 = '0; i8.valid = 1; i8.op = OP_MOV; i8.pred = PR_TRUE;  i8.t0 = r10;
    i9 = '0; i9.valid = 1; i9.op = OP_MOV; i9.pred = PR_FALSE; i9.t0 = r10;
    @(negedge clk); il_en = 1; il_slot = 7; il_instr = it;
    @(negedge clk); il_slot = 8; il_instr = i8;
    @(negedge clk); il_slot = 9; il_instr = i9;
    @(negedge clk); il_en = 0;
    send(DIR_W, '{dst: node_tgt(8, 1, 1, 0), data: 32'd77});
    send(DIR_W, '{dst: node_tgt(9, 1, 1, 0), data: 32'd88});
    repeat (4) @(posedge clk);
    check(seen.size() == 0, "predicated moves wait for their predicate");
    send(DIR_N, '{dst: node_tgt(7, 1, 1, 0), data: 32'(a)});
    send(DIR_N, '{dst: node_tgt(7, 1, 1, 1), data: 32'(b)});
    repeat (2 * FRAME) @(posedge clk);
    outs = 0; val = 0;
    foreach (seen[k]) begin
      outs++;
      val = int'(seen[k].p.data);
      check(seen[k].dir == DIR_E && seen[k].p.dst == r10, "predicated result goes to r10");
    end
    check(outs == 1, "exactly one predicated move executes");
    check(val == ((a < b) ? 77 : 88), "the move on the matching predicate executes");
    check(n_null == 1, "the other move is nullified");
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
  endtask

  int n_wait = 0, n_rwait = 0;
  always @(posedge clk) begin
    if (nullify) n_null++;
    if (hq_waiting) n_wait++;
    if (res_wait) n_rwait++;
  end

  initial begin
    {hq_en, flush, il_en, in_valid} = '0;
    il_slot = '0; il_instr = '0; out_ready = '1;
    for (int d = 0; d < 4; d++) in_pkt[d] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0);
    check(n_wait == 0 && n_rwait == 0, "X-morph never holds");
    run(1);
    check(n_wait > 0 && n_rwait > 0, "RX-morph holds hop and result");
    run_pred(5, 9);
    run_pred(-3, -7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
