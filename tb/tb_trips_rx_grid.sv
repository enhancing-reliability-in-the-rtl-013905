// tb_trips_rx_grid: end-to-end test of the whole grid at its default sizes.
//
// Workload 1, hop-queue timing: one register value enters the top of column
// 0, is incremented by an add-immediate at node (3,0) and the sum is sent to
// node (1,2), which moves it to a register. With hop queues enabled the add
// must fire three frames after the register read and the consumer four
// frames after that (one link per frame, row first then column).
//
// Workload 2, the 16 instruction sequences of the 4x4 matrix-multiply
// example: each sequence uses one slot (frame) of ten nodes, four multiplies
// in row 0, the adds below them, the final add at node (3,0) writing
// r33..r48; the placement and target lists are those of the example. The
// expected register values are obtained by evaluating the same dataflow graph
// here. It runs once with hop queues disabled (X-morph) and once enabled
// (RX-morph), with a flush in between; the frames each run needs are printed.
//
// Workload 3: a packet entering from the data-cache (east) edge of row 1 is
// moved to register r49.
//
// Workload 4, predication: r54 = max(r50, r51). A TLT at node (2,2) sends its
// 0/1 result to the predicate operands of two moves at node (3,3), one
// predicated on true (moves r51) and one on false (moves r50); both write
// r54. Run in RX-morph and in X-morph with the two orders of the values;
// exactly one write-back and one nullified move are expected per run.
//
// Counted mechanisms (each must occur): hop-queue hold, result hold until the
// next frame, issue stall on busy result registers, link back-pressure,
// hop-queue contention (two or more waiting entries), register injection and
// write-back, east-edge entry, mode switch, predicated nullification.
module tb_trips_rx_grid;
  import trips_pkg::*;

  localparam int FRAME_CYCLES = 8;   // the top's default

  logic clk = 0, rst_n = 0;
  logic [GRID_ROWS-1:0][GRID_COLS-1:0] hq_en;
  logic flush, il_valid, ri_we, frame_start;
  logic [ROW_W-1:0] il_row;
  logic [COL_W-1:0] il_col;
  logic [SLOT_W-1:0] il_slot;
  instr_t il_instr;
  logic [GRID_COLS-1:0] rr_valid, rr_ready, wb_valid;
  logic [REG_W-1:0] rr_reg [GRID_COLS];
  target_t rr_tgt [GRID_COLS];
  logic [REG_W-1:0] ri_reg, dbg_reg, wb_reg [GRID_COLS];
  logic [DATA_W-1:0] ri_data, dbg_data, wb_data [GRID_COLS];
  logic [GRID_ROWS-1:0] dc_out_valid, dc_out_ready, dc_in_valid, dc_in_ready;
  pkt_t dc_out_pkt [GRID_ROWS], dc_in_pkt [GRID_ROWS];
  logic [31:0] frame_count;
  logic [GRID_ROWS-1:0][GRID_COLS-1:0] st_issue, st_hq_enq, st_hq_wait, st_res_wait, st_issue_stall, st_nullify;
  int checks = 0, failures = 0;

  trips_rx_grid dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired wb=%0d reads=%0d", wb_count, reads_done);
    for (int r = 0; r < GRID_ROWS; r++) $display("hq row %0d: %0d %0d %0d %0d", r, dut.st_hq_count[r][0], dut.st_hq_count[r][1], dut.st_hq_count[r][2], dut.st_hq_count[r][3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- helpers ----------------
  function automatic target_t ntgt(int f, int r, int c, int o);
    target_t t;
    t = '0; t.kind = TGT_NODE; t.frame = SLOT_W'(f); t.row = ROW_W'(r); t.col = COL_W'(c); t.opnd = 1'(o);
    return t;
  endfunction

  function automatic target_t rtgt(int rn);
    target_t t;
    t = '0; t.kind = TGT_REG; t.rnum = REG_W'(rn);
    return t;
  endfunction

  function automatic instr_t mk(opcode_e op, target_t t0, target_t t1, logic [15:0] imm = '0);
    instr_t i;
    i = '0; i.valid = 1; i.op = op; i.t0 = t0; i.t1 = t1; i.imm = imm;
    return i;
  endfunction

  task automatic load(int r, int c, int s, instr_t i);
    @(negedge clk);
    il_valid = 1; il_row = ROW_W'(r); il_col = COL_W'(c); il_slot = SLOT_W'(s); il_instr = i;
    @(negedge clk);
    il_valid = 0;
  endtask

  logic [DATA_W-1:0] regs_model [NUM_REGS];
  task automatic preload(int rn, logic [DATA_W-1:0] v);
    @(negedge clk);
    ri_we = 1; ri_reg = REG_W'(rn); ri_data = v; regs_model[rn] = v;
    @(negedge clk);
    ri_we = 0;
  endtask

  // register read request queues, one per bank
  typedef struct { int rn; target_t t; } rreq_t;
  rreq_t rq [GRID_COLS][$];
  int reads_done = 0;
  always @(negedge clk) begin
    for (int c = 0; c < GRID_COLS; c++) begin
      rr_valid[c] = rst_n && rq[c].size() > 0;
      if (rq[c].size() > 0) begin rr_reg[c] = REG_W'(rq[c][0].rn); rr_tgt[c] = rq[c][0].t; end
    end
  end
  always @(posedge clk) begin
    for (int c = 0; c < GRID_COLS; c++)
      if (rst_n && rq[c].size() > 0 && rr_valid[c] && rr_ready[c]) begin void'(rq[c].pop_front()); reads_done++; end
  end
  task automatic read_reg(int rn, target_t t);
    rq[rn % GRID_COLS].push_back('{rn, t});
  endtask

  // write-back log
  int wb_count = 0;
  logic [DATA_W-1:0] wb_val [NUM_REGS];
  bit wb_seen [NUM_REGS];
  always @(posedge clk) begin
    for (int c = 0; c < GRID_COLS; c++)
      if (rst_n && wb_valid[c]) begin
        wb_count++; wb_val[wb_reg[c]] = wb_data[c]; wb_seen[wb_reg[c]] = 1;
        check(int'(wb_reg[c]) % GRID_COLS == c, "write-back reaches the bank of its register");
      end
  end

  // mechanism counters
  int n_null = 0, n_hq_hold = 0, n_res_hold = 0, n_stall = 0, n_bp = 0, n_contention = 0, n_edge = 0;
  always @(posedge clk) if (rst_n) begin
    n_hq_hold  += $countones(st_hq_wait);
    n_res_hold += $countones(st_res_wait);
    n_stall    += $countones(st_issue_stall);
    n_null     += $countones(st_nullify);
    for (int r = 0; r < GRID_ROWS; r++)
      for (int c = 0; c < GRID_COLS; c++) begin
        n_bp += $countones(dut.n_in_valid[r][c] & ~dut.n_in_ready[r][c]);
        if (dut.st_hq_count[r][c] >= 2) n_contention++;
      end
    if (dc_in_valid[1] && dc_in_ready[1]) n_edge++;
  end

  // issue observation for the hop-timing workload
  int issue_frame [GRID_ROWS][GRID_COLS];
  always @(posedge clk) if (rst_n)
    for (int r = 0; r < GRID_ROWS; r++)
      for (int c = 0; c < GRID_COLS; c++)
        if (st_issue[r][c]) issue_frame[r][c] = int'(frame_count);

  // ---------------- matrix-multiply program (example placement) ----------------
  // nodes of I0..I9: row 0 multiplies, adds below
  int pr [10] = '{0, 0, 0, 0, 1, 1, 1, 2, 2, 3};
  int pc [10] = '{0, 1, 2, 3, 0, 1, 2, 0, 1, 0};

  task automatic load_matmul();
    for (int d = 0; d < 16; d++) begin
      target_t nil;
      nil = '0;
      load(0, 0, d, mk(OP_MUL, ntgt(d, 1, 0, 0), nil));
      load(0, 1, d, mk(OP_MUL, ntgt(d, 1, 0, 1), ntgt(d, 1, 1, 0)));
      load(0, 2, d, mk(OP_MUL, ntgt(d, 1, 1, 1), ntgt(d, 1, 2, 0)));
      load(0, 3, d, mk(OP_MUL, ntgt(d, 1, 2, 1), nil));
      load(1, 0, d, mk(OP_ADD, ntgt(d, 2, 0, 0), nil));
      load(1, 1, d, mk(OP_ADD, ntgt(d, 2, 0, 1), ntgt(d, 2, 1, 0)));
      load(1, 2, d, mk(OP_ADD, ntgt(d, 2, 1, 1), nil));
      load(2, 0, d, mk(OP_ADD, ntgt(d, 3, 0, 0), nil));
      load(2, 1, d, mk(OP_ADD, ntgt(d, 3, 0, 1), nil));
      load(3, 0, d, mk(OP_ADD, rtgt(33 + d), nil));
    end
  endtask

  // the same graph evaluated in software
  function automatic logic [DATA_W-1:0] matmul_expect(int d);
    logic [DATA_W-1:0] p [4], i4, i5, i6, i7, i8;
    int i, j;
    i = d / 4; j = d % 4;
    for (int k = 0; k < 4; k++) p[k] = regs_model[1 + 4*i + k] * regs_model[17 + 4*k + j];
    i4 = p[0] + p[1]; i5 = p[1] + p[2]; i6 = p[2] + p[3];
    i7 = i4 + i5; i8 = i5 + i6;
    return i7 + i8;
  endfunction

  task automatic run_matmul(bit rx, int nseq, output int frames);
    int f0, base;
    hq_en = rx ? '1 : '0;
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    for (int r = 33; r <= 48; r++) wb_seen[r] = 0;
    for (int r = 33; r <= 48; r++) wb_val[r] = '0;
    while (!frame_start) @(negedge clk);
    f0 = int'(frame_count);
    base = wb_count;
    for (int d = 0; d < nseq; d++) begin
      int i, j;
      i = d / 4; j = d % 4;
      for (int k = 0; k < 4; k++) begin
        read_reg(1 + 4*i + k,  ntgt(d, 0, k, 0));
        read_reg(17 + 4*k + j, ntgt(d, 0, k, 1));
      end
    end
    while (wb_count < base + nseq) @(posedge clk);
    frames = int'(frame_count) - f0 + 1;
    for (int d = 0; d < nseq; d++) begin
      check(wb_seen[33 + d] && wb_val[33 + d] == matmul_expect(d), "matrix-multiply result");
      @(negedge clk); dbg_reg = REG_W'(33 + d); #1;
      check(dbg_data == matmul_expect(d), "result held in register bank");
    end
  endtask

  function automatic target_t ptgt(int f, int r, int c);
    target_t t;
    t = ntgt(f, r, c, 0); t.kind = TGT_PRED;
    return t;
  endfunction

  task automatic run_max(bit rx, logic [DATA_W-1:0] x, logic [DATA_W-1:0] y);
    int base, nb;
    hq_en = rx ? '1 : '0;
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    preload(50, x);
    preload(51, y);
    wb_seen[54] = 0;
    base = wb_count;
    nb = n_null;
    read_reg(50, ntgt(42, 2, 2, 0));
    read_reg(51, ntgt(42, 2, 2, 1));
    read_reg(50, ntgt(42, 3, 3, 0));
    read_reg(51, ntgt(43, 3, 3, 0));
    while (!wb_seen[54]) @(posedge clk);
    repeat (4 * FRAME_CYCLES) @(posedge clk);
    check(wb_count == base + 1, "one predicated move writes r54");
    check(wb_val[54] == (($signed(x) < $signed(y)) ? y : x), "r54 = max(r50, r51)");
    check(n_null == nb + 1, "the other predicated move is nullified");
  endtask

  initial begin
    int f0, fx, frx, fx1, frx1;
    hq_en = '0; flush = 0; il_valid = 0; ri_we = 0; dbg_reg = '0;
    il_row = '0; il_col = '0; il_slot = '0; il_instr = '0; ri_reg = '0; ri_data = '0;
    dc_out_ready = '1; dc_in_valid = '0;
    for (int r = 0; r < GRID_ROWS; r++) dc_in_pkt[r] = '0;
    for (int c = 0; c < GRID_COLS; c++) begin rr_reg[c] = '0; rr_tgt[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int r = 1; r <= 32; r++) preload(r, DATA_W'($urandom % 1000));
    preload(60, 32'd41);

    // ---- workload 1: hop-queue timing (RX-morph) ----
    load(3, 0, 40, mk(OP_ADDI, ntgt(40, 1, 2, 0), '0, 16'd1));
    load(1, 2, 40, mk(OP_MOV, rtgt(62), '0));
    hq_en = '1;
    while (!frame_start) @(negedge clk);
    f0 = int'(frame_count);
    read_reg(60, ntgt(40, 3, 0, 0));
    while (!(wb_seen[62])) @(posedge clk);
    check(wb_val[62] == 32'd42, "hop example value");
    check(issue_frame[3][0] == f0 + 3, "add fires in the fourth frame (frame 3)");
    check(issue_frame[1][2] == f0 + 7, "consumer receives in the eighth frame (frame 7)");
    $display("hop example: add in frame %0d, consumer in frame %0d (relative)", issue_frame[3][0] - f0, issue_frame[1][2] - f0);

    // ---- workload 2: matrix multiply, X-morph then RX-morph ----
    load_matmul();
    run_matmul(0, 16, fx);
    run_matmul(1, 16, frx);
    $display("matrix multiply: X-morph %0d frames, RX-morph %0d frames", fx, frx);
    check(frx > fx, "RX-morph takes more frames than X-morph");
    // one sequence alone: at least four compute levels plus three hops up
    // column 0 and the hop into the bank, one link per frame; register values
    // that enter at another column add frames
    run_matmul(0, 1, fx1);
    run_matmul(1, 1, frx1);
    $display("one sequence alone: X-morph %0d frames, RX-morph %0d frames", fx1, frx1);
    check(frx1 >= 8 && frx1 > fx1, "one sequence alone takes at least 8 frames in RX-morph");

    // ---- workload 3: operand from the east (data-cache) edge ----
    load(1, 3, 41, mk(OP_MOV, rtgt(49), '0));
    @(negedge clk);
    dc_in_valid[1] = 1; dc_in_pkt[1] = '{dst: ntgt(41, 1, 3, 0), data: 32'hCAFE};
    do @(posedge clk); while (!dc_in_ready[1]);
    #1 dc_in_valid[1] = 0;
    while (!wb_seen[49]) @(posedge clk);
    check(wb_val[49] == 32'hCAFE, "east-edge operand written to r49");

    // ---- workload 4: predication, r54 = max(r50, r51) ----
    load(2, 2, 42, mk(OP_TLT, ptgt(43, 3, 3), ptgt(42, 3, 3)));
    il_instr = mk(OP_MOV, rtgt(54), '0); il_instr.pred = PR_FALSE; load(3, 3, 42, il_instr);
    il_instr = mk(OP_MOV, rtgt(54), '0); il_instr.pred = PR_TRUE;  load(3, 3, 43, il_instr);
    run_max(1, 32'd100, 32'd7);
    run_max(1, -32'sd5, 32'd300);
    run_max(0, 32'd12, 32'd13);
    run_max(0, 32'd9, -32'sd9);

    $display("nullified=%0d", n_null);
    $display("hq_hold=%0d res_hold=%0d stall=%0d backpressure=%0d contention=%0d edge=%0d reads=%0d writebacks=%0d",
             n_hq_hold, n_res_hold, n_stall, n_bp, n_contention, n_edge, reads_done, wb_count);
    check(n_hq_hold > 0,    "hop-queue hold happened");
    check(n_res_hold > 0,   "result hold happened");
    check(n_stall > 0,      "issue stall happened");
    check(n_bp > 0,         "link back-pressure happened");
    check(n_contention > 0, "hop-queue contention happened");
    check(n_edge > 0,       "east-edge entry happened");
    check(n_null > 0,       "predicated nullification happened");
    check(reads_done == 1 + 2 * 128 + 2 * 8 + 4 * 4 && wb_count == 1 + 32 + 2 + 1 + 4, "all register reads and write-backs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
