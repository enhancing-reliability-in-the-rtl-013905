// trips_pkg: shared geometry, instruction and operand-packet types of the
// TRIPS-style grid core with hop queues (RX-morph).
//
// The core is a 4x4 array of nodes; every node has 64 instruction slots, so a
// physical frame is "slot f of every node" and an instruction target is
// written as frame:row:column:operand, exactly like the N f:r:c:o notation of
// the matrix-multiply example. Registers are 32 bits wide and live in four
// banks of 32 entries, one bank above each column (128 registers per core).
// Instructions other than Generate-Constant can be predicated: the predicate
// is a third operand (P) of the slot, delivered like any other operand by a
// target of kind TGT_PRED, and the instruction executes only when bit 0 of
// that value equals the polarity in its pred field; otherwise it is
// nullified (it fires but sends nothing). The document states that
// instructions are predicated on a true or false predicate; delivering the
// predicate as an operand is this design's choice.
// The opcode set, field widths and the bank interleave (register r lives in
// bank r % 4) are choices of this design.
package trips_pkg;

  localparam int GRID_ROWS    = 4;    // 4x4 processing elements per core
  localparam int GRID_COLS    = 4;
  localparam int NODE_SLOTS   = 64;   // instruction slots per processing element
  localparam int DATA_W       = 32;   // 32-bit registers and operands
  localparam int NUM_REGS     = 128;  // registers per core
  localparam int BANK_ENTRIES = NUM_REGS / GRID_COLS;  // 32 per column bank

  localparam int ROW_W  = $clog2(GRID_ROWS);
  localparam int COL_W  = $clog2(GRID_COLS);
  localparam int SLOT_W = $clog2(NODE_SLOTS);
  localparam int REG_W  = $clog2(NUM_REGS);
  localparam int BIDX_W = $clog2(BANK_ENTRIES);

  // Operand-network directions, also the index of a node's link ports.
  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

  // Where a result goes: nowhere, operand A/B of a node slot, a register, or
  // the predicate operand of a node slot.
  typedef enum logic [1:0] {TGT_NIL = 2'd0, TGT_NODE = 2'd1, TGT_REG = 2'd2, TGT_PRED = 2'd3} tgt_kind_e;

  typedef struct packed {
    tgt_kind_e         kind;
    logic [SLOT_W-1:0] frame;  // instruction slot at the target node
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
    logic              opnd;   // TGT_NODE: 0 operand A, 1 operand B
    logic [REG_W-1:0]  rnum;   // register number for TGT_REG
  } target_t;

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_ADD  = 4'd1,
    OP_SUB  = 4'd2,
    OP_MUL  = 4'd3,
    OP_AND  = 4'd4,
    OP_OR   = 4'd5,
    OP_XOR  = 4'd6,
    OP_MOV  = 4'd7,   // A
    OP_ADDI = 4'd8,   // A + sign-extended immediate
    OP_GENC = 4'd9,   // sign-extended immediate, needs no operand
    OP_TEQ  = 4'd10,  // 1 if A == B, else 0 (produces predicates)
    OP_TLT  = 4'd11   // 1 if A < B (signed), else 0
  } opcode_e;

  // Predicate field of an instruction.
  typedef enum logic [1:0] {PR_NONE = 2'd0, PR_FALSE = 2'd2, PR_TRUE = 2'd3} pred_e;

  typedef struct packed {
    logic        valid;
    opcode_e     op;
    pred_e       pred;   // PR_NONE, or execute only on a false / true predicate
    logic [15:0] imm;
    target_t     t0;
    target_t     t1;
  } instr_t;

  // An operand in flight on the network.
  typedef struct packed {
    target_t            dst;   // kind is TGT_NODE, TGT_PRED or TGT_REG
    logic [DATA_W-1:0]  data;
  } pkt_t;

  function automatic logic op_needs_a(opcode_e op);
    return !(op inside {OP_NOP, OP_GENC});
  endfunction

  function automatic logic op_needs_b(opcode_e op);
    return op inside {OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_TEQ, OP_TLT};
  endfunction

  // Generate-Constant instructions cannot be predicated.
  function automatic logic instr_needs_p(opcode_e op, pred_e pred);
    return (pred inside {PR_FALSE, PR_TRUE}) && (op != OP_GENC);
  endfunction

  // Register bank (column) that holds register r, and the entry inside it.
  function automatic logic [COL_W-1:0] reg_bank(logic [REG_W-1:0] r);
    return r[COL_W-1:0];
  endfunction

  function automatic logic [BIDX_W-1:0] reg_entry(logic [REG_W-1:0] r);
    return r[REG_W-1:COL_W];
  endfunction

  // Fixed shortest path, row first: move along the row to the target column,
  // then along the column. Register writes leave through the top edge of the
  // bank's column. Returns is_local=1 when the packet has arrived.
  function automatic void route(input logic [ROW_W-1:0] my_row, input logic [COL_W-1:0] my_col,
                                input target_t dst, output logic is_local, output dir_e dir);
    logic [COL_W-1:0] dcol;
    dcol     = (dst.kind == TGT_REG) ? reg_bank(dst.rnum) : dst.col;
    is_local = 1'b0;
    dir      = DIR_N;
    if (dcol > my_col)            dir = DIR_E;
    else if (dcol < my_col)       dir = DIR_W;
    else if (dst.kind == TGT_REG) dir = DIR_N;
    else if (dst.row > my_row)    dir = DIR_S;
    else if (dst.row < my_row)    dir = DIR_N;
    else                          is_local = 1'b1;
  endfunction

endpackage
