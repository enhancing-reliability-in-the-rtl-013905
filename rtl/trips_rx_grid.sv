// trips_rx_grid: execution array of one TRIPS-style core with RX-morph hop
// queues.
//
// A 4x4 array of grid_node processing elements is joined by a mesh of
// point-to-point operand links (one link each way between neighbours). Above
// each column sits a register_bank: register reads enter the array through
// the top-row node of the bank's column, and results written to registers
// leave through it. The east edge of the right column is where the data-cache
// banks attach; since no data cache is built here, those links are brought
// out as ports (dc_*). Instructions are written straight into a node's slot
// through the il_* port, standing in for the instruction-cache network that
// reaches every node.
//
// Frames: a free-running timer divides time into frames of FRAME_CYCLES
// clock cycles and pulses frame_start in the first cycle of each. A node whose
// hq_en bit is set runs in the reliable mode (RX-morph): operands passing
// through it wait in its hop queue, and its new results wait, until the next
// frame, so every operand crosses at most one link per frame. With the bit
// clear (X-morph) operands move one link per cycle as soon as links are free.
// All nodes of one configuration normally share the same setting. flush clears
// every node's operands and fired marks (block commit or abort) while keeping
// the loaded instructions.
//
// Geometry, slot count, register organisation and the hop-queue mechanism
// follow the document; FRAME_CYCLES, HQ_DEPTH, the link handshake and the
// instruction format are this design's choices.
module trips_rx_grid
  import trips_pkg::*;
#(
  parameter int FRAME_CYCLES = 8,
  parameter int HQ_DEPTH     = 4
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [GRID_ROWS-1:0][GRID_COLS-1:0]  hq_en,
  input  logic                                 flush,
  // instruction load
  input  logic                                 il_valid,
  input  logic [ROW_W-1:0]                     il_row,
  input  logic [COL_W-1:0]                     il_col,
  input  logic [SLOT_W-1:0]                    il_slot,
  input  instr_t                               il_instr,
  // register read requests, one port per bank (rr_reg must belong to that bank)
  input  logic [GRID_COLS-1:0]                 rr_valid,
  output logic [GRID_COLS-1:0]                 rr_ready,
  input  logic [REG_W-1:0]                     rr_reg [GRID_COLS],
  input  target_t                              rr_tgt [GRID_COLS],
  // register preload and inspection
  input  logic                                 ri_we,
  input  logic [REG_W-1:0]                     ri_reg,
  input  logic [DATA_W-1:0]                    ri_data,
  input  logic [REG_W-1:0]                     dbg_reg,
  output logic [DATA_W-1:0]                    dbg_data,
  // register write-back events
  output logic [GRID_COLS-1:0]                 wb_valid,
  output logic [REG_W-1:0]                     wb_reg [GRID_COLS],
  output logic [DATA_W-1:0]                    wb_data [GRID_COLS],
  // east edge (data-cache side) links, one per row
  output logic [GRID_ROWS-1:0]                 dc_out_valid,
  output pkt_t                                 dc_out_pkt [GRID_ROWS],
  input  logic [GRID_ROWS-1:0]                 dc_out_ready,
  input  logic [GRID_ROWS-1:0]                 dc_in_valid,
  input  pkt_t                                 dc_in_pkt [GRID_ROWS],
  output logic [GRID_ROWS-1:0]                 dc_in_ready,
  // frame timing
  output logic                                 frame_start,
  output logic [31:0]                          frame_count,
  // per-node status, one bit per node each cycle
  output logic [GRID_ROWS-1:0][GRID_COLS-1:0]  st_issue,        // an instruction issued
  output logic [GRID_ROWS-1:0][GRID_COLS-1:0]  st_hq_enq,       // an operand entered the hop path
  output logic [GRID_ROWS-1:0][GRID_COLS-1:0]  st_hq_wait,      // a hop-queue head waits for the next frame
  output logic [GRID_ROWS-1:0][GRID_COLS-1:0]  st_res_wait,     // a result waits for the next frame
  output logic [GRID_ROWS-1:0][GRID_COLS-1:0]  st_issue_stall,  // a ready instruction waits for result registers
  output logic [GRID_ROWS-1:0][GRID_COLS-1:0]  st_nullify       // a predicated instruction was cancelled
);
  localparam int R = GRID_ROWS;
  localparam int C = GRID_COLS;

  // ---------------- frame timer ----------------
  logic [$clog2(FRAME_CYCLES+1)-1:0] cyc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc         <= '0;
      frame_count <= '0;
    end else if (cyc == ($clog2(FRAME_CYCLES+1))'(FRAME_CYCLES - 1)) begin
      cyc         <= '0;
      frame_count <= frame_count + 1;
    end else begin
      cyc <= cyc + 1'b1;
    end
  end
  assign frame_start = (cyc == '0);

  // ---------------- node link nets ----------------
  logic [3:0] n_in_valid  [R][C];
  logic [3:0] n_in_ready  [R][C];
  pkt_t       n_in_pkt    [R][C][4];
  logic [3:0] n_out_valid [R][C];
  logic [3:0] n_out_ready [R][C];
  pkt_t       n_out_pkt   [R][C][4];

  // register bank nets
  logic [C-1:0] b_out_valid, b_out_ready, b_in_ready;
  pkt_t         b_out_pkt [C];
  logic [DATA_W-1:0] b_dbg [C];

  // hop-queue occupancy per node (observed by testbenches)
  logic [$clog2(4*HQ_DEPTH+1)-1:0] st_hq_count [R][C];

  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar c = 0; c < C; c++) begin : g_col
      // inputs
      assign n_in_valid[r][c][DIR_N] = (r == 0)     ? b_out_valid[c]        : n_out_valid[(r == 0) ? 0 : r-1][c][DIR_S];
      assign n_in_pkt[r][c][DIR_N]   = (r == 0)     ? b_out_pkt[c]          : n_out_pkt[(r == 0) ? 0 : r-1][c][DIR_S];
      assign n_in_valid[r][c][DIR_S] = (r == R-1)   ? 1'b0                  : n_out_valid[(r == R-1) ? r : r+1][c][DIR_N];
      assign n_in_pkt[r][c][DIR_S]   = n_out_pkt[(r == R-1) ? r : r+1][c][DIR_N];
      assign n_in_valid[r][c][DIR_W] = (c == 0)     ? 1'b0                  : n_out_valid[r][(c == 0) ? 0 : c-1][DIR_E];
      assign n_in_pkt[r][c][DIR_W]   = n_out_pkt[r][(c == 0) ? 0 : c-1][DIR_E];
      assign n_in_valid[r][c][DIR_E] = (c == C-1)   ? dc_in_valid[r]        : n_out_valid[r][(c == C-1) ? c : c+1][DIR_W];
      assign n_in_pkt[r][c][DIR_E]   = (c == C-1)   ? dc_in_pkt[r]          : n_out_pkt[r][(c == C-1) ? c : c+1][DIR_W];
      // readiness of the receivers of this node's outputs
      assign n_out_ready[r][c][DIR_N] = (r == 0)   ? b_in_ready[c]   : n_in_ready[(r == 0) ? 0 : r-1][c][DIR_S];
      assign n_out_ready[r][c][DIR_S] = (r == R-1) ? 1'b0            : n_in_ready[(r == R-1) ? r : r+1][c][DIR_N];
      assign n_out_ready[r][c][DIR_W] = (c == 0)   ? 1'b0            : n_in_ready[r][(c == 0) ? 0 : c-1][DIR_E];
      assign n_out_ready[r][c][DIR_E] = (c == C-1) ? dc_out_ready[r] : n_in_ready[r][(c == C-1) ? c : c+1][DIR_W];

      grid_node #(.ROW(r), .COL(c), .SLOTS(NODE_SLOTS), .HQ_DEPTH(HQ_DEPTH)) u_node (
        .clk, .rst_n,
        .hq_en(hq_en[r][c]), .frame_start, .flush,
        .il_en(il_valid && il_row == ROW_W'(r) && il_col == COL_W'(c)),
        .il_slot, .il_instr,
        .in_valid(n_in_valid[r][c]), .in_pkt(n_in_pkt[r][c]), .in_ready(n_in_ready[r][c]),
        .out_valid(n_out_valid[r][c]), .out_pkt(n_out_pkt[r][c]), .out_ready(n_out_ready[r][c]),
        .issue(st_issue[r][c]), .hq_enq(st_hq_enq[r][c]), .hq_waiting(st_hq_wait[r][c]),
        .res_wait(st_res_wait[r][c]), .issue_stall(st_issue_stall[r][c]),
        .nullify(st_nullify[r][c]),
        .hq_count(st_hq_count[r][c])
      );
    end
    assign dc_out_valid[r] = n_out_valid[r][C-1][DIR_E];
    assign dc_out_pkt[r]   = n_out_pkt[r][C-1][DIR_E];
    assign dc_in_ready[r]  = n_in_ready[r][C-1][DIR_E];
  end

  for (genvar c = 0; c < C; c++) begin : g_bank
    assign b_out_ready[c] = n_in_ready[0][c][DIR_N];
    register_bank #(.ENTRIES(BANK_ENTRIES)) u_bank (
      .clk, .rst_n,
      .rd_valid(rr_valid[c]), .rd_ready(rr_ready[c]),
      .rd_idx(reg_entry(rr_reg[c])), .rd_tgt(rr_tgt[c]),
      .out_valid(b_out_valid[c]), .out_pkt(b_out_pkt[c]), .out_ready(b_out_ready[c]),
      .in_valid(n_out_valid[0][c][DIR_N]), .in_pkt(n_out_pkt[0][c][DIR_N]), .in_ready(b_in_ready[c]),
      .wb_valid(wb_valid[c]), .wb_reg(wb_reg[c]), .wb_data(wb_data[c]),
      .init_we(ri_we && reg_bank(ri_reg) == COL_W'(c)), .init_idx(reg_entry(ri_reg)), .init_data(ri_data),
      .dbg_idx(reg_entry(dbg_reg)), .dbg_data(b_dbg[c])
    );
  end

  assign dbg_data = b_dbg[reg_bank(dbg_reg)];

  for (genvar c = 0; c < C; c++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     rr_valid[c] |-> reg_bank(rr_reg[c]) == COL_W'(c))
      else $error("trips_rx_grid: register read presented to the wrong bank");
  end
endmodule
