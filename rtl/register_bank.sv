// register_bank: the register bank above one column of the grid.
//
// Holds 32 of the core's 128 32-bit registers: register r lives in bank
// r % 4, entry r / 4 (the interleave is this design's choice; the document
// gives one 32-entry bank per column). Register values enter the grid through
// the top-row node of the bank's column and results leave the grid the same
// way, as the document describes.
//
// Read side: a request (rd_valid/rd_ready, entry rd_idx, operand target
// rd_tgt) is accepted when the output register is free or being emptied; the
// next cycle the value is offered to the top-row node as a packet
// (out_valid/out_pkt/out_ready). Write side: a packet from the top-row node is
// always accepted and written at the end of the cycle; wb_* reports it. The
// init port lets a host preload registers; a network write to the same entry
// in the same cycle wins. dbg_idx/dbg_data read any entry combinationally.
module register_bank
  import trips_pkg::*;
#(
  parameter int ENTRIES = BANK_ENTRIES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       rd_valid,
  output logic                       rd_ready,
  input  logic [$clog2(ENTRIES)-1:0] rd_idx,
  input  target_t                    rd_tgt,
  output logic                       out_valid,
  output pkt_t                       out_pkt,
  input  logic                       out_ready,
  input  logic                       in_valid,
  input  pkt_t                       in_pkt,
  output logic                       in_ready,
  output logic                       wb_valid,
  output logic [REG_W-1:0]           wb_reg,
  output logic [DATA_W-1:0]          wb_data,
  input  logic                       init_we,
  input  logic [$clog2(ENTRIES)-1:0] init_idx,
  input  logic [DATA_W-1:0]          init_data,
  input  logic [$clog2(ENTRIES)-1:0] dbg_idx,
  output logic [DATA_W-1:0]          dbg_data
);
  localparam int IW = $clog2(ENTRIES);

  logic [DATA_W-1:0] regs [ENTRIES];
  logic [IW-1:0]     in_idx;

  assign in_ready = 1'b1;
  assign in_idx   = IW'(in_pkt.dst.rnum >> COL_W);
  assign rd_ready = !out_valid || out_ready;
  assign dbg_data = regs[dbg_idx];
  assign wb_valid = in_valid;
  assign wb_reg   = in_pkt.dst.rnum;
  assign wb_data  = in_pkt.data;

  always_ff @(posedge clk) begin
    if (init_we) regs[init_idx] <= init_data;
    if (in_valid) regs[in_idx] <= in_pkt.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else if (rd_valid && rd_ready) begin
      out_valid <= 1'b1;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_valid && rd_ready) begin
      out_pkt.dst  <= rd_tgt;
      out_pkt.data <= regs[rd_idx];
    end
  end
endmodule
