// operand_router: output stage of a grid node.
//
// Candidates are the heads of the four hop-queue lanes (operands passing
// through, already sorted by the direction they leave in) and the node's two
// result registers (an instruction names up to two targets). A result's
// direction is given by the fixed shortest path of
// trips_pkg::route: along the row first, then along the column, register
// writes leaving through the top of the bank's column. This matches the
// document's rule that a node always uses the same shortest path and its
// hop example, which goes along the row and then up the column. Per direction
// the router offers one packet per cycle: the hop-queue lane of that direction
// first, then result 0, then result 1 (this priority is this design's choice). A result
// that targets the node itself goes out on the local port and is always
// taken. Offers never depend on out_ready (valid-before-ready handshake); a
// packet is gone when its link's out_ready is high. Combinational.
module operand_router
  import trips_pkg::*;
#(
  parameter int ROW = 0,
  parameter int COL = 0
) (
  input  logic [3:0] hq_valid,   // head of the lane leaving in direction d
  input  pkt_t       hq_pkt [4],
  input  logic [1:0] res_valid,
  input  pkt_t       res_pkt [2],
  input  logic [3:0] out_ready,
  output logic [3:0] out_valid,
  output pkt_t       out_pkt [4],
  output logic [3:0] hq_deq,
  output logic [1:0] res_done,
  output logic       local_valid,
  output pkt_t       local_pkt
);
  logic [ROW_W-1:0] my_row;
  logic [COL_W-1:0] my_col;
  assign my_row = ROW_W'(ROW);
  assign my_col = COL_W'(COL);

  logic [1:0] r_local, r_sel;
  dir_e       r_dir [2];

  always_comb begin
    for (int k = 0; k < 2; k++) route(my_row, my_col, res_pkt[k].dst, r_local[k], r_dir[k]);

    out_valid = hq_valid;
    for (int d = 0; d < 4; d++) out_pkt[d] = hq_pkt[d];
    r_sel = '0;
    for (int k = 0; k < 2; k++) begin
      if (res_valid[k] && !r_local[k] && !out_valid[r_dir[k]]) begin
        out_valid[r_dir[k]] = 1'b1;
        out_pkt[r_dir[k]]   = res_pkt[k];
        r_sel[k]            = 1'b1;
      end
    end

    local_valid = 1'b0;
    local_pkt   = res_pkt[0];
    if (res_valid[0] && r_local[0]) begin
      local_valid = 1'b1;
      local_pkt   = res_pkt[0];
    end else if (res_valid[1] && r_local[1]) begin
      local_valid = 1'b1;
      local_pkt   = res_pkt[1];
    end

  end

  // Completion depends on out_ready; kept apart from the offers above so
  // that no offer depends on a neighbour's readiness.
  always_comb begin
    hq_deq = hq_valid & out_ready;
    for (int k = 0; k < 2; k++) res_done[k] = r_sel[k] && out_ready[r_dir[k]];
    if (res_valid[0] && r_local[0])      res_done[0] = 1'b1;
    else if (res_valid[1] && r_local[1]) res_done[1] = 1'b1;
  end
endmodule
