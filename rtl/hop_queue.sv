// hop_queue: first-come first-served queue on a node's hop path (RX-morph).
//
// Operands that only pass through a node are pushed here by the node
// controller and popped by the operand router, strictly in arrival order
// (only the head may leave). With en=1 (RX-morph) every entry is marked held
// when it is written, and the head may leave only once a new frame has begun
// (frame_start is high in the first cycle of each frame), so an operand
// crosses at most one inter-node link per frame. With en=0 (X-morph) the hold
// is ignored and the head may leave the cycle after it was written; the
// storage then serves only as the router's ordinary elastic buffer. The
// FCFS order and the enable come from the document; the depth, the hold bit
// and the use of the storage in X-morph are this design's choices.
//
// Interface: push when enq_valid && !full; head_valid/head_pkt show an
// eligible head; deq pops it. One push and one pop per cycle.
module hop_queue
  import trips_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,           // hop queue enabled (RX-morph)
  input  logic frame_start,  // first cycle of a frame
  input  logic enq_valid,
  input  pkt_t enq_pkt,
  output logic full,
  output logic head_valid,
  output pkt_t head_pkt,
  output logic head_held,    // a head entry exists but must wait for the next frame
  input  logic deq,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  pkt_t             mem  [DEPTH];
  logic [DEPTH-1:0] held;
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic             do_enq, do_deq;
  logic             eligible;

  assign full     = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign eligible = !en || !held[rd_ptr] || frame_start;
  assign head_valid = (count != '0) && eligible;
  assign head_held  = (count != '0) && !eligible;
  assign head_pkt   = mem[rd_ptr];
  assign do_enq     = enq_valid && !full;
  assign do_deq     = deq && head_valid;

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      held   <= '0;
    end else begin
      if (frame_start) held <= '0;
      if (do_enq) begin
        mem[wr_ptr]  <= enq_pkt;
        held[wr_ptr] <= 1'b1;
        wr_ptr       <= nxt(wr_ptr);
      end
      if (do_deq) rd_ptr <= nxt(rd_ptr);
      count <= count + CW'(do_enq) - CW'(do_deq);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) deq |-> head_valid)
    else $error("hop_queue: pop without an eligible head");
endmodule
