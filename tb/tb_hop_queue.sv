// tb_hop_queue: self-checking test of hop_queue.
// A reference queue kept here predicts full, head_valid, head_held and the
// head packet every cycle while random pushes and pops run in X-morph
// (en=0, head may leave the cycle after it was written) and in RX-morph
// (en=1, an entry may leave only from the first cycle of the next frame).
// It also checks that in RX-morph every entry stays at least until the next
// frame start and that one entry pushed in X-morph leaves one cycle later.
module tb_hop_queue;
  import trips_pkg::*;

  localparam int DEPTH = 4;
  localparam int FRAME = 5;

  logic clk = 0, rst_n = 0;
  logic en, frame_start, enq_valid, full, head_valid, head_held, deq;
  pkt_t enq_pkt, head_pkt;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  int cyc = 0;

  hop_queue #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { pkt_t p; bit held; } ent_t;
  ent_t q[$];
  int held_events = 0, x_pass = 0, full_seen = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_hv;
    en = 0; frame_start = 0; enq_valid = 0; deq = 0; enq_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      cyc = n;
      en          = (n / 1000) % 2 == 1;
      frame_start = (n % FRAME) == 0;
      enq_valid   = ($urandom % 3) != 0;
      enq_pkt     = pkt_t'({$urandom, $urandom});
      #1;
      exp_hv = q.size() > 0 && (!en || !q[0].held || frame_start);
      deq = exp_hv && ($urandom % 4 != 0);
      #1;
      check(full == (q.size() == DEPTH), "full flag");
      check(count == q.size(), "count");
      check(head_valid == exp_hv, "head_valid");
      check(head_held == (q.size() > 0 && !exp_hv), "head_held");
      if (q.size() > 0) check(head_pkt == q[0].p, "head packet order");
      if (head_held) held_events++;
      if (full) full_seen++;
      @(posedge clk);
      if (frame_start) foreach (q[i]) q[i].held = 0;
      if (deq && exp_hv) void'(q.pop_front());
      if (enq_valid && q.size() < DEPTH + ((deq && exp_hv) ? 1 : 0) && !full) q.push_back('{enq_pkt, 1'b1});
    end
    // directed: X-morph, one entry leaves the next cycle
    @(negedge clk);
    en = 0; enq_valid = 0; deq = 1; frame_start = 0;
    #1;
    while (count != 0) begin @(negedge clk); #1; end
    deq = 0; enq_valid = 1; enq_pkt = pkt_t'(64'h1234);
    @(negedge clk);
    enq_valid = 0;
    #1 check(head_valid && head_pkt == pkt_t'(64'h1234), "X-morph entry eligible one cycle after push");
    deq = 1;
    @(negedge clk);
    deq = 0;
    // directed: RX-morph, entry waits through the rest of the frame
    en = 1; enq_valid = 1; enq_pkt = pkt_t'(64'h55);
    @(negedge clk);
    enq_valid = 0;
    for (int k = 0; k < 3; k++) begin
      #1 check(!head_valid && head_held, "RX-morph entry held within its frame");
      @(negedge clk);
    end
    frame_start = 1;
    #1 check(head_valid && head_pkt == pkt_t'(64'h55), "RX-morph entry leaves at next frame start");
    check(held_events > 0 && full_seen > 0, "hold and full both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
