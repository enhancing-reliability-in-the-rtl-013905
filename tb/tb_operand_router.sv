// tb_operand_router: self-checking test of operand_router at node (1,2).
// Random hop-queue lane heads (lane d leaves in direction d) and results with
// random node or register targets are offered with random link readiness.
// Expected result directions follow the row-first rule worked out here from
// the target coordinates; expected offers follow the priority hop-queue lane,
// result 0, result 1. Checks every
// link offer, the hop-queue pop, the result completions and the local port.
module tb_operand_router;
  import trips_pkg::*;

  localparam int ROW = 1, COL = 2;

  logic [3:0] hq_valid;
  pkt_t       hq_pkt [4];
  logic [1:0] res_valid;
  pkt_t       res_pkt [2];
  logic [3:0] out_ready, out_valid;
  pkt_t       out_pkt [4];
  logic [3:0] hq_deq;
  logic       local_valid;
  logic [1:0] res_done;
  pkt_t       local_pkt;
  int checks = 0, failures = 0;
  int dir_seen [5];

  operand_router #(.ROW(ROW), .COL(COL)) dut (.*);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // 0..3 = N,E,S,W, 4 = local
  function automatic int exp_dir(pkt_t p);
    int tc, tr;
    if (p.dst.kind == TGT_REG) begin
      tc = p.dst.rnum % 4;
      if (tc > COL) return 1;
      if (tc < COL) return 3;
      return 0;
    end
    tc = p.dst.col; tr = p.dst.row;
    if (tc > COL) return 1;
    if (tc < COL) return 3;
    if (tr > ROW) return 2;
    if (tr < ROW) return 0;
    return 4;
  endfunction

  function automatic pkt_t rnd_pkt();
    pkt_t p;
    p = pkt_t'({$urandom, $urandom});
    p.dst.kind = ($urandom % 4 == 0) ? TGT_REG : TGT_NODE;
    return p;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t c [2];
    int   cd [2];
    bit   taken [4];
    bit   sel [2];
    int   loc;
    for (int n = 0; n < 5000; n++) begin
      hq_valid = 4'($urandom);
      for (int d = 0; d < 4; d++) hq_pkt[d] = rnd_pkt();
      res_valid = 2'($urandom);
      res_pkt[0] = rnd_pkt();
      res_pkt[1] = rnd_pkt();
      out_ready = 4'($urandom);
      #1;
      c[0] = res_pkt[0]; c[1] = res_pkt[1];
      for (int d = 0; d < 4; d++) begin
        taken[d] = hq_valid[d];
        if (hq_valid[d]) check(out_pkt[d] == hq_pkt[d], "lane head offered in its direction");
        check(hq_deq[d] == (hq_valid[d] && out_ready[d]), "lane pop");
      end
      for (int k = 0; k < 2; k++) begin
        cd[k] = exp_dir(c[k]);
        sel[k] = 0;
        if (res_valid[k] && cd[k] != 4 && !taken[cd[k]]) begin
          taken[cd[k]] = 1; sel[k] = 1;
          check(out_pkt[cd[k]] == c[k], "offered result");
          dir_seen[cd[k]]++;
        end
      end
      for (int d = 0; d < 4; d++) check(out_valid[d] == taken[d], "offer per direction");
      loc = -1;
      if (res_valid[0] && cd[0] == 4) loc = 0; else if (res_valid[1] && cd[1] == 4) loc = 1;
      check(local_valid == (loc >= 0), "local valid");
      if (loc >= 0) begin check(local_pkt == c[loc], "local packet"); dir_seen[4]++; end
      for (int k = 0; k < 2; k++)
        check(res_done[k] == ((sel[k] && out_ready[cd[k]]) || loc == k), "result done");
      #1;
    end
    for (int d = 0; d < 5; d++) check(dir_seen[d] > 0, "every direction exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
