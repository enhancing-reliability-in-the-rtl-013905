// tb_register_bank: self-checking test of register_bank.
// Preloads all entries, then runs random read requests against random
// readiness of the top-row node and random write-backs from the grid. A
// reference copy of the registers predicts each packet the bank injects
// (value and operand target, in request order) and each debug read.
module tb_register_bank;
  import trips_pkg::*;

  localparam int ENTRIES = BANK_ENTRIES;
  localparam int IW = $clog2(ENTRIES);

  logic clk = 0, rst_n = 0;
  logic rd_valid, rd_ready, out_valid, out_ready, in_valid, in_ready, wb_valid, init_we;
  logic [IW-1:0] rd_idx, init_idx, dbg_idx;
  target_t rd_tgt;
  pkt_t out_pkt, in_pkt;
  logic [REG_W-1:0] wb_reg;
  logic [DATA_W-1:0] wb_data, init_data, dbg_data;
  int checks = 0, failures = 0;

  register_bank #(.ENTRIES(ENTRIES)) dut (.*);
  always #5 clk = ~clk;

  logic [DATA_W-1:0] m [ENTRIES];
  pkt_t exp_q [$];
  int reads = 0, stalls = 0;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_valid = 0; out_ready = 0; in_valid = 0; init_we = 0;
    rd_idx = '0; init_idx = '0; dbg_idx = '0; rd_tgt = '0; in_pkt = '0; init_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < ENTRIES; i++) begin
      @(negedge clk);
      init_we = 1; init_idx = IW'(i); init_data = $urandom; m[i] = init_data;
    end
    @(negedge clk);
    init_we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      rd_valid  = $urandom % 2;
      rd_idx    = IW'($urandom);
      rd_tgt    = target_t'($urandom);
      out_ready = ($urandom % 3) != 0;
      in_valid  = ($urandom % 4) == 0;
      in_pkt    = pkt_t'({$urandom, $urandom});
      in_pkt.dst.kind = TGT_REG;
      in_pkt.dst.rnum[COL_W-1:0] = '0;     // bank 0
      dbg_idx   = IW'($urandom);
      #1;
      check(in_ready, "write side always ready");
      check(dbg_data == m[dbg_idx], "debug read");
      check(wb_valid == in_valid && (!in_valid || (wb_reg == in_pkt.dst.rnum && wb_data == in_pkt.data)), "write-back report");
      if (out_valid) begin
        check(exp_q.size() > 0 && out_pkt == exp_q[0], "injected packet");
        if (!out_ready) stalls++;
      end
      check(rd_ready == (!out_valid || out_ready), "read ready");
      @(posedge clk);
      if (out_valid && out_ready) void'(exp_q.pop_front());
      if (rd_valid && rd_ready) begin exp_q.push_back('{dst: rd_tgt, data: m[rd_idx]}); reads++; end
      if (in_valid) m[in_pkt.dst.rnum >> COL_W] = in_pkt.data;
    end
    check(reads > 100 && stalls > 10, "reads and back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
