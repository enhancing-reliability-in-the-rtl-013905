// tb_instruction_buffer: self-checking test of instruction_buffer.
// Writes random instructions to random slots, keeps a copy here, and checks
// the read port and the per-slot valid / needs-A / needs-B / needs-predicate
// flags against flags derived here from the opcode and predicate field.
module tb_instruction_buffer;
  import trips_pkg::*;

  localparam int SLOTS = NODE_SLOTS;
  localparam int SW = $clog2(SLOTS);

  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [SW-1:0] wr_slot, rd_slot;
  instr_t wr_instr, rd_instr;
  logic [SLOTS-1:0] slot_valid, need_a, need_b, need_p;
  int checks = 0, failures = 0;

  instruction_buffer #(.SLOTS(SLOTS)) dut (.*);
  always #5 clk = ~clk;

  instr_t m [SLOTS];
  logic [SLOTS-1:0] m_v;

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
    bit ea, eb, ep;
    wr_en = 0; wr_slot = '0; rd_slot = '0; wr_instr = '0; m_v = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check(slot_valid == '0, "empty after reset");
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      wr_en    = ($urandom % 2) == 0;
      wr_slot  = SW'($urandom);
      wr_instr = instr_t'({$urandom, $urandom});
      wr_instr.op = opcode_e'($urandom % 12);
      rd_slot  = SW'($urandom);
      #1;
      check(slot_valid == m_v, "slot_valid");
      for (int s = 0; s < SLOTS; s++) if (m_v[s]) begin
        case (m[s].op)
          OP_NOP, OP_GENC: ea = 0;
          default: ea = 1;
        endcase
        eb = m[s].op inside {OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_TEQ, OP_TLT};
        ep = (m[s].pred == PR_TRUE || m[s].pred == PR_FALSE) && m[s].op != OP_GENC;
        check(need_a[s] == ea && need_b[s] == eb && need_p[s] == ep, "need flags");
      end
      if (m_v[rd_slot]) check(rd_instr == m[rd_slot], "read data");
      @(posedge clk);
      if (wr_en) begin m[wr_slot] = wr_instr; m_v[wr_slot] = wr_instr.valid; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
