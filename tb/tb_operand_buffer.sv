// tb_operand_buffer: self-checking test of operand_buffer.
// Random writes on both ports, consume-clears, load-clears and flushes are
// applied to the block and to a reference array kept here; every cycle the
// full valid vector and the value at a random slot are compared.
module tb_operand_buffer;
  import trips_pkg::*;

  localparam int SLOTS = NODE_SLOTS;
  localparam int SW = $clog2(SLOTS);

  logic clk = 0, rst_n = 0;
  logic flush, wr0_en, wr1_en, clr_en, clr2_en;
  logic [SW-1:0] wr0_slot, wr1_slot, clr_slot, clr2_slot, rd_slot;
  logic [DATA_W-1:0] wr0_data, wr1_data, rd_data;
  logic [SLOTS-1:0] valid;
  int checks = 0, failures = 0;

  operand_buffer #(.SLOTS(SLOTS)) dut (.*);
  always #5 clk = ~clk;

  logic [DATA_W-1:0] m_data [SLOTS];
  logic [SLOTS-1:0]  m_valid;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {flush, wr0_en, wr1_en, clr_en, clr2_en} = '0;
    {wr0_slot, wr1_slot, clr_slot, clr2_slot, rd_slot} = '0;
    wr0_data = '0; wr1_data = '0;
    m_valid = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      flush    = ($urandom % 200) == 0;
      wr0_en   = ($urandom % 2) == 0;
      wr0_slot = SW'($urandom);
      wr0_data = $urandom;
      wr1_en   = ($urandom % 3) == 0;
      wr1_slot = SW'($urandom);
      if (wr1_slot == wr0_slot) wr1_slot = wr0_slot + 1'b1;
      wr1_data = $urandom;
      clr_en   = ($urandom % 3) == 0;
      clr_slot = SW'($urandom);
      clr2_en  = ($urandom % 5) == 0;
      clr2_slot = SW'($urandom);
      rd_slot  = SW'($urandom);
      #1;
      checks++;
      if (valid != m_valid) begin
        failures++;
        if (failures < 10) $display("FAIL valid vector at %0d", n);
      end
      if (m_valid[rd_slot]) begin
        checks++;
        if (rd_data != m_data[rd_slot]) begin
          failures++;
          if (failures < 10) $display("FAIL data slot %0d", rd_slot);
        end
      end
      @(posedge clk);
      if (flush)   m_valid = '0;
      if (clr_en)  m_valid[clr_slot] = 0;
      if (clr2_en) m_valid[clr2_slot] = 0;
      if (wr0_en) begin m_valid[wr0_slot] = 1; m_data[wr0_slot] = wr0_data; end
      if (wr1_en) begin m_valid[wr1_slot] = 1; m_data[wr1_slot] = wr1_data; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
