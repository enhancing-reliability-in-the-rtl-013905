// tb_node_alu: self-checking test of node_alu.
// Drives every opcode with random operands and immediates and compares the
// result with arithmetic done here on 64-bit integers and truncated.
module tb_node_alu;
  import trips_pkg::*;

  opcode_e           op;
  logic [DATA_W-1:0] a, b, y;
  logic [15:0]       imm;
  int checks = 0, failures = 0;

  node_alu dut (.op, .a, .b, .imm, .y);

  function automatic logic [31:0] model(int o, longint unsigned x, longint unsigned z, int signed i);
    longint unsigned r;
    case (o)
      1: r = x + z;
      2: r = x - z;
      3: r = x * z;
      4: r = x & z;
      5: r = x | z;
      6: r = x ^ z;
      7: r = x;
      8: r = x + longint'(i);
      9: r = longint'(i);
      10: r = (x[31:0] == z[31:0]) ? 1 : 0;
      11: r = (int'(x[31:0]) < int'(z[31:0])) ? 1 : 0;
      default: r = 0;
    endcase
    return r[31:0];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2400; n++) begin
      op  = opcode_e'(n % 12);
      a   = $urandom;
      b   = (n % 7 == 0) ? 32'hFFFF_FFFF : (n % 5 == 0) ? a : $urandom;
      imm = 16'($urandom);
      #1;
      checks++;
      if (y !== model(n % 12, a, b, int'(signed'(imm)))) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%h b=%h imm=%h y=%h", n % 12, a, b, imm, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
