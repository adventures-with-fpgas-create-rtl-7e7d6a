// tb_pl_alu: self-checking testbench of the pipelined core's ALU.
//
// Drives random and corner-case operand pairs through every funct3 with and
// without the alternate bit and compares `result` and `br_taken` with values
// computed here from the RV32I definitions using SystemVerilog's own signed
// and unsigned operators. Combinational block: each vector is checked after
// a 1 ns settle time. A watchdog bounds the run.
module tb_pl_alu;
  logic [31:0] in1, in2, result;
  logic [2:0]  funct3;
  logic        alt, br_taken;
  int checks = 0, failures = 0;

  pl_alu dut (.in1, .in2, .funct3, .alt, .result, .br_taken);

  function automatic logic [31:0] ref_alu(input logic [31:0] a, b, input logic [2:0] f, input logic s);
    case (f)
      3'b000: return s ? a - b : a + b;
      3'b001: return a << b[4:0];
      3'b010: return ($signed(a) < $signed(b)) ? 1 : 0;
      3'b011: return (a < b) ? 1 : 0;
      3'b100: return a ^ b;
      3'b101: return s ? 32'($signed(a) >>> b[4:0]) : a >> b[4:0];
      3'b110: return a | b;
      default: return a & b;
    endcase
  endfunction

  function automatic logic ref_br(input logic [31:0] a, b, input logic [2:0] f);
    case (f)
      3'b000: return a == b;
      3'b001: return a != b;
      3'b100: return $signed(a) < $signed(b);
      3'b101: return $signed(a) >= $signed(b);
      3'b110: return a < b;
      3'b111: return a >= b;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1F};
    for (int i = 0; i < 20000; i++) begin
      in1 = (i % 4 == 0) ? corners[$urandom_range(0, 5)] : $urandom;
      in2 = (i % 3 == 0) ? corners[$urandom_range(0, 5)] : (i % 5 == 0 ? in1 : $urandom);
      funct3 = 3'($urandom);
      alt = 1'($urandom);
      #1;
      checks++;
      if (result !== ref_alu(in1, in2, funct3, alt)) begin
        failures++;
        if (failures < 10) $display("FAIL: f3=%0d alt=%0d %h %h -> %h", funct3, alt, in1, in2, result);
      end
      checks++;
      if (br_taken !== ref_br(in1, in2, funct3)) begin
        failures++;
        if (failures < 10) $display("FAIL: branch f3=%0d %h %h -> %0d", funct3, in1, in2, br_taken);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
