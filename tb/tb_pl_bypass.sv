// tb_pl_bypass: self-checking testbench of the register forwarding unit.
//
// Random register numbers (drawn from a small set so that matches are
// frequent) and values; the expected operand is worked out here by the rule
// "Mem-stage result if it writes that register, else WB value if it writes
// it, else the register file value; never for x0", and the reported forwarding
// flags are checked too. A watchdog bounds the run.
module tb_pl_bypass;
  logic [4:0]  rs1, rs2, m_rd, w_rd;
  logic [31:0] rf_rs1, rf_rs2, m_result, w_result, op1, op2;
  logic        m_wb_en, w_wb_en, fwd_m_rs1, fwd_m_rs2, fwd_w_rs1, fwd_w_rs2;
  int checks = 0, failures = 0;

  pl_bypass dut (.*);

  function automatic logic [31:0] pick(input logic [4:0] r, input logic [31:0] rf);
    if (r != 0 && m_wb_en && m_rd == r) return m_result;
    if (r != 0 && w_wb_en && w_rd == r) return w_result;
    return rf;
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      rs1 = 5'($urandom_range(0, 3)); rs2 = 5'($urandom_range(0, 3));
      m_rd = 5'($urandom_range(0, 3)); w_rd = 5'($urandom_range(0, 3));
      m_wb_en = 1'($urandom); w_wb_en = 1'($urandom);
      rf_rs1 = $urandom; rf_rs2 = $urandom; m_result = $urandom; w_result = $urandom;
      #1;
      checks += 3;
      if (op1 !== pick(rs1, rf_rs1)) begin failures++; $display("FAIL: op1"); end
      if (op2 !== pick(rs2, rf_rs2)) begin failures++; $display("FAIL: op2"); end
      if (fwd_m_rs1 !== (rs1 != 0 && m_wb_en && m_rd == rs1) ||
          fwd_w_rs2 !== (rs2 != 0 && w_wb_en && w_rd == rs2 && !(m_wb_en && m_rd == rs2))) begin
        failures++; $display("FAIL: flags");
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
