// tb_pl_hazard_ctrl: self-checking testbench of the hazard and pipeline
// control unit.
//
// Walks random combinations of Decode and Execute contents and correction
// requests; the expected stall/flush outputs are worked out here: a stall
// (with a bubble into Execute) exactly when a valid load/CSR in Execute
// writes a non-zero register that the valid Decode instruction reads and no
// correction is pending; on a correction, flush of Decode and Execute and no
// stall. A watchdog bounds the run.
module tb_pl_hazard_ctrl;
  logic       d_valid, d_uses_rs1, d_uses_rs2, e_valid, e_late_result, m_correction;
  logic [4:0] d_rs1, d_rs2, e_rd;
  logic       hazard, stall, flush_d, flush_e;
  logic       exp_hz;
  int checks = 0, failures = 0, n_hz = 0;

  pl_hazard_ctrl dut (.*);

  initial begin
    for (int i = 0; i < 20000; i++) begin
      {d_valid, d_uses_rs1, d_uses_rs2, e_valid, e_late_result} = 5'($urandom);
      m_correction = ($urandom_range(0, 3) == 0);
      d_rs1 = 5'($urandom_range(0, 3)); d_rs2 = 5'($urandom_range(0, 3)); e_rd = 5'($urandom_range(0, 3));
      #1;
      exp_hz = d_valid && e_valid && e_late_result && e_rd != 0 && !m_correction &&
               ((d_uses_rs1 && d_rs1 == e_rd) || (d_uses_rs2 && d_rs2 == e_rd));
      n_hz += exp_hz;
      checks++;
      if (hazard !== exp_hz || stall !== exp_hz || flush_d !== (exp_hz || m_correction) ||
          flush_e !== m_correction) begin
        failures++;
        if (failures < 10) $display("FAIL: vector %0d", i);
      end
    end
    checks++;
    if (n_hz == 0) failures++;
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
