// pl_hazard_ctrl: data-hazard detection and stall/flush control of the
// pipelined core.
//
// Combinational. Two events steer the pipeline registers:
//  * Data hazard: the instruction in Execute is a load or a CSR read (its
//    result exists only after the Mem stage) and the instruction in Decode
//    reads its destination register. Fetch and Decode are stalled for one
//    cycle and a bubble is sent into Execute; the consumer then picks the
//    value up from WB through the bypass.
//  * Branch correction: the JoB register in the Mem stage holds a redirect
//    (a branch or jump whose predicted next PC was wrong). Fetch restarts at
//    the corrected address and the instructions in Decode and Execute, both
//    fetched down the wrong path, are flushed. A correction overrides a stall.
// Outputs: `stall` holds the PC, the program memory output and the F/D
// register; `flush_d` loads a bubble into the D/E register; `flush_e` loads a
// bubble into the E/M register; `hazard` reports a load-use stall.
// The stall/flush structure follows the pipeline drawing (data hazard ->
// stall of Fetch and Decode, branch correction -> flush); treating CSR reads
// like loads follows from the CSR register being drawn in the Mem stage.
module pl_hazard_ctrl (
  input  logic       d_valid,
  input  logic [4:0] d_rs1,
  input  logic [4:0] d_rs2,
  input  logic       d_uses_rs1,
  input  logic       d_uses_rs2,
  input  logic       e_valid,
  input  logic       e_late_result,
  input  logic [4:0] e_rd,
  input  logic       m_correction,
  output logic       hazard,
  output logic       stall,
  output logic       flush_d,
  output logic       flush_e
);
  always_comb begin
    hazard = d_valid && e_valid && e_late_result && e_rd != 5'd0 &&
             ((d_uses_rs1 && d_rs1 == e_rd) || (d_uses_rs2 && d_rs2 == e_rd)) &&
             !m_correction;
    stall   = hazard;
    flush_d = hazard || m_correction;
    flush_e = m_correction;
  end
endmodule
