// pl_bypass: register forwarding for the two operands of the Execute stage.
//
// Combinational. For each source register of the instruction in Execute it
// picks, in order of priority:
//   1. the result waiting in the Mem stage (E/M result register), if that
//      instruction writes the same register (M forwarding);
//   2. the value being written back by the WB stage (W forwarding);
//   3. the value read from the register file into the D/E rs1/rs2 register.
// x0 is never forwarded. The Mem-stage result is not valid for loads and CSR
// reads (their data appear only in WB); the hazard unit keeps a consumer out
// of Execute while such a producer is in Mem, so `m_wb_en` must be low for
// them or the consumer absent. The `fwd_*` flags report which source was used.
// Forwarding for rs1/rs2 from the M or W stage follows the document; the
// priority order is the usual one, nearest producer first.
module pl_bypass (
  input  logic [4:0]  rs1,
  input  logic [4:0]  rs2,
  input  logic [31:0] rf_rs1,
  input  logic [31:0] rf_rs2,
  input  logic        m_wb_en,
  input  logic [4:0]  m_rd,
  input  logic [31:0] m_result,
  input  logic        w_wb_en,
  input  logic [4:0]  w_rd,
  input  logic [31:0] w_result,
  output logic [31:0] op1,
  output logic [31:0] op2,
  output logic        fwd_m_rs1,
  output logic        fwd_m_rs2,
  output logic        fwd_w_rs1,
  output logic        fwd_w_rs2
);
  always_comb begin
    fwd_m_rs1 = m_wb_en && m_rd != 5'd0 && m_rd == rs1;
    fwd_m_rs2 = m_wb_en && m_rd != 5'd0 && m_rd == rs2;
    fwd_w_rs1 = !fwd_m_rs1 && w_wb_en && w_rd != 5'd0 && w_rd == rs1;
    fwd_w_rs2 = !fwd_m_rs2 && w_wb_en && w_rd != 5'd0 && w_rd == rs2;
    op1 = fwd_m_rs1 ? m_result : fwd_w_rs1 ? w_result : rf_rs1;
    op2 = fwd_m_rs2 ? m_result : fwd_w_rs2 ? w_result : rf_rs2;
  end
endmodule
