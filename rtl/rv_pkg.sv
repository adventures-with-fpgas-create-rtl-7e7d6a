// rv_pkg: types and helpers shared by the two RV32I processors.
//
// Holds the RV32I major opcodes (bits [6:2] of an instruction word), the
// immediate decoders for the five immediate formats, the branch-predictor
// mode selector of the pipelined core and the event record through which that
// core reports what its pipeline control did in a cycle (stall, bypass,
// prediction, correction). The opcode and immediate layouts are those of the
// RISC-V RV32I base ISA; the predictor modes are the ones compared in the
// pipelined core's performance figures (none, static BTFNT, gshare, each with
// or without a return address stack).
package rv_pkg;

  // Major opcodes, instruction bits [6:2] (bits [1:0] are always 2'b11).
  typedef enum logic [4:0] {
    OPC_LOAD   = 5'b00000,
    OPC_FENCE  = 5'b00011,
    OPC_OPIMM  = 5'b00100,
    OPC_AUIPC  = 5'b00101,
    OPC_STORE  = 5'b01000,
    OPC_OP     = 5'b01100,
    OPC_LUI    = 5'b01101,
    OPC_BRANCH = 5'b11000,
    OPC_JALR   = 5'b11001,
    OPC_JAL    = 5'b11011,
    OPC_SYSTEM = 5'b11100
  } opcode_e;

  // Conditional branch predictor of the pipelined core.
  typedef enum logic [1:0] {
    BP_NONE   = 2'd0,  // always predict fall-through, correct in Execute
    BP_BTFNT  = 2'd1,  // backward taken, forward not taken (static)
    BP_GSHARE = 2'd2   // 2-bit counters indexed by PC xor global history
  } bp_mode_e;

  // One cycle of pipeline-control activity, for performance counting.
  typedef struct packed {
    logic retire;        // an instruction left the WB stage
    logic load_stall;    // Decode held because of a load/CSR-use hazard
    logic fwd_m_rs1;     // rs1 operand taken from the Mem stage
    logic fwd_m_rs2;
    logic fwd_w_rs1;     // rs1 operand taken from the WB stage
    logic fwd_w_rs2;
    logic branch;        // a conditional branch resolved in Execute
    logic branch_miss;   // ... and its prediction was wrong
    logic jalr;          // a JALR resolved in Execute
    logic jalr_miss;     // ... and its predicted target was wrong
    logic pred_taken;    // Decode redirected fetch to a predicted target
    logic ras_pop;       // Decode predicted a return from the stack
    logic correction;    // fetch redirected by the JoB register, D and E flushed
    logic muldiv;        // an M-extension instruction executed
  } pl_events_t;

  function automatic logic [31:0] imm_i(input logic [31:0] ins);
    return {{21{ins[31]}}, ins[30:20]};
  endfunction

  function automatic logic [31:0] imm_s(input logic [31:0] ins);
    return {{21{ins[31]}}, ins[30:25], ins[11:7]};
  endfunction

  function automatic logic [31:0] imm_b(input logic [31:0] ins);
    return {{20{ins[31]}}, ins[7], ins[30:25], ins[11:8], 1'b0};
  endfunction

  function automatic logic [31:0] imm_u(input logic [31:0] ins);
    return {ins[31:12], 12'b0};
  endfunction

  function automatic logic [31:0] imm_j(input logic [31:0] ins);
    return {{12{ins[31]}}, ins[19:12], ins[20], ins[30:21], 1'b0};
  endfunction

  function automatic opcode_e opcode(input logic [31:0] ins);
    return opcode_e'(ins[6:2]);
  endfunction

  // x1 and x5 are the link registers of the standard calling convention.
  function automatic logic is_link(input logic [4:0] r);
    return r == 5'd1 || r == 5'd5;
  endfunction

endpackage
