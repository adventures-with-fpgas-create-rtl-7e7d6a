// pl_branch_predictor: next-PC prediction in the Decode stage of the
// pipelined core.
//
// Looks at the instruction in Decode (`d_instr`, at `d_pc`) and, within the
// same cycle, proposes where Fetch should continue:
//   * JAL: always taken, target d_pc + J-immediate (not in mode BP_NONE).
//   * Conditional branch: BP_BTFNT predicts taken when the offset is negative
//     (backward), not taken otherwise; BP_GSHARE reads a 2-bit saturating
//     counter indexed by d_pc[BHT_BITS+1:2] xor the global history register;
//     BP_NONE never predicts taken.
//   * JALR: if RAS_EN and the instruction is a return (rs1 is a link register
//     x1/x5, rd is not), the target is popped from the return address stack;
//     otherwise fall-through is predicted and Execute corrects it.
//   * Calls (JAL/JALR with rd = x1/x5) push d_pc + 4 when RAS_EN.
// `pred_taken` requests the redirect, `pred_next` is the predicted address of
// the next instruction (target or d_pc + 4) that travels with the instruction
// so Execute can check it. `pred_idx` is the counter index used, returned
// with the outcome through `upd_*` when Execute resolves a conditional branch
// (counters and history are updated there, with the real outcome). The stack
// moves only on `d_fire` (the instruction leaves Decode for Execute).
// The five configurations (none, BTFNT, BTFNT+RAS, gshare, gshare+RAS) are
// those whose performance the design's evaluation compares; default is the
// static predictor with return address stack. Table size, history length,
// stack depth and the return/call rules (the standard RISC-V link-register
// hints) are this design's choices.
module pl_branch_predictor
  import rv_pkg::*;
#(
  parameter bp_mode_e    MODE      = BP_BTFNT,
  parameter bit          RAS_EN    = 1'b1,
  parameter int unsigned RAS_DEPTH = 4,
  parameter int unsigned BHT_BITS  = 12
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                d_valid,
  input  logic [31:0]         d_pc,
  input  logic [31:0]         d_instr,
  input  logic                d_fire,
  output logic                pred_taken,
  output logic [31:0]         pred_target,
  output logic [31:0]         pred_next,
  output logic [BHT_BITS-1:0] pred_idx,
  output logic                ras_pop,
  input  logic                upd_valid,
  input  logic                upd_taken,
  input  logic [BHT_BITS-1:0] upd_idx
);
  localparam int unsigned SPW = (RAS_DEPTH > 1) ? $clog2(RAS_DEPTH) : 1;

  opcode_e     op;
  logic [4:0]  rd, rs1;
  logic        is_br, is_jal, is_jalr, is_call, is_ret;
  logic        br_pred;
  logic [BHT_BITS-1:0] ghr;

  logic [31:0] ras [RAS_DEPTH];
  logic [SPW-1:0] sp;

  always_comb begin
    op      = opcode(d_instr);
    rd      = d_instr[11:7];
    rs1     = d_instr[19:15];
    is_br   = d_valid && op == OPC_BRANCH;
    is_jal  = d_valid && op == OPC_JAL;
    is_jalr = d_valid && op == OPC_JALR;
    is_call = RAS_EN && (is_jal || is_jalr) && is_link(rd);
    is_ret  = RAS_EN && is_jalr && is_link(rs1) && !is_link(rd);
    pred_idx = d_pc[BHT_BITS+1:2] ^ ghr;
  end

  generate
    if (MODE == BP_GSHARE) begin : g_gshare
      logic [1:0] bht [2**BHT_BITS];
      initial for (int i = 0; i < 2**BHT_BITS; i++) bht[i] = 2'b01;
      always_ff @(posedge clk) begin
        if (upd_valid) begin
          if (upd_taken && bht[upd_idx] != 2'b11) bht[upd_idx] <= bht[upd_idx] + 2'd1;
          if (!upd_taken && bht[upd_idx] != 2'b00) bht[upd_idx] <= bht[upd_idx] - 2'd1;
        end
      end
      always_ff @(posedge clk) begin
        if (rst) ghr <= '0;
        else if (upd_valid) ghr <= {ghr[BHT_BITS-2:0], upd_taken};
      end
      assign br_pred = bht[pred_idx][1];
    end else begin : g_static
      assign ghr     = '0;
      assign br_pred = (MODE == BP_BTFNT) ? d_instr[31] : 1'b0;
    end
  endgenerate

  always_comb begin
    pred_taken  = 1'b0;
    pred_target = d_pc + 32'd4;
    ras_pop     = 1'b0;
    if (is_jal && MODE != BP_NONE) begin
      pred_taken  = 1'b1;
      pred_target = d_pc + imm_j(d_instr);
    end else if (is_br && br_pred) begin
      pred_taken  = 1'b1;
      pred_target = d_pc + imm_b(d_instr);
    end else if (is_ret) begin
      pred_taken  = 1'b1;
      pred_target = ras[sp];
      ras_pop     = 1'b1;
    end
    pred_next = pred_taken ? pred_target : d_pc + 32'd4;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sp <= '0;
    end else if (d_fire) begin
      if (is_call) begin
        sp      <= SPW'((32'(sp) + 1) % RAS_DEPTH);
        ras[SPW'((32'(sp) + 1) % RAS_DEPTH)] <= d_pc + 32'd4;
      end else if (is_ret) begin
        sp <= SPW'((32'(sp) + RAS_DEPTH - 1) % RAS_DEPTH);
      end
    end
  end
endmodule
