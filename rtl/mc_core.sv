// mc_core: compact multi-cycle RV32I processor core.
//
// One instruction takes four or more cycles, sequenced by a one-hot state
// register:
//   FETCH_INSTR      present PC on the bus and pulse `mem_rstrb`;
//   WAIT_INSTR       wait until `mem_rbusy` is low, then latch the instruction
//                    and read rs1/rs2 from the register file (the register
//                    fields are taken straight from `mem_rdata`);
//   EXECUTE          compute and, for most instructions, write rd; update PC;
//                    start a load (`mem_rstrb`), a store (`mem_wmask`) or a
//                    shift;
//   WAIT_ALU_OR_MEM  for loads, stores and shifts only: wait until the shifter
//                    and both memory busy lines are idle, writing the final
//                    load or shift result to rd.
// Shifts are bit-serial: one position per cycle, so a shift by n adds n
// cycles. SYSTEM instructions write the cycle counter to rd (this covers
// rdcycle). Loads and stores of bytes and halfwords are aligned here: store
// data are replicated over the byte lanes and selected by `mem_wmask`, load
// data are extracted and sign- or zero-extended.
// Memory bus: `mem_addr` (byte address, ADDR_WIDTH bits significant),
// `mem_rstrb` one-cycle read strobe, `mem_rdata` valid in the first cycle
// after the strobe in which `mem_rbusy` is low; `mem_wmask` is a one-cycle
// byte write strobe with `mem_wdata`, `mem_wbusy` high while the write is in
// progress. `reset_n` is synchronous and active low; after it the core waits
// for the bus to be idle and fetches from RESET_ADDR.
// The states, the bus, the serial shifter, the operand selection, the
// alignment rules and the reset behaviour follow the processor described;
// writing rd only once its value is final (rather than on every cycle of the
// waiting state), clearing the instruction register to a no-operation and
// the cycle counter at reset are this design's
// choices and do not change what software sees.
module mc_core
  import rv_pkg::*;
#(
  parameter logic [31:0] RESET_ADDR = 32'h0000_0000,
  parameter int unsigned ADDR_WIDTH = 24
) (
  input  logic        clk,
  input  logic        reset_n,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic [3:0]  mem_wmask,
  input  logic [31:0] mem_rdata,
  output logic        mem_rstrb,
  input  logic        mem_rbusy,
  input  logic        mem_wbusy
);
  typedef enum logic [3:0] {
    FETCH_INSTR     = 4'b0001,
    WAIT_INSTR      = 4'b0010,
    EXECUTE         = 4'b0100,
    WAIT_ALU_OR_MEM = 4'b1000
  } state_e;

  localparam int unsigned AW = ADDR_WIDTH;

  state_e          state;
  logic [AW-1:0]   pc;
  logic [31:0]     instr;
  logic [31:0]     rs1, rs2;
  logic [31:0]     regs [32];
  logic [31:0]     cycles;

  opcode_e op;
  logic [2:0]  f3;
  logic [4:0]  rd;
  logic is_load, is_store, is_alu_reg, is_alu_imm, is_alu, is_branch;
  logic is_jal, is_jalr, is_lui, is_auipc, is_system, is_shift;

  always_comb begin
    op         = opcode(instr);
    f3         = instr[14:12];
    rd         = instr[11:7];
    is_load    = op == OPC_LOAD;
    is_store   = op == OPC_STORE;
    is_alu_reg = op == OPC_OP;
    is_alu_imm = op == OPC_OPIMM;
    is_alu     = is_alu_reg || is_alu_imm;
    is_branch  = op == OPC_BRANCH;
    is_jal     = op == OPC_JAL;
    is_jalr    = op == OPC_JALR;
    is_lui     = op == OPC_LUI;
    is_auipc   = op == OPC_AUIPC;
    is_system  = op == OPC_SYSTEM;
    is_shift   = f3 == 3'b001 || f3 == 3'b101;
  end

  // ------------------------------------------------------------------ ALU
  logic [31:0] alu_in1, alu_in2, alu_sum, alu_out;
  logic [32:0] alu_diff;
  logic        lt, ltu, eq, take_branch;
  logic [31:0] shreg;
  logic [4:0]  shamt;
  logic        alu_busy;

  always_comb begin
    alu_in1  = rs1;
    alu_in2  = (is_alu_reg || is_branch) ? rs2 : imm_i(instr);
    alu_sum  = alu_in1 + alu_in2;
    alu_diff = {1'b0, alu_in1} - {1'b0, alu_in2};
    ltu      = alu_diff[32];
    lt       = (alu_in1[31] ^ alu_in2[31]) ? alu_in1[31] : alu_diff[32];
    eq       = alu_diff[31:0] == 32'd0;
    unique case (f3)
      3'b000:         alu_out = (instr[30] && is_alu_reg) ? alu_diff[31:0] : alu_sum;
      3'b010:         alu_out = {31'b0, lt};
      3'b011:         alu_out = {31'b0, ltu};
      3'b100:         alu_out = alu_in1 ^ alu_in2;
      3'b110:         alu_out = alu_in1 | alu_in2;
      3'b111:         alu_out = alu_in1 & alu_in2;
      default:        alu_out = shreg;          // SLL, SRL, SRA
    endcase
    unique case (f3)
      3'b000:  take_branch = eq;
      3'b001:  take_branch = !eq;
      3'b100:  take_branch = lt;
      3'b101:  take_branch = !lt;
      3'b110:  take_branch = ltu;
      3'b111:  take_branch = !ltu;
      default: take_branch = 1'b0;
    endcase
    alu_busy = shamt != 5'd0;
  end

  // Serial shifter: loaded in EXECUTE, one bit position per cycle.
  always_ff @(posedge clk) begin
    if (!reset_n) begin
      shamt <= '0;
    end else if (state == EXECUTE && is_alu && is_shift) begin
      shreg <= alu_in1;
      shamt <= alu_in2[4:0];
    end else if (alu_busy) begin
      shamt <= shamt - 5'd1;
      shreg <= (f3 == 3'b001) ? {shreg[30:0], 1'b0}
                              : {instr[30] & shreg[31], shreg[31:1]};
    end
  end

  // ------------------------------------------------------- PC and addresses
  logic [AW-1:0] pc_plus4, pc_plus_imm, ls_addr;
  logic [31:0]   pc_imm, ls_imm;

  always_comb begin
    pc_imm      = is_jal ? imm_j(instr) : is_auipc ? imm_u(instr) : imm_b(instr);
    pc_plus4    = pc + AW'(4);
    pc_plus_imm = pc + pc_imm[AW-1:0];
    ls_imm      = is_store ? imm_s(instr) : imm_i(instr);
    ls_addr     = rs1[AW-1:0] + ls_imm[AW-1:0];
  end

  // ------------------------------------------------------ load/store align
  logic        byte_acc, half_acc, ld_sign;
  logic [15:0] ld_half;
  logic [7:0]  ld_byte;
  logic [31:0] ld_data;
  logic [3:0]  st_mask;

  always_comb begin
    byte_acc  = f3[1:0] == 2'b00;
    half_acc  = f3[1:0] == 2'b01;
    ld_half   = ls_addr[1] ? mem_rdata[31:16] : mem_rdata[15:0];
    ld_byte   = ls_addr[0] ? ld_half[15:8] : ld_half[7:0];
    ld_sign   = !f3[2] && (byte_acc ? ld_byte[7] : ld_half[15]);
    ld_data   = byte_acc ? {{24{ld_sign}}, ld_byte} :
                half_acc ? {{16{ld_sign}}, ld_half} : mem_rdata;
    mem_wdata = byte_acc ? {4{rs2[7:0]}} : half_acc ? {2{rs2[15:0]}} : rs2;
    st_mask   = byte_acc ? (4'b0001 << ls_addr[1:0]) :
                half_acc ? (ls_addr[1] ? 4'b1100 : 4'b0011) : 4'b1111;
  end

  // ------------------------------------------------------------- writeback
  logic [31:0] wb_data;
  logic        wb_en, need_wait;

  always_comb begin
    unique case (1'b1)
      is_system:         wb_data = cycles;
      is_lui:            wb_data = imm_u(instr);
      is_alu:            wb_data = alu_out;
      is_auipc:          wb_data = 32'(pc_plus_imm);
      is_jal || is_jalr: wb_data = 32'(pc_plus4);
      is_load:           wb_data = ld_data;
      default:           wb_data = 32'd0;
    endcase
    need_wait = is_load || is_store || (is_alu && is_shift);
    wb_en = !(is_branch || is_store) && rd != 5'd0 &&
            ((state == EXECUTE && !need_wait) ||
             (state == WAIT_ALU_OR_MEM && !alu_busy && !mem_rbusy && !mem_wbusy));
  end

  always_ff @(posedge clk) begin
    if (wb_en) regs[rd] <= wb_data;
  end

  // ------------------------------------------------------------------- bus
  always_comb begin
    mem_addr  = 32'(((state == FETCH_INSTR) || (state == WAIT_INSTR)) ? pc : ls_addr);
    mem_rstrb = (state == FETCH_INSTR) || (state == EXECUTE && is_load);
    mem_wmask = (state == EXECUTE && is_store) ? st_mask : 4'b0000;
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!reset_n) begin
      state <= WAIT_ALU_OR_MEM;
      pc    <= RESET_ADDR[AW-1:0];
      instr <= 32'h0000_0013;               // addi x0,x0,0: nothing to write back
    end else begin
      unique case (state)
        FETCH_INSTR: state <= WAIT_INSTR;
        WAIT_INSTR: if (!mem_rbusy) begin
          instr <= mem_rdata;
          rs1   <= (mem_rdata[19:15] == 5'd0) ? 32'd0 : regs[mem_rdata[19:15]];
          rs2   <= (mem_rdata[24:20] == 5'd0) ? 32'd0 : regs[mem_rdata[24:20]];
          state <= EXECUTE;
        end
        EXECUTE: begin
          if (is_jalr)                          pc <= {alu_sum[AW-1:1], 1'b0};
          else if (is_jal || (is_branch && take_branch)) pc <= pc_plus_imm;
          else                                  pc <= pc_plus4;
          state <= need_wait ? WAIT_ALU_OR_MEM : FETCH_INSTR;
        end
        WAIT_ALU_OR_MEM:
          if (!alu_busy && !mem_rbusy && !mem_wbusy) state <= FETCH_INSTR;
        default: state <= WAIT_INSTR;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!reset_n) cycles <= '0;
    else          cycles <= cycles + 32'd1;
  end

  a_state_onehot: assert property (@(posedge clk) disable iff (!reset_n) $onehot(state));
endmodule
