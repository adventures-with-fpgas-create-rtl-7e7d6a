// pl_core: five-stage pipelined RV32I processor core
// (Fetch, Decode, Execute, Mem, WB).
//
// Fetch:   the fetch address is chosen, highest priority first, from the
//          JoB register of the Mem stage (branch correction), the Decode
//          stage's prediction, or the sequential PC register (PC + 4). It
//          addresses the program memory, whose registered output is the
//          instruction of the Decode stage; the address itself is kept as the
//          Decode PC and, plus 4, as the next sequential PC.
// Decode:  the register file is read into the rs1/rs2 pipeline registers and
//          the branch predictor proposes the next fetch address, so a
//          correctly predicted taken branch or jump costs no cycle.
// Execute: operands pass the bypass (from Mem or WB), then the ALU, or, for
//          multiply/divide when M_EXT is set, the single-cycle pl_muldiv. The real
//          next PC is computed and compared with the one predicted for this
//          instruction; on a difference the JoB (jump or branch) register is
//          set with the right address. Load/store addresses and aligned store
//          data are prepared here.
// Mem:     the data memory is accessed through the address register; a CSR
//          read loads the CSR register. A set JoB register redirects Fetch
//          and flushes Decode and Execute, so a misprediction costs 2 cycles.
// WB:      selects the Execute result, the aligned/sign-extended load data
//          (Mres) or the CSR value and writes the register file.
// A load or CSR read followed immediately by a consumer stalls Fetch and
// Decode for one cycle (bubble in Execute).
// Interfaces: program memory (`imem_*`, synchronous, registered output),
// data memory (`dmem_*`, address/mask/data from the E/M register, read data
// registered), a retirement trace of the WB stage (`rt_*`) and the per-cycle
// events of pipeline control (`ev`). `rst` is synchronous, active high.
// The stage split, the memories and registers, the bypass sources, the stall
// and flush paths and the correction from the JoB register follow the
// pipeline drawing and the debugger trace of the design; FENCE, ECALL and
// EBREAK executing as no-operations, CSR writes being ignored and no traps
// (misaligned or illegal instructions) are this design's simplifications, in
// line with privileged instructions being listed as future work. M_EXT
// (default 1) gives RV32IM, the better-performing of the two measured
// configurations; with M_EXT = 0 multiply/divide encodings execute as their
// RV32I look-alikes (no illegal-instruction trap).
// FAST_BRANCH (default 0) takes the correction straight from the Execute
// comparison instead of the JoB register: only Decode is flushed and a
// misprediction costs 1 cycle, at the price of a path from the bypass
// through the ALU and comparator to the fetch address. The pipeline drawing
// marks such a path ("fast branching") next to the registered correction;
// the default follows the debugger trace, which shows the 2-cycle version.
module pl_core
  import rv_pkg::*;
#(
  parameter logic [31:0] RESET_ADDR = 32'h0000_0000,
  parameter bp_mode_e    BP_MODE    = BP_BTFNT,
  parameter bit          RAS_EN     = 1'b1,
  parameter int unsigned RAS_DEPTH  = 4,
  parameter int unsigned BHT_BITS   = 12,
  parameter bit          M_EXT      = 1'b1,
  parameter bit          FAST_BRANCH = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  // program memory
  output logic        imem_en,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_instr,
  // data memory
  output logic [31:0] dmem_addr,
  output logic        dmem_ren,
  output logic [3:0]  dmem_wmask,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  // retirement trace (WB stage)
  output logic        rt_valid,
  output logic [31:0] rt_pc,
  output logic [31:0] rt_instr,
  output logic        rt_we,
  output logic [4:0]  rt_rd,
  output logic [31:0] rt_wdata,
  output pl_events_t  ev
);

  typedef struct packed {
    logic                valid;
    logic [31:0]         pc;
    logic [31:0]         instr;
    logic [31:0]         pred_next;
    logic [BHT_BITS-1:0] bp_idx;
  } de_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
    logic        wb_en;
    logic        is_load;
    logic        is_store;
    logic        is_csr;
    logic [31:0] result;
    logic [31:0] addr;
    logic [3:0]  wmask;
    logic [31:0] wdata;
    logic        job;
    logic [31:0] job_target;
  } em_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
    logic        wb_en;
    logic        is_load;
    logic        is_csr;
    logic [1:0]  addr_lo;
    logic [31:0] result;
  } mw_t;

  // ---------------------------------------------------------------- control
  logic stall, flush_d, flush_e, flush_e_hz, hazard;
  logic m_correction;          // redirect request: JoB register, or Execute with FAST_BRANCH
  logic [31:0] corr_target;

  // ------------------------------------------------------------------ Fetch
  logic [31:0] f_pc;          // next sequential fetch address
  logic [31:0] fetch_addr;

  // ----------------------------------------------------------------- Decode
  logic        d_valid;
  logic [31:0] d_pc;
  logic [31:0] d_instr;
  opcode_e     d_op;
  logic        d_uses_rs1, d_uses_rs2;
  logic        d_fire;
  logic        bp_taken, bp_ras_pop;
  logic [31:0] bp_target, bp_next;
  logic [BHT_BITS-1:0] bp_idx;

  // ---------------------------------------------------------------- Execute
  de_t         de;
  logic [31:0] rf_rs1, rf_rs2;
  opcode_e     e_op;
  logic [2:0]  e_f3;
  logic [4:0]  e_rd, e_rs1, e_rs2;
  logic [31:0] e_op1, e_op2, e_alu_in2, e_alu_out, e_md_out, e_result, e_addr, e_next;
  logic        e_is_md;
  logic        e_alt, e_br_taken, e_wb_en, e_late, e_miss;
  logic [3:0]  e_wmask;
  logic [31:0] e_wdata;
  logic        fwd_m1, fwd_m2, fwd_w1, fwd_w2;

  // -------------------------------------------------------------- Mem / WB
  em_t         em;
  mw_t         mw;
  logic [31:0] csr_rdata;
  logic [31:0] w_load, w_data;
  logic        w_we;

  // ===================================================== Fetch stage logic
  // Registered correction (default) or, with FAST_BRANCH, straight from
  // the Execute comparison (1-cycle penalty, longer combinational path).
  assign m_correction = FAST_BRANCH ? e_miss : (em.valid && em.job);
  assign corr_target  = FAST_BRANCH ? e_next : em.job_target;
  assign flush_e      = flush_e_hz && !FAST_BRANCH;

  always_comb begin
    if (m_correction)             fetch_addr = corr_target;
    else if (d_valid && bp_taken) fetch_addr = bp_target;
    else                          fetch_addr = f_pc;
  end

  assign imem_en   = !stall;
  assign imem_addr = fetch_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      f_pc    <= RESET_ADDR;
      d_valid <= 1'b0;
      d_pc    <= RESET_ADDR;
    end else if (!stall) begin
      f_pc    <= fetch_addr + 32'd4;
      d_pc    <= fetch_addr;
      d_valid <= 1'b1;
    end
  end

  // ==================================================== Decode stage logic
  assign d_instr = imem_instr;

  always_comb begin
    d_op       = opcode(d_instr);
    d_uses_rs1 = !(d_op inside {OPC_LUI, OPC_AUIPC, OPC_JAL});
    d_uses_rs2 = d_op inside {OPC_OP, OPC_STORE, OPC_BRANCH};
    d_fire     = d_valid && !stall && !m_correction;
  end

  pl_regfile u_rf (
    .clk      (clk),
    .rd_en    (!stall),
    .rs1_addr (d_instr[19:15]),
    .rs2_addr (d_instr[24:20]),
    .rs1_q    (rf_rs1),
    .rs2_q    (rf_rs2),
    .we       (w_we),
    .waddr    (mw.instr[11:7]),
    .wdata    (w_data)
  );

  pl_branch_predictor #(
    .MODE      (BP_MODE),
    .RAS_EN    (RAS_EN),
    .RAS_DEPTH (RAS_DEPTH),
    .BHT_BITS  (BHT_BITS)
  ) u_bp (
    .clk         (clk),
    .rst         (rst),
    .d_valid     (d_valid),
    .d_pc        (d_pc),
    .d_instr     (d_instr),
    .d_fire      (d_fire),
    .pred_taken  (bp_taken),
    .pred_target (bp_target),
    .pred_next   (bp_next),
    .pred_idx    (bp_idx),
    .ras_pop     (bp_ras_pop),
    .upd_valid   (ev.branch),
    .upd_taken   (e_br_taken),
    .upd_idx     (de.bp_idx)
  );

  pl_hazard_ctrl u_hz (
    .d_valid       (d_valid),
    .d_rs1         (d_instr[19:15]),
    .d_rs2         (d_instr[24:20]),
    .d_uses_rs1    (d_uses_rs1),
    .d_uses_rs2    (d_uses_rs2),
    .e_valid       (de.valid),
    .e_late_result (e_late),
    .e_rd          (e_rd),
    .m_correction  (m_correction),
    .hazard        (hazard),
    .stall         (stall),
    .flush_d       (flush_d),
    .flush_e       (flush_e_hz)
  );

  always_ff @(posedge clk) begin
    if (rst || flush_d) begin
      de.valid <= 1'b0;
    end else begin
      de.valid <= d_valid;
    end
    if (!stall) begin
      de.pc        <= d_pc;
      de.instr     <= d_instr;
      de.pred_next <= bp_next;
      de.bp_idx    <= bp_idx;
    end
  end

  // =================================================== Execute stage logic
  always_comb begin
    e_op  = opcode(de.instr);
    e_f3  = de.instr[14:12];
    e_rd  = de.instr[11:7];
    e_rs1 = de.instr[19:15];
    e_rs2 = de.instr[24:20];
    e_late = (e_op == OPC_LOAD) || (e_op == OPC_SYSTEM && e_f3 != 3'b000);
    e_wb_en = de.valid && e_rd != 5'd0 &&
              (e_op inside {OPC_LUI, OPC_AUIPC, OPC_JAL, OPC_JALR, OPC_OP,
                            OPC_OPIMM, OPC_LOAD} ||
               (e_op == OPC_SYSTEM && e_f3 != 3'b000));
  end

  pl_bypass u_byp (
    .rs1       (e_rs1),
    .rs2       (e_rs2),
    .rf_rs1    (rf_rs1),
    .rf_rs2    (rf_rs2),
    .m_wb_en   (em.valid && em.wb_en && !em.is_load && !em.is_csr),
    .m_rd      (em.instr[11:7]),
    .m_result  (em.result),
    .w_wb_en   (w_we),
    .w_rd      (mw.instr[11:7]),
    .w_result  (w_data),
    .op1       (e_op1),
    .op2       (e_op2),
    .fwd_m_rs1 (fwd_m1),
    .fwd_m_rs2 (fwd_m2),
    .fwd_w_rs1 (fwd_w1),
    .fwd_w_rs2 (fwd_w2)
  );

  always_comb begin
    e_alu_in2 = (e_op == OPC_OP || e_op == OPC_BRANCH) ? e_op2 : imm_i(de.instr);
    e_alt     = de.instr[30] && (e_op == OPC_OP || e_f3 == 3'b101);
  end

  pl_alu u_alu (
    .in1      (e_op1),
    .in2      (e_alu_in2),
    .funct3   (e_f3),
    .alt      (e_alt),
    .result   (e_alu_out),
    .br_taken (e_br_taken)
  );

  // M extension: OP instructions with funct7 = 0000001 (bit 25 set)
  pl_muldiv u_md (
    .a      (e_op1),
    .b      (e_op2),
    .funct3 (e_f3),
    .result (e_md_out)
  );
  assign e_is_md = M_EXT && e_op == OPC_OP && de.instr[25];

  always_comb begin
    unique case (e_op)
      OPC_LUI:            e_result = imm_u(de.instr);
      OPC_AUIPC:          e_result = de.pc + imm_u(de.instr);
      OPC_JAL, OPC_JALR:  e_result = de.pc + 32'd4;
      default:            e_result = e_is_md ? e_md_out : e_alu_out;
    endcase

    unique case (e_op)
      OPC_JAL:    e_next = de.pc + imm_j(de.instr);
      OPC_JALR:   e_next = (e_op1 + imm_i(de.instr)) & ~32'd1;
      OPC_BRANCH: e_next = e_br_taken ? de.pc + imm_b(de.instr) : de.pc + 32'd4;
      default:    e_next = de.pc + 32'd4;
    endcase
    e_miss = de.valid && e_next != de.pred_next;

    e_addr = e_op1 + (e_op == OPC_STORE ? imm_s(de.instr) : imm_i(de.instr));
    unique case (e_f3[1:0])
      2'b00: begin
        e_wdata = {4{e_op2[7:0]}};
        e_wmask = 4'b0001 << e_addr[1:0];
      end
      2'b01: begin
        e_wdata = {2{e_op2[15:0]}};
        e_wmask = e_addr[1] ? 4'b1100 : 4'b0011;
      end
      default: begin
        e_wdata = e_op2;
        e_wmask = 4'b1111;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || flush_e) begin
      em.valid <= 1'b0;
      em.job   <= 1'b0;
    end else begin
      em.valid <= de.valid;
      em.job   <= e_miss && !FAST_BRANCH;
    end
    em.pc         <= de.pc;
    em.instr      <= de.instr;
    em.wb_en      <= e_wb_en;
    em.is_load    <= e_op == OPC_LOAD;
    em.is_store   <= e_op == OPC_STORE;
    em.is_csr     <= e_op == OPC_SYSTEM && e_f3 != 3'b000;
    em.result     <= e_result;
    em.addr       <= e_addr;
    em.wmask      <= e_wmask;
    em.wdata      <= e_wdata;
    em.job_target <= e_next;
  end

  // ======================================================= Mem stage logic
  assign dmem_addr  = em.addr;
  assign dmem_ren   = em.valid && em.is_load;
  assign dmem_wmask = (em.valid && em.is_store) ? em.wmask : 4'b0000;
  assign dmem_wdata = em.wdata;

  pl_csr u_csr (
    .clk    (clk),
    .rst    (rst),
    .retire (mw.valid),
    .rd_en  (em.valid && em.is_csr),
    .addr   (em.instr[31:20]),
    .rdata  (csr_rdata)
  );

  always_ff @(posedge clk) begin
    if (rst) mw.valid <= 1'b0;
    else     mw.valid <= em.valid;
    mw.pc      <= em.pc;
    mw.instr   <= em.instr;
    mw.wb_en   <= em.wb_en;
    mw.is_load <= em.is_load;
    mw.is_csr  <= em.is_csr;
    mw.addr_lo <= em.addr[1:0];
    mw.result  <= em.result;
  end

  // ======================================================== WB stage logic
  always_comb begin
    logic [31:0] sh;
    logic        uns;
    sh  = dmem_rdata >> {mw.addr_lo, 3'b000};
    uns = mw.instr[14];
    unique case (mw.instr[13:12])
      2'b00:   w_load = {{24{sh[7]  & !uns}}, sh[7:0]};
      2'b01:   w_load = {{16{sh[15] & !uns}}, sh[15:0]};
      default: w_load = dmem_rdata;
    endcase
    w_data = mw.is_load ? w_load : mw.is_csr ? csr_rdata : mw.result;
    w_we   = mw.valid && mw.wb_en;
  end

  assign rt_valid = mw.valid;
  assign rt_pc    = mw.pc;
  assign rt_instr = mw.instr;
  assign rt_we    = w_we;
  assign rt_rd    = mw.instr[11:7];
  assign rt_wdata = w_data;

  // ================================================================ events
  always_comb begin
    ev             = '0;
    ev.retire      = mw.valid;
    ev.load_stall  = hazard;
    ev.fwd_m_rs1   = de.valid && fwd_m1;
    ev.fwd_m_rs2   = de.valid && fwd_m2 && (e_op inside {OPC_OP, OPC_STORE, OPC_BRANCH});
    ev.fwd_w_rs1   = de.valid && fwd_w1;
    ev.fwd_w_rs2   = de.valid && fwd_w2 && (e_op inside {OPC_OP, OPC_STORE, OPC_BRANCH});
    ev.branch      = de.valid && !flush_e && e_op == OPC_BRANCH;
    ev.branch_miss = ev.branch && e_miss;
    ev.jalr        = de.valid && !flush_e && e_op == OPC_JALR;
    ev.jalr_miss   = ev.jalr && e_miss;
    ev.pred_taken  = d_fire && bp_taken;
    ev.ras_pop     = d_fire && bp_ras_pop;
    ev.correction  = m_correction;
    ev.muldiv      = de.valid && !flush_e && e_is_md;
  end

  // A redirect and a stall never apply in the same cycle.
  a_no_stall_on_correction: assert property (@(posedge clk) disable iff (rst)
    m_correction |-> !stall);
endmodule
