// rv_top: the two RV32I processors of the design, side by side.
//
// * The pipelined processor (pl_system): five-stage RV32IM pipeline (M
//   extension selectable with PL_M_EXT) with
//   branch prediction, register bypass and hazard control, with its own
//   program and data memories. Its program memory is filled through
//   `pl_ld_*` while `pl_rst` is high; it reports retired instructions
//   (`pl_rt_*`), data-memory writes (`pl_st_*`) and pipeline-control events
//   (`pl_ev`).
// * The compact multi-cycle processor (mc_core): its memory bus (`mc_mem_*`)
//   is brought out, since the memory attached to it is not part of the design.
// The two share the clock only; each has its own reset (`pl_rst` active high,
// `mc_reset_n` active low). Parameters are passed through with the defaults of
// the two blocks.
module rv_top
  import rv_pkg::*;
#(
  parameter int unsigned PL_PROG_WORDS = 16384,
  parameter int unsigned PL_DATA_WORDS = 16384,
  parameter bp_mode_e    PL_BP_MODE    = BP_BTFNT,
  parameter bit          PL_RAS_EN     = 1'b1,
  parameter bit          PL_M_EXT      = 1'b1,
  parameter bit          PL_FAST_BRANCH = 1'b0,
  parameter int unsigned MC_ADDR_WIDTH = 24
) (
  input  logic                             clk,
  // pipelined processor
  input  logic                             pl_rst,
  input  logic                             pl_ld_we,
  input  logic [$clog2(PL_PROG_WORDS)-1:0] pl_ld_addr,
  input  logic [31:0]                      pl_ld_data,
  output logic                             pl_rt_valid,
  output logic [31:0]                      pl_rt_pc,
  output logic [31:0]                      pl_rt_instr,
  output logic                             pl_rt_we,
  output logic [4:0]                       pl_rt_rd,
  output logic [31:0]                      pl_rt_wdata,
  output logic [3:0]                       pl_st_wmask,
  output logic [31:0]                      pl_st_addr,
  output logic [31:0]                      pl_st_wdata,
  output pl_events_t                       pl_ev,
  // multi-cycle processor
  input  logic                             mc_reset_n,
  output logic [31:0]                      mc_mem_addr,
  output logic [31:0]                      mc_mem_wdata,
  output logic [3:0]                       mc_mem_wmask,
  input  logic [31:0]                      mc_mem_rdata,
  output logic                             mc_mem_rstrb,
  input  logic                             mc_mem_rbusy,
  input  logic                             mc_mem_wbusy
);
  pl_system #(
    .PROG_WORDS (PL_PROG_WORDS),
    .DATA_WORDS (PL_DATA_WORDS),
    .BP_MODE    (PL_BP_MODE),
    .RAS_EN     (PL_RAS_EN),
    .M_EXT      (PL_M_EXT),
    .FAST_BRANCH (PL_FAST_BRANCH)
  ) u_pl (
    .clk      (clk),
    .rst      (pl_rst),
    .ld_we    (pl_ld_we),
    .ld_addr  (pl_ld_addr),
    .ld_data  (pl_ld_data),
    .rt_valid (pl_rt_valid),
    .rt_pc    (pl_rt_pc),
    .rt_instr (pl_rt_instr),
    .rt_we    (pl_rt_we),
    .rt_rd    (pl_rt_rd),
    .rt_wdata (pl_rt_wdata),
    .st_wmask (pl_st_wmask),
    .st_addr  (pl_st_addr),
    .st_wdata (pl_st_wdata),
    .ev       (pl_ev)
  );

  mc_core #(
    .ADDR_WIDTH (MC_ADDR_WIDTH)
  ) u_mc (
    .clk       (clk),
    .reset_n   (mc_reset_n),
    .mem_addr  (mc_mem_addr),
    .mem_wdata (mc_mem_wdata),
    .mem_wmask (mc_mem_wmask),
    .mem_rdata (mc_mem_rdata),
    .mem_rstrb (mc_mem_rstrb),
    .mem_rbusy (mc_mem_rbusy),
    .mem_wbusy (mc_mem_wbusy)
  );
endmodule
