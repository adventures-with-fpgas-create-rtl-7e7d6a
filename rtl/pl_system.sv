// pl_system: the pipelined RV32I processor with its program and data
// memories (Harvard organisation).
//
// Instantiates pl_core, pl_prog_rom (instruction side, filled through the
// `ld_*` port or INIT_FILE before reset is released) and pl_data_ram (data
// side, byte addresses 0 .. 4*DATA_WORDS-1, wrapping above). Instruction
// and data address spaces are separate, as in the pipeline drawing where the
// program memory sits in Fetch and the data memory in Mem.
// Outputs: the WB-stage retirement trace (`rt_*`), the data-memory write port
// as seen by the memory (`st_*`, for observing stores) and the per-cycle
// pipeline-control events (`ev`). `rst` is synchronous, active high.
// Memory sizes are this design's choice (64 KiB each by default). M_EXT
// selects RV32IM (default) or plain RV32I in the core; FAST_BRANCH selects
// the 1-cycle correction path (see pl_core).
module pl_system
  import rv_pkg::*;
#(
  parameter int unsigned PROG_WORDS = 16384,
  parameter int unsigned DATA_WORDS = 16384,
  parameter string       INIT_FILE  = "",
  parameter logic [31:0] RESET_ADDR = 32'h0000_0000,
  parameter bp_mode_e    BP_MODE    = BP_BTFNT,
  parameter bit          RAS_EN     = 1'b1,
  parameter int unsigned RAS_DEPTH  = 4,
  parameter int unsigned BHT_BITS   = 12,
  parameter bit          M_EXT      = 1'b1,
  parameter bit          FAST_BRANCH = 1'b0
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          ld_we,
  input  logic [$clog2(PROG_WORDS)-1:0] ld_addr,
  input  logic [31:0]                   ld_data,
  output logic                          rt_valid,
  output logic [31:0]                   rt_pc,
  output logic [31:0]                   rt_instr,
  output logic                          rt_we,
  output logic [4:0]                    rt_rd,
  output logic [31:0]                   rt_wdata,
  output logic [3:0]                    st_wmask,
  output logic [31:0]                   st_addr,
  output logic [31:0]                   st_wdata,
  output pl_events_t                    ev
);
  logic        imem_en;
  logic [31:0] imem_addr, imem_instr;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_ren;
  logic [3:0]  dmem_wmask;

  pl_core #(
    .RESET_ADDR (RESET_ADDR),
    .BP_MODE    (BP_MODE),
    .RAS_EN     (RAS_EN),
    .RAS_DEPTH  (RAS_DEPTH),
    .BHT_BITS   (BHT_BITS),
    .M_EXT      (M_EXT),
    .FAST_BRANCH (FAST_BRANCH)
  ) u_core (
    .clk        (clk),
    .rst        (rst),
    .imem_en    (imem_en),
    .imem_addr  (imem_addr),
    .imem_instr (imem_instr),
    .dmem_addr  (dmem_addr),
    .dmem_ren   (dmem_ren),
    .dmem_wmask (dmem_wmask),
    .dmem_wdata (dmem_wdata),
    .dmem_rdata (dmem_rdata),
    .rt_valid   (rt_valid),
    .rt_pc      (rt_pc),
    .rt_instr   (rt_instr),
    .rt_we      (rt_we),
    .rt_rd      (rt_rd),
    .rt_wdata   (rt_wdata),
    .ev         (ev)
  );

  pl_prog_rom #(
    .WORDS     (PROG_WORDS),
    .INIT_FILE (INIT_FILE)
  ) u_rom (
    .clk     (clk),
    .rd_en   (imem_en),
    .addr    (imem_addr),
    .instr   (imem_instr),
    .ld_we   (ld_we),
    .ld_addr (ld_addr),
    .ld_data (ld_data)
  );

  pl_data_ram #(
    .WORDS (DATA_WORDS)
  ) u_ram (
    .clk   (clk),
    .addr  (dmem_addr),
    .rd_en (dmem_ren),
    .rdata (dmem_rdata),
    .wmask (dmem_wmask),
    .wdata (dmem_wdata)
  );

  assign st_wmask = dmem_wmask;
  assign st_addr  = dmem_addr;
  assign st_wdata = dmem_wdata;
endmodule
