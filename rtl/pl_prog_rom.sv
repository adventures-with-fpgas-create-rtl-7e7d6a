// pl_prog_rom: program memory of the pipelined core.
//
// WORDS x 32-bit, read synchronously: on a rising edge with `rd_en` high the
// word at byte address `addr` (word index addr[AW+1:2]) is loaded into
// `instr`, which is the instruction register between Fetch and Decode. With
// `rd_en` low (the pipeline stalls Fetch) `instr` holds. The instruction that
// leaves the register one cycle after its address was presented is thus the
// one Decode works on.
// Seen from the core it is read-only. A separate load port (`ld_we`,
// `ld_addr`, `ld_data`, word addressed) fills it before the program runs, in
// place of the FPGA configuration that would preload it on a board; it can
// also be preloaded from a hex file named by INIT_FILE.
// The memory and the registered `instr` output follow the pipeline drawing;
// the size, the load port and the init file are this design's choices.
module pl_prog_rom #(
  parameter int unsigned WORDS     = 16384,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [31:0]              addr,
  output logic [31:0]              instr,
  input  logic                     ld_we,
  input  logic [$clog2(WORDS)-1:0] ld_addr,
  input  logic [31:0]              ld_data
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
    if (rd_en) instr <= mem[addr[AW+1:2]];
  end
endmodule
