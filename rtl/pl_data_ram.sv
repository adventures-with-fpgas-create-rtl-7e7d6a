// pl_data_ram: data memory of the pipelined core.
//
// WORDS x 32-bit with a per-byte write mask, used by the Mem stage. The byte
// address `addr` comes from the address register between Execute and Mem;
// the word index is addr[AW+1:2]. On a rising edge, bytes whose `wmask` bit is
// set are written from `wdata`, and when `rd_en` is high the addressed word
// (its value before this edge's write) is loaded into `rdata`, the Mres
// register between Mem and WB. Stores therefore take effect in the Mem stage
// and load data are available in WB, one cycle after the address.
// Byte lane alignment of store data and extraction/sign extension of load
// data are done by the core. The memory, the address register in front of it
// and the Mres register behind it follow the pipeline drawing; the size and
// the byte-mask port are this design's choices.
module pl_data_ram #(
  parameter int unsigned WORDS = 16384
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        rd_en,
  output logic [31:0] rdata,
  input  logic [3:0]  wmask,
  input  logic [31:0] wdata
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] idx;

  assign idx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (rd_en) rdata <= mem[idx];
    for (int b = 0; b < 4; b++)
      if (wmask[b]) mem[idx][8*b +: 8] <= wdata[8*b +: 8];
  end
endmodule
