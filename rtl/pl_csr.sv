// pl_csr: counter CSRs of the pipelined core (the CSR register of the Mem
// stage).
//
// Keeps two free-running 64-bit counters: `cycle` (every clock after reset)
// and `instret` (every instruction leaving WB, `retire`). When the Mem stage
// holds a CSR read (`rd_en`), the value named by `addr` is loaded into
// `rdata`, a register between Mem and WB, so the value is written back one
// stage later like load data. Readable addresses: 0xC00 cycle, 0xC01 time
// (same counter as cycle), 0xC02 instret, and 0xC80/0xC81/0xC82 for their
// upper halves; any other address reads 0. Writes are ignored.
// The CSR register in the Mem stage follows the pipeline drawing; which
// counters exist and their addresses (the RISC-V user counters) are this
// design's choice.
module pl_csr (
  input  logic        clk,
  input  logic        rst,
  input  logic        retire,
  input  logic        rd_en,
  input  logic [11:0] addr,
  output logic [31:0] rdata
);
  logic [63:0] cycle, instret;

  always_ff @(posedge clk) begin
    if (rst) begin
      cycle   <= '0;
      instret <= '0;
    end else begin
      cycle <= cycle + 64'd1;
      if (retire) instret <= instret + 64'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      unique case (addr)
        12'hC00, 12'hC01: rdata <= cycle[31:0];
        12'hC80, 12'hC81: rdata <= cycle[63:32];
        12'hC02:          rdata <= instret[31:0];
        12'hC82:          rdata <= instret[63:32];
        default:          rdata <= '0;
      endcase
    end
  end
endmodule
