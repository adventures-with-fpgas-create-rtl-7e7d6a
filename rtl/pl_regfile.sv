// pl_regfile: 32 x 32-bit integer register file of the pipelined core.
//
// Two read ports, one write port. The read data are registered: on a rising
// edge with `rd_en` high, `rs1_q`/`rs2_q` take the registers named by
// `rs1_addr`/`rs2_addr`. These two output registers are the rs1/rs2 pipeline
// registers between Decode and Execute. With `rd_en` low they hold. The write
// port is driven by the WB stage. A write to a register read on the same edge
// is passed straight to the output register (write-through), so an
// instruction in Decode sees the result of the instruction leaving WB; the
// two nearer producers are covered by the bypass in Execute. x0 reads as zero
// and writes to it are dropped.
// The register file feeding rs1/rs2 registers follows the pipeline drawing;
// the write-through is this design's choice.
module pl_regfile (
  input  logic        clk,
  input  logic        rd_en,
  input  logic [4:0]  rs1_addr,
  input  logic [4:0]  rs2_addr,
  output logic [31:0] rs1_q,
  output logic [31:0] rs2_q,
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata
);
  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    if (we && waddr != 5'd0) regs[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      if (rs1_addr == 5'd0)                rs1_q <= '0;
      else if (we && waddr == rs1_addr)    rs1_q <= wdata;
      else                                 rs1_q <= regs[rs1_addr];
      if (rs2_addr == 5'd0)                rs2_q <= '0;
      else if (we && waddr == rs2_addr)    rs2_q <= wdata;
      else                                 rs2_q <= regs[rs2_addr];
    end
  end
endmodule
