// pl_muldiv: multiply/divide unit of the M extension (RV32IM) for the
// Execute stage of the pipelined core.
//
// Computes, combinationally in one cycle, the eight M-extension operations
// selected by `funct3`: MUL (low 32 bits of the product), MULH, MULHSU, MULHU
// (high 32 bits for signed x signed, signed x unsigned, unsigned x unsigned),
// DIV, DIVU, REM, REMU. Products come from one 33 x 33-bit signed multiply
// whose operands are sign- or zero-extended as the operation requires.
// Division follows the RISC-V rules without traps: division by zero gives
// all ones (DIV/DIVU) and the dividend (REM/REMU); the overflow case
// -2^31 / -1 gives -2^31 with remainder 0. Signed division works on
// magnitudes and fixes the signs afterwards (quotient negative when the
// operand signs differ, remainder with the sign of the dividend).
// Interface: `a` (rs1), `b` (rs2), `funct3`, `result`; no clock, so the
// result is ready in the same cycle as the ALU's and the pipeline needs no
// extra stall or bypass source.
// The multiply/divide support itself belongs to the RV32IM configuration the
// design was measured in; how it is built (single-cycle, combinational
// divider) is this design's choice: the simplest structure that keeps the
// pipeline timing unchanged, at the cost of a long combinational path.
module pl_muldiv (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [2:0]  funct3,
  output logic [31:0] result
);

  logic signed [32:0] ma, mb;
  logic signed [63:0] prod;   // low 64 bits of the 66-bit product suffice
  logic               a_neg, b_neg;
  logic [31:0]        a_mag, b_mag, q_mag, r_mag;
  logic               sgn;

  always_comb begin
    // multiply: funct3 00x signed x signed, 010 signed x unsigned, 011 unsigned
    ma   = {(funct3 != 3'b011) & a[31], a};
    mb   = {(funct3[1] == 1'b0) & b[31], b};
    prod = ma * mb;

    // divide: funct3[0] = 1 for unsigned
    sgn   = !funct3[0];
    a_neg = sgn & a[31];
    b_neg = sgn & b[31];
    a_mag = a_neg ? -a : a;
    b_mag = b_neg ? -b : b;
    if (b == 32'd0) begin
      q_mag = 32'hFFFF_FFFF;
      r_mag = a_mag;
    end else begin
      q_mag = a_mag / b_mag;
      r_mag = a_mag % b_mag;
    end

    unique case (funct3)
      3'b000:  result = prod[31:0];
      3'b001,
      3'b010,
      3'b011:  result = prod[63:32];
      3'b100,
      3'b101:  result = (b == 32'd0) ? 32'hFFFF_FFFF
                                     : ((a_neg ^ b_neg) ? -q_mag : q_mag);
      default: result = a_neg ? -r_mag : r_mag;
    endcase
  end

endmodule
