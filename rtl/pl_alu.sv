// pl_alu: arithmetic/logic unit and branch comparator of the pipelined core.
//
// Purely combinational; it sits in the Execute stage after the bypass muxes.
// `funct3` selects the RV32I operation (ADD/SUB, SLL, SLT, SLTU, XOR, SRL/SRA,
// OR, AND). `alt` is instruction bit 30 already qualified by the caller: it
// turns ADD into SUB (register form only) and SRL into SRA. The comparator
// evaluates the six conditional-branch relations from one 33-bit subtraction
// (EQ, NE, LT, GE, LTU, GEU by funct3) and drives `br_taken`.
// Operations are those of the RV32I base ISA. Computing LT, LTU and EQ from a
// single subtraction follows the small multi-cycle core of the same project;
// the single-cycle barrel shifter is this design's choice for a pipeline that
// must not stall on shifts.
module pl_alu (
  input  logic [31:0] in1,
  input  logic [31:0] in2,
  input  logic [2:0]  funct3,
  input  logic        alt,
  output logic [31:0] result,
  output logic        br_taken
);
  logic [32:0] diff;
  logic        lt, ltu, eq;

  always_comb begin
    diff = {1'b0, in1} - {1'b0, in2};
    ltu  = diff[32];
    lt   = (in1[31] ^ in2[31]) ? in1[31] : diff[32];
    eq   = diff[31:0] == 32'd0;

    unique case (funct3)
      3'b000: result = alt ? diff[31:0] : in1 + in2;
      3'b001: result = in1 << in2[4:0];
      3'b010: result = {31'b0, lt};
      3'b011: result = {31'b0, ltu};
      3'b100: result = in1 ^ in2;
      3'b101: result = alt ? 32'($signed(in1) >>> in2[4:0]) : in1 >> in2[4:0];
      3'b110: result = in1 | in2;
      3'b111: result = in1 & in2;
    endcase

    unique case (funct3)
      3'b000:  br_taken = eq;
      3'b001:  br_taken = !eq;
      3'b100:  br_taken = lt;
      3'b101:  br_taken = !lt;
      3'b110:  br_taken = ltu;
      3'b111:  br_taken = !ltu;
      default: br_taken = 1'b0;
    endcase
  end
endmodule
