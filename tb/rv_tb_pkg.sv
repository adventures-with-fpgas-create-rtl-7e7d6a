// rv_tb_pkg: verification helpers shared by the processor testbenches.
//
// * Instruction encoders for the RV32I formats.
// * Both classes optionally cover the M extension (field m_ext, off by
//   default): the model then executes MUL/MULH/MULHSU/MULHU/DIV/DIVU/REM/
//   REMU from the ISA definition (64-bit arithmetic, RISC-V results for
//   division by zero and overflow) and the generator emits them.
// * rv_iss: an instruction-set reference model of RV32I, written from the ISA
//   definition, independent of the RTL. step() executes one instruction and
//   returns what it wrote. Instruction and data memories are separate arrays
//   (the test programs never read their own code). CSR reads return a value the
//   model cannot know (cycle counters); the caller copies the DUT's value.
// * rv_progen: a random test-program generator. Programs start by giving every
//   register a random value and filling a 64-word data window around
//   DATA_BASE, then run a random mix of ALU operations, loads/stores of all
//   widths inside the window, load-use pairs, forward branches, counted
//   backward loops, calls and returns, computed jumps and CSR reads; they end
//   by storing x1..x30 after the window and spinning on `jal x0,0` at end_pc.
//   Register roles: x1 link, x3 data base, x4 loop counter, x6 computed-jump
//   base, x31 CSR destination (never read, its value is unpredictable).
package rv_tb_pkg;

  localparam logic [31:0] DATA_BASE = 32'h0000_8000;
  localparam int unsigned DMEM_WORDS = 16384;

  function automatic logic [31:0] enc_r(input logic [6:0] f7, input logic [2:0] f3,
                                        input logic [4:0] rd, rs1, rs2);
    return {f7, rs2, rs1, f3, rd, 7'b0110011};
  endfunction
  function automatic logic [31:0] enc_i(input logic [6:0] opc, input logic [2:0] f3,
                                        input logic [4:0] rd, rs1, input logic [11:0] imm);
    return {imm, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] enc_s(input logic [2:0] f3, input logic [4:0] rs1, rs2,
                                        input logic [11:0] imm);
    return {imm[11:5], rs2, rs1, f3, imm[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] enc_b(input logic [2:0] f3, input logic [4:0] rs1, rs2,
                                        input logic [12:0] off);
    return {off[12], off[10:5], rs2, rs1, f3, off[4:1], off[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] enc_u(input logic [6:0] opc, input logic [4:0] rd,
                                        input logic [19:0] imm);
    return {imm, rd, opc};
  endfunction
  function automatic logic [31:0] enc_j(input logic [4:0] rd, input logic [20:0] off);
    return {off[20], off[10:1], off[11], off[19:12], rd, 7'b1101111};
  endfunction

  localparam logic [31:0] NOP = 32'h0000_0013;

  typedef struct {
    logic [31:0] pc;
    logic [31:0] instr;
    logic        we;
    logic [4:0]  rd;
    logic [31:0] wdata;
    logic        csr;
    logic [3:0]  st_mask;
    logic [31:0] st_addr;
    logic [31:0] st_data;
  } iss_result_t;

  class rv_iss;
    logic [31:0] x [32];
    logic [31:0] pc;
    logic [31:0] imem [$];
    logic [31:0] dmem [DMEM_WORDS];
    // The multi-cycle core keeps PC-relative results (AUIPC, link) to its
    // address width; its testbench narrows this mask.
    logic [31:0] pc_mask = 32'hFFFF_FFFF;
    // RV32IM: execute OP instructions with funct7 = 0000001 as multiply/divide.
    bit          m_ext = 0;

    function new();
      foreach (x[i]) x[i] = '0;
      foreach (dmem[i]) dmem[i] = '0;
      pc = '0;
    endfunction

    function automatic logic [31:0] sext(input logic [31:0] v, input int bits);
      logic [31:0] m;
      m = 32'hFFFF_FFFF << bits;
      return v[bits-1] ? (v | m) : (v & ~m);
    endfunction

    function automatic iss_result_t step();
      iss_result_t r;
      logic [31:0] ins, a, b, ii, si, bi, ui, ji, res, nxt, addr, w;
      logic [6:0]  opc;
      logic [2:0]  f3;
      logic [4:0]  rd;
      int          idx;
      ins = (pc[31:2] < 30'(imem.size())) ? imem[pc[31:2]] : NOP;
      opc = ins[6:0]; f3 = ins[14:12]; rd = ins[11:7];
      a = x[ins[19:15]]; b = x[ins[24:20]];
      ii = sext({20'b0, ins[31:20]}, 12);
      si = sext({20'b0, ins[31:25], ins[11:7]}, 12);
      bi = sext({19'b0, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0}, 13);
      ui = {ins[31:12], 12'b0};
      ji = sext({11'b0, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0}, 21);
      r = '{pc: pc, instr: ins, we: 0, rd: rd, wdata: 0, csr: 0, st_mask: 0, st_addr: 0, st_data: 0};
      nxt = pc + 4;
      res = 0;
      case (opc)
        7'b0110111: begin r.we = 1; res = ui; end
        7'b0010111: begin r.we = 1; res = (pc + ui) & pc_mask; end
        7'b1101111: begin r.we = 1; res = pc + 4; nxt = pc + ji; end
        7'b1100111: begin r.we = 1; res = pc + 4; nxt = (a + ii) & ~32'd1; end
        7'b1100011: begin
          logic t;
          case (f3)
            3'b000: t = a == b;
            3'b001: t = a != b;
            3'b100: t = $signed(a) < $signed(b);
            3'b101: t = $signed(a) >= $signed(b);
            3'b110: t = a < b;
            3'b111: t = a >= b;
            default: t = 0;
          endcase
          if (t) nxt = pc + bi;
        end
        7'b0000011: begin
          r.we = 1;
          addr = a + ii;
          idx = int'(addr[15:2]);
          w = dmem[idx] >> (8 * addr[1:0]);
          case (f3)
            3'b000: res = sext(w & 32'hFF, 8);
            3'b001: res = sext(w & 32'hFFFF, 16);
            3'b010: res = dmem[idx];
            3'b100: res = w & 32'hFF;
            3'b101: res = w & 32'hFFFF;
            default: res = dmem[idx];
          endcase
        end
        7'b0100011: begin
          addr = a + si;
          idx = int'(addr[15:2]);
          case (f3)
            3'b000: begin r.st_mask = 4'b0001 << addr[1:0]; w = {4{b[7:0]}}; end
            3'b001: begin r.st_mask = addr[1] ? 4'b1100 : 4'b0011; w = {2{b[15:0]}}; end
            default: begin r.st_mask = 4'b1111; w = b; end
          endcase
          for (int k = 0; k < 4; k++)
            if (r.st_mask[k]) dmem[idx][8*k +: 8] = w[8*k +: 8];
          r.st_addr = addr; r.st_data = w;
        end
        7'b0010011, 7'b0110011: begin
          logic [31:0] op2;
          logic reg_form;
          reg_form = opc[5];
          op2 = reg_form ? b : ii;
          r.we = 1;
          if (reg_form && m_ext && ins[31:25] == 7'b0000001) begin
            longint      sa, sb;
            logic [63:0] pu;
            sa = longint'($signed(a));
            sb = longint'($signed(b));
            pu = {32'b0, a} * {32'b0, b};
            case (f3)
              3'b000: res = 32'(sa * sb);
              3'b001: res = 32'((sa * sb) >>> 32);
              3'b010: res = 32'((sa * longint'({32'b0, b})) >>> 32);
              3'b011: res = pu[63:32];
              3'b100: res = (b == 0) ? 32'hFFFF_FFFF :
                            (a == 32'h8000_0000 && b == 32'hFFFF_FFFF) ? a : 32'(sa / sb);
              3'b101: res = (b == 0) ? 32'hFFFF_FFFF : a / b;
              3'b110: res = (b == 0) ? a :
                            (a == 32'h8000_0000 && b == 32'hFFFF_FFFF) ? 32'd0 : 32'(sa % sb);
              default: res = (b == 0) ? a : a % b;
            endcase
          end else
          case (f3)
            3'b000: res = (reg_form && ins[30]) ? a - op2 : a + op2;
            3'b001: res = a << op2[4:0];
            3'b010: res = {31'b0, $signed(a) < $signed(op2)};
            3'b011: res = {31'b0, a < op2};
            3'b100: res = a ^ op2;
            3'b101: res = ins[30] ? 32'($signed(a) >>> op2[4:0]) : a >> op2[4:0];
            3'b110: res = a | op2;
            default: res = a & op2;
          endcase
        end
        7'b1110011: begin
          if (f3 != 0) begin r.we = 1; r.csr = 1; end
        end
        default: ;
      endcase
      r.we = r.we && rd != 0;
      r.wdata = res;
      if (r.we) x[rd] = res;
      pc = nxt;
      return r;
    endfunction
  endclass

  class rv_progen;
    logic [31:0] prog [$];
    logic [31:0] end_pc;
    int          n_calls;
    int          call_sites [$];
    // RV32IM programs: also emit multiply/divide instructions.
    bit          m_ext = 0;

    function automatic logic [4:0] rand_rd();
      logic [4:0] r;
      do r = 5'($urandom_range(0, 30));
      while (r == 1 || r == 3 || r == 4 || r == 6);
      return r;
    endfunction
    function automatic logic [4:0] rand_rs();
      return 5'($urandom_range(0, 30));
    endfunction

    function void emit(input logic [31:0] w);
      prog.push_back(w);
    endfunction

    function void alu_op(input logic [4:0] rd);
      logic [2:0] f3;
      f3 = 3'($urandom_range(0, 7));
      if (m_ext && $urandom_range(0, 3) == 0) begin
        emit(enc_r(7'b0000001, f3, rd, rand_rs(), rand_rs()));
      end else if ($urandom_range(0, 1) == 1) begin
        logic [6:0] f7;
        f7 = ((f3 == 3'b000 || f3 == 3'b101) && $urandom_range(0, 1) == 1) ? 7'b0100000 : 7'b0;
        emit(enc_r(f7, f3, rd, rand_rs(), rand_rs()));
      end else begin
        logic [11:0] imm;
        imm = 12'($urandom);
        if (f3 == 3'b001) imm = {7'b0, imm[4:0]};
        if (f3 == 3'b101) imm = {1'b0, imm[10], 5'b0, imm[4:0]};
        emit(enc_i(7'b0010011, f3, rd, rand_rs(), imm));
      end
    endfunction

    function void chunk();
      int kind;
      kind = $urandom_range(0, 15);
      case (kind)
        0, 1, 2: alu_op(rand_rd());
        3: emit(enc_u(7'b0110111, rand_rd(), 20'($urandom)));
        4: emit(enc_u(7'b0010111, rand_rd(), 20'($urandom)));
        5, 6: begin  // load
          logic [2:0] f3;
          int off;
          f3 = 3'({1'b0, 2'($urandom_range(0, 2))});
          if (f3 != 3'b010 && $urandom_range(0, 1) == 1) f3[2] = 1'b1;
          off = $urandom_range(0, 255) - 128;
          off = (f3[1:0] == 2'b10) ? (off & ~3) : (f3[1:0] == 2'b01) ? (off & ~1) : off;
          emit(enc_i(7'b0000011, f3, rand_rd(), 5'd3, 12'(off)));
        end
        7: begin     // store
          logic [2:0] f3;
          int off;
          f3 = 3'($urandom_range(0, 2));
          off = $urandom_range(0, 255) - 128;
          off = (f3 == 3'b010) ? (off & ~3) : (f3 == 3'b001) ? (off & ~1) : off;
          emit(enc_s(f3, 5'd3, rand_rs(), 12'(off)));
        end
        8: begin     // load immediately used
          logic [4:0] rd;
          do rd = rand_rd(); while (rd == 0);
          emit(enc_i(7'b0000011, 3'b010, rd, 5'd3, 12'(($urandom_range(0, 63) - 32) * 4)));
          if ($urandom_range(0, 1) == 1)
            emit(enc_r(7'b0, 3'b000, rand_rd(), rd, rand_rs()));
          else
            emit(enc_r(7'b0, 3'b100, rand_rd(), rand_rs(), rd));
        end
        9, 10: begin // forward branch over k instructions
          int k;
          logic [2:0] f3;
          k = $urandom_range(1, 3);
          do f3 = 3'($urandom_range(0, 7)); while (f3 == 3'b010 || f3 == 3'b011);
          emit(enc_b(f3, rand_rs(), rand_rs(), 13'((k + 1) * 4)));
          for (int i = 0; i < k; i++) alu_op(rand_rd());
        end
        11: begin    // counted loop (backward branch)
          int n, body;
          n = $urandom_range(2, 5);
          body = $urandom_range(1, 3);
          emit(enc_i(7'b0010011, 3'b000, 5'd4, 5'd0, 12'(n)));
          for (int i = 0; i < body; i++) alu_op(rand_rd());
          emit(enc_i(7'b0010011, 3'b000, 5'd4, 5'd4, 12'hFFF));
          emit(enc_b(3'b001, 5'd4, 5'd0, 13'(-(body + 1) * 4)));
        end
        12: begin    // call, patched later
          call_sites.push_back(prog.size());
          emit(32'h0);
        end
        13: begin    // computed jump over one instruction
          emit(enc_u(7'b0010111, 5'd6, 20'd0));
          emit(enc_i(7'b1100111, 3'b000, 5'd0, 5'd6, 12'd12));
          alu_op(rand_rd());
        end
        14: emit(enc_i(7'b1110011, 3'b010, 5'd31, 5'd0,
                       ($urandom_range(0, 1) == 1) ? 12'hC00 : 12'hC02));
        default: alu_op(rand_rd());
      endcase
    endfunction

    // Builds a program of about `chunks` random pieces plus `funcs` functions.
    function void build(input int chunks, input int funcs);
      int func_at [$];
      prog.delete();
      call_sites.delete();
      for (int r = 1; r < 32; r++) begin
        emit(enc_u(7'b0110111, 5'(r), 20'($urandom)));
        emit(enc_i(7'b0010011, 3'b000, 5'(r), 5'(r), 12'($urandom)));
      end
      emit(enc_u(7'b0110111, 5'd3, DATA_BASE[31:12]));
      emit(enc_i(7'b0010011, 3'b000, 5'd4, 5'd0, 12'd0));
      for (int k = 0; k < 64; k++)
        emit(enc_s(3'b010, 5'd3, 5'($urandom_range(5, 30)), 12'(k * 4 - 128)));
      for (int c = 0; c < chunks; c++) chunk();
      for (int r = 1; r < 31; r++)
        emit(enc_s(3'b010, 5'd3, 5'(r), 12'(256 + r * 4)));
      end_pc = 32'(prog.size() * 4);
      emit(enc_j(5'd0, 21'd0));
      for (int f = 0; f < funcs; f++) begin
        func_at.push_back(prog.size());
        for (int i = 0; i < $urandom_range(1, 3); i++) alu_op(rand_rd());
        emit(enc_i(7'b1100111, 3'b000, 5'd0, 5'd1, 12'd0));
      end
      foreach (call_sites[i]) begin
        int tgt;
        tgt = func_at[$urandom_range(0, funcs - 1)];
        prog[call_sites[i]] = enc_j(5'd1, 21'((tgt - call_sites[i]) * 4));
      end
    endfunction
  endclass

endpackage
