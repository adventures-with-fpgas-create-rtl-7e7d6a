// tb_pl_core: self-checking testbench of the pipelined core in its gshare
// configuration (global-history predictor with return address stack) with
// the fast (1-cycle, from Execute) correction path, with the program and data
// memories of the design around it. The default registered correction is
// covered by tb_pl_system and tb_rv_top.
//
// Phase 1 runs a short directed program (loop, load-use pair, forward
// branch, call and return) and checks the written values, the instruction
// count, the single load-use stall and the return-stack hit; the cycle count
// must lie between the ideal 20 and the worst case of every branch and the
// return being corrected at 1 cycle each. Phase 2 runs random programs from rv_progen in
// lockstep with the reference model rv_iss, comparing PC, destination and
// value of every retired instruction, and requires every pipeline mechanism
// (stall, bypass from M and W, prediction, return stack, correction) to have
// occurred. A watchdog ends a hung run with a failure.
module tb_pl_core;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  logic        clk = 0;
  logic        rst = 1;
  logic        ld_we = 0;
  logic [13:0] ld_addr = 0;
  logic [31:0] ld_data = 0;
  logic        rt_valid, rt_we;
  logic [31:0] rt_pc, rt_instr, rt_wdata;
  logic [4:0]  rt_rd;
  pl_events_t  ev;

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic        imem_en;
  logic [31:0] imem_addr, imem_instr, dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_ren;
  logic [3:0]  dmem_wmask;

  pl_core #(.BP_MODE(BP_GSHARE), .RAS_EN(1'b1), .FAST_BRANCH(1'b1)) dut (
    .clk, .rst, .imem_en, .imem_addr, .imem_instr,
    .dmem_addr, .dmem_ren, .dmem_wmask, .dmem_wdata, .dmem_rdata,
    .rt_valid, .rt_pc, .rt_instr, .rt_we, .rt_rd, .rt_wdata, .ev
  );

  pl_prog_rom u_rom (
    .clk, .rd_en(imem_en), .addr(imem_addr), .instr(imem_instr),
    .ld_we, .ld_addr, .ld_data
  );

  pl_data_ram u_ram (
    .clk, .addr(dmem_addr), .rd_en(dmem_ren), .rdata(dmem_rdata),
    .wmask(dmem_wmask), .wdata(dmem_wdata)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------ event counters
  longint n_retire, n_stall, n_fm1, n_fm2, n_fw1, n_fw2, n_br, n_brmiss;
  longint n_jalr, n_jalrmiss, n_pred, n_ras, n_corr;
  initial begin
    n_retire = 0; n_stall = 0; n_fm1 = 0; n_fm2 = 0; n_fw1 = 0; n_fw2 = 0;
    n_br = 0; n_brmiss = 0; n_jalr = 0; n_jalrmiss = 0; n_pred = 0; n_ras = 0; n_corr = 0;
  end
  always @(posedge clk) if (!rst) begin
    n_retire   += ev.retire;
    n_stall    += ev.load_stall;
    n_fm1      += ev.fwd_m_rs1;
    n_fm2      += ev.fwd_m_rs2;
    n_fw1      += ev.fwd_w_rs1;
    n_fw2      += ev.fwd_w_rs2;
    n_br       += ev.branch;
    n_brmiss   += ev.branch_miss;
    n_jalr     += ev.jalr;
    n_jalrmiss += ev.jalr_miss;
    n_pred     += ev.pred_taken;
    n_ras      += ev.ras_pop;
    n_corr     += ev.correction;
  end

  // ------------------------------------------------------------ lockstep
  rv_iss       iss;
  bit          lockstep = 0;
  bit          done = 0;
  logic [31:0] end_pc;
  longint      first_retire, end_retire, n_insn;
  logic [31:0] wr_val [32];

  always @(posedge clk) begin
    if (!rst && rt_valid && !done) begin
      if (n_insn == 0) first_retire = cyc;
      n_insn++;
      if (rt_we) wr_val[rt_rd] = rt_wdata;
      if (lockstep) begin
        iss_result_t r;
        r = iss.step();
        check(rt_pc == r.pc, $sformatf("retired pc %h, model pc %h", rt_pc, r.pc));
        check(rt_we == r.we && (!r.we || rt_rd == r.rd),
              $sformatf("pc %h: write enable/rd %0d/%0d model %0d/%0d", rt_pc, rt_we, rt_rd, r.we, r.rd));
        if (r.we && r.csr) iss.x[r.rd] = rt_wdata;
        else if (r.we)
          check(rt_wdata == r.wdata,
                $sformatf("pc %h (%h): x%0d = %h, model %h", rt_pc, rt_instr, rt_rd, rt_wdata, r.wdata));
      end
      if (rt_pc == end_pc) begin
        done = 1;
        end_retire = cyc;
      end
    end
  end

  task automatic run(input logic [31:0] words [$], input logic [31:0] endpc,
                     input longint max_cycles);
    longint start;
    rst = 1;
    foreach (words[i]) begin
      @(negedge clk);
      ld_we = 1; ld_addr = 14'(i); ld_data = words[i];
    end
    @(negedge clk);
    ld_we = 0;
    end_pc = endpc;
    done = 0;
    n_insn = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    start = cyc;
    while (!done && cyc - start < max_cycles) @(posedge clk);
    check(done, $sformatf("program reached its end at %h", endpc));
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] p [$];
    // ------------------------------------------------------------ phase 1
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd5, 5'd0, 12'd3));   //  0 addi x5,x0,3
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd6, 5'd0, 12'd0));   //  4 addi x6,x0,0
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd6, 5'd6, 12'd1));   //  8 addi x6,x6,1
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd5, 5'd5, 12'hFFF)); // 12 addi x5,x5,-1
    p.push_back(enc_b(3'b001, 5'd5, 5'd0, -13'sd8));             // 16 bne x5,x0,8
    p.push_back(enc_u(7'b0110111, 5'd3, 20'h8));                 // 20 lui x3,8
    p.push_back(enc_s(3'b010, 5'd3, 5'd6, 12'd0));               // 24 sw x6,0(x3)
    p.push_back(enc_i(7'b0000011, 3'b010, 5'd7, 5'd3, 12'd0));   // 28 lw x7,0(x3)
    p.push_back(enc_r(7'b0, 3'b000, 5'd8, 5'd7, 5'd7));          // 32 add x8,x7,x7
    p.push_back(enc_b(3'b000, 5'd0, 5'd0, 13'd8));               // 36 beq x0,x0,44
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd9, 5'd0, 12'd1));   // 40 addi x9,x0,1
    p.push_back(enc_j(5'd1, 21'd12));                            // 44 jal x1,56
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd10, 5'd0, 12'd7));  // 48 addi x10,x0,7
    p.push_back(enc_j(5'd0, 21'd0));                             // 52 jal x0,52
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd11, 5'd0, 12'd5));  // 56 addi x11,x0,5
    p.push_back(enc_i(7'b1100111, 3'b000, 5'd0, 5'd1, 12'd0));   // 60 jalr x0,0(x1)
    foreach (wr_val[i]) wr_val[i] = '0;
    lockstep = 0;
    run(p, 32'd52, 200);
    check(n_insn == 21, $sformatf("directed program retired %0d instructions, expected 21", n_insn));
    check(end_retire - first_retire >= 20 && end_retire - first_retire <= 20 + 1 + 4 * 1,
          $sformatf("directed program took %0d cycles", end_retire - first_retire));
    check(wr_val[6] == 3 && wr_val[8] == 6 && wr_val[10] == 7 && wr_val[11] == 5 && wr_val[9] == 0,
          $sformatf("directed results x6=%0d x8=%0d x9=%0d x10=%0d x11=%0d",
                    wr_val[6], wr_val[8], wr_val[9], wr_val[10], wr_val[11]));
    check(wr_val[1] == 48, "link register");
    check(n_stall == 1 && n_ras == 1,
          $sformatf("directed events: stalls %0d corrections %0d ras %0d", n_stall, n_corr, n_ras));

    // ------------------------------------------------------------ phase 2
    lockstep = 1;
    for (int t = 0; t < 6; t++) begin
      rv_progen gen;
      gen = new();
      gen.m_ext = 1;
      gen.build(400, 5);
      iss = new();
      iss.m_ext = 1;
      iss.imem = gen.prog;
      run(gen.prog, gen.end_pc, 100000);
    end
    $display("retired %0d, load stalls %0d, fwd M rs1/rs2 %0d/%0d, fwd W rs1/rs2 %0d/%0d",
             n_retire, n_stall, n_fm1, n_fm2, n_fw1, n_fw2);
    $display("branches %0d (miss %0d), jalr %0d (miss %0d), predicted taken %0d, ras pops %0d, corrections %0d",
             n_br, n_brmiss, n_jalr, n_jalrmiss, n_pred, n_ras, n_corr);
    check(n_stall > 1, "load-use stall happened");
    check(n_fm1 > 0 && n_fm2 > 0, "bypass from M for rs1 and rs2 happened");
    check(n_fw1 > 0 && n_fw2 > 0, "bypass from W for rs1 and rs2 happened");
    check(n_pred > 0 && n_ras > 1 && n_brmiss > 0 && n_jalrmiss > 0, "predictions and corrections happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
