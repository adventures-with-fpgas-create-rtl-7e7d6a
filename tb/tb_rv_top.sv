// tb_rv_top: end-to-end testbench of the whole design at its default sizes.
//
// Both processors run at the same time from the top level, each on its own
// random programs (rv_progen) checked against the reference model rv_iss:
// * pipelined processor: every instruction leaving WB is compared in
//   lockstep (PC, destination register, value);
// * multi-cycle processor, on a behavioural memory with random wait cycles:
//   the data window and the register dump its program stores are compared
//   with the model's memory at the end.
// Each mechanism must have happened at least once: load-use stall, bypass
// from M and from W for both operands, predicted-taken redirect, return-stack
// prediction, branch and JALR correction with flush, multiply/divide
// (pipelined, RV32IM programs); serial
// shifts, loads/stores and bus waits (multi-cycle). The top's parameters are
// left at their defaults. A watchdog ends a hung run with a failure.
module tb_rv_top;
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
  logic [3:0]  st_wmask;
  logic [31:0] st_addr, st_wdata;
  pl_events_t  ev;

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // multi-cycle processor side
  logic        mc_reset_n = 0;
  logic [31:0] mc_addr, mc_wdata, mc_rdata;
  logic [3:0]  mc_wmask;
  logic        mc_rstrb, mc_rbusy, mc_wbusy;
  logic        mc_ld_we = 0;
  logic [31:0] mc_ld_addr = 0, mc_ld_data = 0;

  rv_top dut (
    .clk,
    .pl_rst(rst), .pl_ld_we(ld_we), .pl_ld_addr(ld_addr), .pl_ld_data(ld_data),
    .pl_rt_valid(rt_valid), .pl_rt_pc(rt_pc), .pl_rt_instr(rt_instr), .pl_rt_we(rt_we),
    .pl_rt_rd(rt_rd), .pl_rt_wdata(rt_wdata),
    .pl_st_wmask(st_wmask), .pl_st_addr(st_addr), .pl_st_wdata(st_wdata), .pl_ev(ev),
    .mc_reset_n, .mc_mem_addr(mc_addr), .mc_mem_wdata(mc_wdata), .mc_mem_wmask(mc_wmask),
    .mc_mem_rdata(mc_rdata), .mc_mem_rstrb(mc_rstrb), .mc_mem_rbusy(mc_rbusy),
    .mc_mem_wbusy(mc_wbusy)
  );

  mc_mem_model #(.MAX_WAIT(3)) u_mem (
    .clk, .addr(mc_addr), .wdata(mc_wdata), .wmask(mc_wmask), .rdata(mc_rdata),
    .rstrb(mc_rstrb), .rbusy(mc_rbusy), .wbusy(mc_wbusy), .wait_en(1'b1),
    .ld_we(mc_ld_we), .ld_addr(mc_ld_addr), .ld_data(mc_ld_data)
  );

  // instruction-fetch strobes of the multi-cycle core (code lies below 0x4000)
  logic [31:0] mc_last_fetch = 32'hFFFF_FFFF;
  always @(posedge clk)
    if (mc_reset_n && mc_rstrb && mc_addr < 32'h4000) mc_last_fetch <= mc_addr;

  task automatic mc_run(input int t, output int shifts, output int mem_ops);
    rv_progen gen;
    rv_iss    iss;
    int       steps;
    longint   start;
    gen = new();
    gen.build(300, 4);
    iss = new();
    iss.pc_mask = 32'h00FF_FFFF;
    iss.imem = gen.prog;
    steps = 0; shifts = 0; mem_ops = 0;
    while (iss.pc != gen.end_pc && steps < 200000) begin
      iss_result_t r;
      r = iss.step();
      if (r.instr[6:0] == 7'b0010011 && (r.instr[14:12] == 3'b001 || r.instr[14:12] == 3'b101)) shifts++;
      if (r.instr[6:0] == 7'b0110011 && (r.instr[14:12] == 3'b001 || r.instr[14:12] == 3'b101)) shifts++;
      if (r.instr[6:0] == 7'b0000011 || r.instr[6:0] == 7'b0100011) mem_ops++;
      steps++;
    end
    mc_reset_n = 0;
    foreach (u_mem.mem[i]) u_mem.mem[i] = '0;
    foreach (gen.prog[i]) begin
      @(negedge clk);
      mc_ld_we = 1; mc_ld_addr = 32'(i); mc_ld_data = gen.prog[i];
    end
    @(negedge clk);
    mc_ld_we = 0;
    mc_last_fetch = 32'hFFFF_FFFF;
    @(negedge clk);
    mc_reset_n = 1;
    start = cyc;
    while (mc_last_fetch != gen.end_pc && cyc - start < 400000) @(posedge clk);
    check(mc_last_fetch == gen.end_pc, "multi-cycle core reached the end of its program");
    repeat (4) @(posedge clk);
    for (logic [31:0] a = DATA_BASE - 128; a < DATA_BASE + 256 + 124; a += 4)
      check(u_mem.mem[a[15:2]] == iss.dmem[a[15:2]],
            $sformatf("multi-cycle program %0d word %h: core %h model %h", t, a,
                      u_mem.mem[a[15:2]], iss.dmem[a[15:2]]));
    $display("multi-cycle program %0d: %0d instructions in %0d cycles", t, steps, cyc - start);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------ event counters
  longint n_retire, n_stall, n_fm1, n_fm2, n_fw1, n_fw2, n_br, n_brmiss;
  longint n_jalr, n_jalrmiss, n_pred, n_ras, n_corr, n_md;
  initial begin
    n_retire = 0; n_stall = 0; n_fm1 = 0; n_fm2 = 0; n_fw1 = 0; n_fw2 = 0;
    n_br = 0; n_brmiss = 0; n_jalr = 0; n_jalrmiss = 0; n_pred = 0; n_ras = 0; n_corr = 0; n_md = 0;
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
    n_md       += ev.muldiv;
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
    int mc_shifts = 0, mc_mem_ops = 0;
    lockstep = 1;
    fork
      begin : pipelined
        for (int t = 0; t < 4; t++) begin
          rv_progen gen;
          gen = new();
          gen.m_ext = 1;
          gen.build(400, 5);
          iss = new();
          iss.m_ext = 1;
          iss.imem = gen.prog;
          run(gen.prog, gen.end_pc, 100000);
        end
      end
      begin : multicycle
        for (int t = 0; t < 3; t++) begin
          int s, m;
          mc_run(t, s, m);
          mc_shifts += s;
          mc_mem_ops += m;
        end
      end
    join
    $display("pipelined: retired %0d, load stalls %0d, fwd M rs1/rs2 %0d/%0d, fwd W rs1/rs2 %0d/%0d",
             n_retire, n_stall, n_fm1, n_fm2, n_fw1, n_fw2);
    $display("pipelined: branches %0d (miss %0d), jalr %0d (miss %0d), predicted taken %0d, ras pops %0d, corrections %0d",
             n_br, n_brmiss, n_jalr, n_jalrmiss, n_pred, n_ras, n_corr);
    $display("pipelined: multiply/divide %0d", n_md);
    $display("multi-cycle: shifts %0d, loads/stores %0d, read-wait cycles %0d, write-wait cycles %0d",
             mc_shifts, mc_mem_ops, u_mem.rbusy_cycles, u_mem.wbusy_cycles);
    check(n_stall > 0, "pipelined: load-use stall happened");
    check(n_fm1 > 0 && n_fm2 > 0, "pipelined: bypass from M for rs1 and rs2 happened");
    check(n_fw1 > 0 && n_fw2 > 0, "pipelined: bypass from W for rs1 and rs2 happened");
    check(n_pred > 0, "pipelined: predicted-taken redirect happened");
    check(n_ras > 0, "pipelined: return-stack prediction happened");
    check(n_brmiss > 0 && n_jalrmiss > 0 && n_corr > 0, "pipelined: correction with flush happened");
    check(n_md > 0, "pipelined: multiply/divide executed");
    check(mc_shifts > 0, "multi-cycle: serial shifts happened");
    check(mc_mem_ops > 0, "multi-cycle: loads and stores happened");
    check(u_mem.rbusy_cycles > 0 && u_mem.wbusy_cycles > 0, "multi-cycle: bus wait cycles happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
