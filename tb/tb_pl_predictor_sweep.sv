// tb_pl_predictor_sweep: benchmark-style workload run on the pipelined
// system in all five branch-prediction configurations (none, BTFNT,
// BTFNT + return stack, gshare, gshare + return stack), side by side, plus
// gshare + return stack with the fast (1-cycle) correction path.
//
// The workload is a fixed-point (Q12) escape-time renderer of a 40 x 20
// pixel image: for each pixel a function (called with JAL, returning with
// JALR through x1) iterates z <- z^2 + c up to 16 times with MUL and an
// arithmetic shift, leaving through a forward branch when |z|^2 >= 4 and
// looping through a backward branch otherwise; the count is stored as one
// byte per pixel. The horizontal step is computed with DIV. The program is
// assembled here with the encoders of rv_tb_pkg; its expected image comes
// from the reference model rv_iss. It exercises what a ray tracer or a
// benchmark loop stresses in a pipeline: nested loops, data-dependent
// branches, calls/returns and products used by the next instruction.
//
// Checks, for every configuration: the stored image equals the model's,
// the number of retired instructions equals the model's. Across
// configurations: every predictor takes fewer cycles than none, the return
// stack removes almost all JALR mispredictions (hit rate above 95 %), and
// static + stack beats static alone. CPI, branch and JALR hit rates are
// printed per configuration. A watchdog ends a hung run with a failure.
module tb_pl_predictor_sweep;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  localparam int NCFG = 6;
  localparam int W = 40, H = 20;
  localparam bp_mode_e CFG_MODE [NCFG] = '{BP_NONE, BP_BTFNT, BP_BTFNT, BP_GSHARE, BP_GSHARE, BP_GSHARE};
  localparam bit       CFG_RAS  [NCFG] = '{1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1};
  localparam bit       CFG_FAST [NCFG] = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1};
  localparam string    CFG_NAME [NCFG] = '{"none", "static (BTFNT)", "static + RAS", "gshare", "gshare + RAS", "gshare+RAS fast"};

  logic        clk = 0;
  logic        rst = 1;
  logic        ld_we = 0;
  logic [13:0] ld_addr = 0;
  logic [31:0] ld_data = 0;
  logic [31:0] end_pc = '1;

  int     checks = 0, failures = 0;
  longint n_cyc  [NCFG];
  longint n_ret  [NCFG];
  longint n_br   [NCFG];
  longint n_brm  [NCFG];
  longint n_jr   [NCFG];
  longint n_jrm  [NCFG];
  bit     done   [NCFG];
  logic [7:0] golden [W*H];

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    logic        rt_valid, rt_we;
    logic [31:0] rt_pc, rt_instr, rt_wdata;
    logic [4:0]  rt_rd;
    logic [3:0]  st_wmask;
    logic [31:0] st_addr, st_wdata;
    pl_events_t  ev;
    logic [7:0]  img [W*H];

    pl_system #(.BP_MODE(CFG_MODE[g]), .RAS_EN(CFG_RAS[g]), .FAST_BRANCH(CFG_FAST[g])) dut (
      .clk, .rst, .ld_we, .ld_addr, .ld_data,
      .rt_valid, .rt_pc, .rt_instr, .rt_we, .rt_rd, .rt_wdata,
      .st_wmask, .st_addr, .st_wdata, .ev
    );

    always @(posedge clk) begin
      if (rst) begin
        done[g] <= 1'b0;
      end else if (!done[g]) begin
        n_cyc[g] <= n_cyc[g] + 1;
        n_ret[g] <= n_ret[g] + 64'(ev.retire);
        n_br[g]  <= n_br[g]  + 64'(ev.branch);
        n_brm[g] <= n_brm[g] + 64'(ev.branch_miss);
        n_jr[g]  <= n_jr[g]  + 64'(ev.jalr);
        n_jrm[g] <= n_jrm[g] + 64'(ev.jalr_miss);
        if (st_wmask != 4'b0000 && st_addr >= DATA_BASE && st_addr < DATA_BASE + W*H)
          for (int k = 0; k < 4; k++)
            if (st_wmask[k]) img[st_addr - DATA_BASE - 32'(st_addr[1:0]) + k] = st_wdata[8*k +: 8];
        if (rt_valid && rt_pc == end_pc) done[g] <= 1'b1;
      end
    end
  end

  // ------------------------------------------------------------- program
  function automatic void build(ref logic [31:0] p [$], output logic [31:0] endpc);
    int mandel, yloop, xloop, mloop, mdone, call_at;
    p.delete();
    // main
    p.push_back(enc_u(7'b0110111, 5'd3, 20'h8));                     // lui  x3, 0x8      (image base)
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd5, 5'd0, 12'd3));       // addi x5, x0, 3
    p.push_back(enc_i(7'b0010011, 3'b001, 5'd5, 5'd5, 12'd12));      // slli x5, x5, 12   (3.0)
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd6, 5'd0, 12'(W)));      // addi x6, x0, W
    p.push_back(enc_r(7'b0000001, 3'b100, 5'd25, 5'd5, 5'd6));       // div  x25, x5, x6  (x step)
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd17, 5'd0, 12'd16));     // addi x17, x0, 16  (max iterations)
    p.push_back(enc_u(7'b0110111, 5'd18, 20'h4));                    // lui  x18, 4       (4.0)
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd10, 5'd0, 12'd0));      // addi x10, x0, 0   (y)
    p.push_back(enc_u(7'b0110111, 5'd13, 20'hFFFFF));                // lui  x13, -1      (cy = -1.0)
    yloop = p.size();
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd11, 5'd0, 12'd0));      // addi x11, x0, 0   (x)
    p.push_back(enc_u(7'b0110111, 5'd12, 20'hFFFFE));                // lui  x12, -2      (cx = -2.0)
    xloop = p.size();
    call_at = p.size();
    p.push_back(32'h0);                                              // jal  x1, mandel (patched)
    p.push_back(enc_s(3'b000, 5'd3, 5'd14, 12'd0));                  // sb   x14, 0(x3)
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd3, 5'd3, 12'd1));       // addi x3, x3, 1
    p.push_back(enc_r(7'b0, 3'b000, 5'd12, 5'd12, 5'd25));           // add  x12, x12, x25
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd11, 5'd11, 12'd1));     // addi x11, x11, 1
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd5, 5'd0, 12'(W)));      // addi x5, x0, W
    p.push_back(enc_b(3'b100, 5'd11, 5'd5, 13'(($signed(xloop) - $signed(p.size())) * 4))); // blt x11, x5, xloop
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd13, 5'd13, 12'd410));   // addi x13, x13, 410 (y step)
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd10, 5'd10, 12'd1));     // addi x10, x10, 1
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd5, 5'd0, 12'(H)));      // addi x5, x0, H
    p.push_back(enc_b(3'b100, 5'd10, 5'd5, 13'(($signed(yloop) - $signed(p.size())) * 4))); // blt x10, x5, yloop
    endpc = 32'(p.size()) * 4;
    p.push_back(enc_j(5'd0, 21'd0));                                 // jal  x0, 0 (end)
    // mandel(cx = x12, cy = x13) -> x14 iterations
    mandel = p.size();
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd15, 5'd0, 12'd0));      // addi x15, x0, 0   (zr)
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd16, 5'd0, 12'd0));      // addi x16, x0, 0   (zi)
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd14, 5'd0, 12'd0));      // addi x14, x0, 0   (i)
    mloop = p.size();
    p.push_back(enc_r(7'b0000001, 3'b000, 5'd19, 5'd15, 5'd15));     // mul  x19, x15, x15
    p.push_back(enc_i(7'b0010011, 3'b101, 5'd19, 5'd19, 12'h40C));   // srai x19, x19, 12
    p.push_back(enc_r(7'b0000001, 3'b000, 5'd20, 5'd16, 5'd16));     // mul  x20, x16, x16
    p.push_back(enc_i(7'b0010011, 3'b101, 5'd20, 5'd20, 12'h40C));   // srai x20, x20, 12
    p.push_back(enc_r(7'b0, 3'b000, 5'd21, 5'd19, 5'd20));           // add  x21, x19, x20
    mdone = p.size() + 9;
    p.push_back(enc_b(3'b101, 5'd21, 5'd18, 13'((mdone - p.size()) * 4)));  // bge x21, x18, done
    p.push_back(enc_r(7'b0000001, 3'b000, 5'd22, 5'd15, 5'd16));     // mul  x22, x15, x16
    p.push_back(enc_i(7'b0010011, 3'b101, 5'd22, 5'd22, 12'h40B));   // srai x22, x22, 11
    p.push_back(enc_r(7'b0, 3'b000, 5'd16, 5'd22, 5'd13));           // add  x16, x22, x13
    p.push_back(enc_r(7'b0100000, 3'b000, 5'd15, 5'd19, 5'd20));     // sub  x15, x19, x20
    p.push_back(enc_r(7'b0, 3'b000, 5'd15, 5'd15, 5'd12));           // add  x15, x15, x12
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd14, 5'd14, 12'd1));     // addi x14, x14, 1
    p.push_back(enc_b(3'b100, 5'd14, 5'd17, 13'(($signed(mloop) - $signed(p.size())) * 4))); // blt x14, x17, mloop
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd0, 5'd0, 12'd0));       // nop
    if (p.size() != mdone) $fatal(1, "workload layout");
    p.push_back(enc_i(7'b1100111, 3'b000, 5'd0, 5'd1, 12'd0));       // jalr x0, 0(x1)   (return)
    p[call_at] = enc_j(5'd1, 21'((mandel - call_at) * 4));
  endfunction

  initial begin
    logic [31:0] prog [$];
    rv_iss       iss;
    longint      steps;
    int          levels [17];
    build(prog, end_pc);

    // expected image from the reference model
    iss = new();
    iss.m_ext = 1;
    iss.imem = prog;
    steps = 0;
    while (iss.pc != end_pc && steps < 2_000_000) begin
      void'(iss.step());
      steps++;
    end
    check(iss.pc == end_pc, "reference model reached the end of the workload");
    foreach (golden[i]) golden[i] = iss.dmem[(DATA_BASE >> 2) + (i >> 2)][8 * (i % 4) +: 8];
    foreach (levels[i]) levels[i] = 0;
    foreach (golden[i]) if (golden[i] <= 8'd16) levels[5'(golden[i])]++;
    check(levels[16] > 0 && levels[16] < W * H, "image has inside and outside pixels");

    // load the program into all five systems, then run them together
    foreach (prog[i]) begin
      @(negedge clk);
      ld_we = 1; ld_addr = 14'(i); ld_data = prog[i];
    end
    @(negedge clk);
    ld_we = 0;
    foreach (n_cyc[g]) begin
      n_cyc[g] = 0; n_ret[g] = 0; n_br[g] = 0; n_brm[g] = 0; n_jr[g] = 0; n_jrm[g] = 0;
    end
    repeat (2) @(negedge clk);
    rst = 0;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    @(negedge clk);

    $display("workload: %0d instructions (model)", steps + 1);
    $display("%-16s %10s %10s %8s %12s %12s", "predictor", "cycles", "retired", "CPI", "branch hit", "JALR hit");
    for (int g = 0; g < NCFG; g++) begin
      $display("%-16s %10d %10d %8.3f %11.2f%% %11.2f%%", CFG_NAME[g], n_cyc[g], n_ret[g],
               real'(n_cyc[g]) / real'(n_ret[g]),
               100.0 * real'(n_br[g] - n_brm[g]) / real'(n_br[g]),
               100.0 * real'(n_jr[g] - n_jrm[g]) / real'(n_jr[g]));
      check(n_ret[g] == steps + 1,
            $sformatf("%s: retired %0d, model %0d", CFG_NAME[g], n_ret[g], steps + 1));
      for (int i = 0; i < W * H; i++)
        check(cfg_img(g, i) == golden[i],
              $sformatf("%s: pixel %0d = %0d, model %0d", CFG_NAME[g], i, cfg_img(g, i), golden[i]));
      if (g > 0) check(n_cyc[g] < n_cyc[0], $sformatf("%s faster than no prediction", CFG_NAME[g]));
    end
    check(n_cyc[2] < n_cyc[1], "return stack improves the static predictor");
    check(n_cyc[4] < n_cyc[3], "return stack improves gshare");
    check(100 * (n_jr[2] - n_jrm[2]) > 95 * n_jr[2], "return stack predicts returns");
    check(100 * (n_jr[4] - n_jrm[4]) > 95 * n_jr[4], "return stack predicts returns (gshare)");
    check(n_jrm[1] == n_jr[1], "without the stack every return is mispredicted");
    check(n_cyc[5] < n_cyc[4] && n_brm[5] == n_brm[4],
          "fast correction: same mispredictions, fewer cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] cfg_img(input int g, input int i);
    case (g)
      0: return cfg[0].img[i];
      1: return cfg[1].img[i];
      2: return cfg[2].img[i];
      3: return cfg[3].img[i];
      4: return cfg[4].img[i];
      default: return cfg[5].img[i];
    endcase
  endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
