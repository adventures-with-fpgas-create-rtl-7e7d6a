// tb_pl_branch_predictor: self-checking testbench of the Decode-stage
// branch predictor.
//
// Instance `dut` (default configuration: static BTFNT with a 4-entry return
// address stack) gets directed instructions: JAL (always taken, J-immediate
// target), backward and forward conditional branches (taken / not taken),
// calls and returns nested deeper than the stack (the most recent four
// return addresses come back in reverse order), a JALR that is not a return
// (not predicted), a call while Decode does not advance (no push) and 200
// random conditional branches (taken exactly when the offset is negative).
// Instance `gs` (gshare, 4-bit index) receives random outcome updates and
// random queries; a model of the counters and history register kept here
// gives the expected direction. A watchdog bounds the run.
module tb_pl_branch_predictor;
  import rv_pkg::*;
  import rv_tb_pkg::*;

  logic        clk = 0, rst = 1;
  logic        d_valid = 0, d_fire = 0;
  logic [31:0] d_pc = 0, d_instr = NOP;
  logic        pred_taken, ras_pop;
  logic [31:0] pred_target, pred_next;
  logic [11:0] pred_idx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pl_branch_predictor dut (
    .clk, .rst, .d_valid, .d_pc, .d_instr, .d_fire,
    .pred_taken, .pred_target, .pred_next, .pred_idx, .ras_pop,
    .upd_valid(1'b0), .upd_taken(1'b0), .upd_idx(12'd0)
  );

  // gshare instance
  logic        g_valid = 0, g_upd = 0, g_taken = 0;
  logic [31:0] g_pc = 0, g_instr = NOP;
  logic        g_pred, g_pop;
  logic [31:0] g_target, g_next;
  logic [3:0]  g_idx, g_uidx = 0;

  pl_branch_predictor #(.MODE(BP_GSHARE), .RAS_EN(1'b0), .BHT_BITS(4)) gs (
    .clk, .rst, .d_valid(g_valid), .d_pc(g_pc), .d_instr(g_instr), .d_fire(1'b1),
    .pred_taken(g_pred), .pred_target(g_target), .pred_next(g_next), .pred_idx(g_idx),
    .ras_pop(g_pop), .upd_valid(g_upd), .upd_taken(g_taken), .upd_idx(g_uidx)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Present one instruction in Decode for one cycle; `fire` = it advances.
  task automatic present(input logic [31:0] pc, input logic [31:0] ins, input bit fire);
    @(negedge clk);
    d_valid = 1; d_pc = pc; d_instr = ins; d_fire = fire;
    #1;
  endtask

  initial begin
    logic [31:0] ret_pc [$];
    logic [1:0]  cnt [16];
    logic [3:0]  ghr;
    repeat (2) @(negedge clk);
    rst = 0;
    // JAL forward and backward
    present(32'h100, enc_j(5'd0, 21'd64), 1);
    check(pred_taken && pred_target == 32'h140 && pred_next == 32'h140, "jal forward");
    present(32'h100, enc_j(5'd0, -21'sd32), 1);
    check(pred_taken && pred_target == 32'hE0, "jal backward");
    // conditional branches: backward taken, forward not taken
    present(32'h200, enc_b(3'b001, 5'd5, 5'd0, -13'sd16), 1);
    check(pred_taken && pred_target == 32'h1F0 && pred_next == 32'h1F0, "backward branch taken");
    present(32'h200, enc_b(3'b000, 5'd5, 5'd0, 13'd16), 1);
    check(!pred_taken && pred_next == 32'h204, "forward branch not taken");
    // non-return JALR: not predicted
    present(32'h300, enc_i(7'b1100111, 3'b000, 5'd0, 5'd7, 12'd0), 1);
    check(!pred_taken && pred_next == 32'h304 && !ras_pop, "plain jalr not predicted");
    // six nested calls (deeper than the 4-entry stack), then four returns
    for (int k = 0; k < 6; k++) begin
      present(32'h1000 + 32'(k) * 32'h40, enc_j(5'd1, 21'd256), 1);
      ret_pc.push_back(32'h1000 + 32'(k) * 32'h40 + 4);
    end
    // a call that does not leave Decode must not push
    present(32'h5000, enc_j(5'd1, 21'd256), 0);
    for (int k = 0; k < 4; k++) begin
      logic [31:0] e;
      e = ret_pc.pop_back();
      present(32'h2000, enc_i(7'b1100111, 3'b000, 5'd0, 5'd1, 12'd0), 1);
      check(pred_taken && ras_pop && pred_target == e,
            $sformatf("return %0d predicted %h expected %h", k, pred_target, e));
    end
    // call through JALR with rd = x5 pushes too
    present(32'h3000, enc_i(7'b1100111, 3'b000, 5'd5, 5'd7, 12'd0), 1);
    present(32'h2000, enc_i(7'b1100111, 3'b000, 5'd0, 5'd5, 12'd0), 1);
    check(pred_taken && pred_target == 32'h3004, "jalr call then return via x5");
    // random conditional branches: taken exactly when the offset is negative
    for (int k = 0; k < 200; k++) begin
      logic [31:0] pc;
      logic [12:0] off;
      logic [2:0]  f3;
      pc  = {16'h0, 14'($urandom), 2'b00} + 32'h1_0000;
      off = {12'($urandom), 1'b0};
      f3  = ($urandom_range(0, 1) == 1) ? 3'($urandom_range(4, 7)) : 3'($urandom_range(0, 1));
      present(pc, enc_b(f3, 5'($urandom), 5'($urandom), off), 1);
      check(pred_taken == off[12] && !ras_pop &&
            pred_next == (off[12] ? pc + {{19{off[12]}}, off} : pc + 32'd4),
            $sformatf("branch at %h offset %h: taken %0d next %h", pc, off, pred_taken, pred_next));
    end
    @(negedge clk);
    d_valid = 0;
    #1;
    check(!pred_taken, "no prediction without a valid instruction");

    // ------------------------------------------------------------ gshare
    foreach (cnt[i]) cnt[i] = 2'b01;
    ghr = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      g_valid = 1;
      g_pc = {$urandom} & 32'h0000_00FC;
      g_instr = enc_b(3'b000, 5'd1, 5'd2, 13'd32);
      g_upd = 1'($urandom);
      g_taken = ($urandom_range(0, 3) != 0);
      g_uidx = 4'($urandom);
      #1;
      check(g_idx == (g_pc[5:2] ^ ghr), "gshare index");
      check(g_pred == cnt[g_pc[5:2] ^ ghr][1], $sformatf("gshare direction at %0d", i));
      if (g_pred) check(g_target == g_pc + 32, "gshare target");
      @(posedge clk);
      if (g_upd) begin
        if (g_taken && cnt[g_uidx] != 3) cnt[g_uidx]++;
        if (!g_taken && cnt[g_uidx] != 0) cnt[g_uidx]--;
        ghr = {ghr[2:0], g_taken};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
