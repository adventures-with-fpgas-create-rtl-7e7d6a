// tb_mc_core: self-checking testbench of the multi-cycle RV32I core.
//
// Phase 1 (timing, memory without wait cycles): a short directed program
// whose instruction-to-instruction times are known from the state sequence:
// 3 cycles for an ALU instruction (FETCH, WAIT_INSTR, EXECUTE), 4 for a load
// or store (one waiting cycle), 4 + n for a shift by n (bit-serial shifter).
// The times between instruction-fetch strobes are checked, then the values
// the program stored are compared with hand-computed results.
// Phase 2 (function, memory with random wait cycles): random programs from
// rv_progen run on the core and on the reference model rv_iss; at the end the
// data window and the register dump the program stores are compared word by
// word. The model keeps AUIPC results to the core's 24 address bits, as the
// core does. A watchdog ends the run with a failure if the core stops fetching.
module tb_mc_core;
  import rv_tb_pkg::*;

  logic        clk = 0;
  logic        reset_n = 0;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [3:0]  mem_wmask;
  logic        mem_rstrb, mem_rbusy, mem_wbusy;
  logic        wait_en = 0;
  logic        ld_we = 0;
  logic [31:0] ld_addr = 0, ld_data = 0;

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mc_core dut (
    .clk, .reset_n, .mem_addr, .mem_wdata, .mem_wmask, .mem_rdata,
    .mem_rstrb, .mem_rbusy, .mem_wbusy
  );

  mc_mem_model #(.MAX_WAIT(3)) u_mem (
    .clk, .addr(mem_addr), .wdata(mem_wdata), .wmask(mem_wmask), .rdata(mem_rdata),
    .rstrb(mem_rstrb), .rbusy(mem_rbusy), .wbusy(mem_wbusy), .wait_en,
    .ld_we, .ld_addr, .ld_data
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_program(input logic [31:0] words [$]);
    reset_n = 0;
    foreach (words[i]) begin
      @(negedge clk);
      ld_we = 1; ld_addr = 32'(i); ld_data = words[i];
    end
    @(negedge clk);
    ld_we = 0;
    repeat (2) @(negedge clk);
  endtask

  // Fetch strobes: record the cycle of each instruction fetch.
  longint fetch_cyc [$];
  logic [31:0] fetch_pc [$];
  always @(posedge clk)
    if (reset_n && mem_rstrb && mem_addr < 32'h4000) begin   // code lies below 0x4000, data above
      fetch_cyc.push_back(cyc);
      fetch_pc.push_back(mem_addr);
    end

  task automatic run_until_fetch(input logic [31:0] pc, input longint max_cycles);
    longint start;
    start = cyc;
    fetch_cyc.delete();
    fetch_pc.delete();
    @(negedge clk);
    reset_n = 1;
    while (!(fetch_pc.size() > 0 && fetch_pc[$] == pc) && cyc - start < max_cycles)
      @(posedge clk);
    check(fetch_pc.size() > 0 && fetch_pc[$] == pc, $sformatf("reached pc %h", pc));
    repeat (4) @(posedge clk);
  endtask

  function automatic logic [31:0] memword(input logic [31:0] a);
    return u_mem.mem[a[15:2]];
  endfunction

  initial begin
    logic [31:0] p [$];
    static int shifts = 0;
    // ---------------------------------------------------------- phase 1
    // x5 = 0x81; x6 = x5 << 7; x7 = x6 >>> 3 (sra, negative); sw, lb, lhu, add
    p.push_back(enc_u(7'b0110111, 5'd3, 20'h8));                      // 0  lui x3,8
    p.push_back(enc_i(7'b0010011, 3'b000, 5'd5, 5'd0, 12'h081));      // 4  addi x5,x0,0x81
    p.push_back(enc_i(7'b0010011, 3'b001, 5'd6, 5'd5, 12'd24));       // 8  slli x6,x5,24
    p.push_back(enc_i(7'b0010011, 3'b101, 5'd7, 5'd6, 12'h403));      // 12 srai x7,x6,3
    p.push_back(enc_s(3'b010, 5'd3, 5'd7, 12'd0));                    // 16 sw x7,0(x3)
    p.push_back(enc_i(7'b0000011, 3'b000, 5'd8, 5'd3, 12'd3));        // 20 lb x8,3(x3)
    p.push_back(enc_i(7'b0000011, 3'b101, 5'd9, 5'd3, 12'd2));        // 24 lhu x9,2(x3)
    p.push_back(enc_r(7'b0, 3'b000, 5'd10, 5'd8, 5'd9));              // 28 add x10,x8,x9
    p.push_back(enc_s(3'b010, 5'd3, 5'd10, 12'd4));                   // 32 sw x10,4(x3)
    p.push_back(enc_s(3'b000, 5'd3, 5'd5, 12'd9));                    // 36 sb x5,9(x3)
    p.push_back(enc_s(3'b001, 5'd3, 5'd5, 12'd14));                   // 40 sh x5,14(x3)
    p.push_back(enc_j(5'd0, 21'd0));                                  // 44 jal x0,0
    for (int i = 0; i < 4; i++) u_mem.mem[(32'h8000 >> 2) + i] = '0;
    wait_en = 0;
    load_program(p);
    run_until_fetch(32'd44, 500);
    begin
      // expected fetch-to-fetch times for the instructions at 0..40
      int exp_t [11] = '{3, 3, 4 + 24, 4 + 3, 4, 4, 4, 3, 4, 4, 4};
      for (int i = 0; i < 11; i++)
        check(fetch_cyc.size() > i + 1 && fetch_cyc[i+1] - fetch_cyc[i] == exp_t[i],
              $sformatf("cycles of instruction %0d: got %0d expected %0d", i,
                        (fetch_cyc.size() > i + 1) ? fetch_cyc[i+1] - fetch_cyc[i] : -1, exp_t[i]));
    end
    // x7 = 0x81000000 >>> 3 = 0xF0200000; lb of byte 3 = 0xF0 -> 0xFFFFFFF0;
    // lhu of half 1 = 0xF020; sum = 0x0000F010.
    check(memword(32'h8000) == 32'hF020_0000, "sra result");
    check(memword(32'h8004) == 32'h0000_F010, "lb + lhu");
    check(memword(32'h8008) == 32'h0000_8100, "sb lane 1");
    check(memword(32'h800C) == 32'h0081_0000, "sh upper half");

    // ---------------------------------------------------------- phase 2
    wait_en = 1;
    for (int t = 0; t < 16; t++) begin
      rv_progen gen;
      rv_iss    iss;
      int       steps;
      gen = new();
      gen.build(250, 4);
      iss = new();
      iss.pc_mask = 32'h00FF_FFFF;
      iss.imem = gen.prog;
      steps = 0;
      while (iss.pc != gen.end_pc && steps < 200000) begin
        iss_result_t r;
        r = iss.step();
        if (r.instr[6:0] == 7'b0010011 && (r.instr[14:12] == 3'b001 || r.instr[14:12] == 3'b101))
          shifts++;
        steps++;
      end
      check(iss.pc == gen.end_pc, "reference model reached the end");
      foreach (u_mem.mem[i]) u_mem.mem[i] = '0;
      load_program(gen.prog);
      run_until_fetch(gen.end_pc, 400000);
      for (logic [31:0] a = DATA_BASE - 128; a < DATA_BASE + 256 + 124; a += 4) begin
        check(memword(a) == iss.dmem[a[15:2]],
              $sformatf("program %0d word %h: core %h model %h", t, a, memword(a), iss.dmem[a[15:2]]));
      end
      $display("program %0d: %0d instructions, %0d cycles", t, steps,
               fetch_cyc.size() > 0 ? fetch_cyc[$] - fetch_cyc[0] : 0);
    end
    check(u_mem.rbusy_cycles > 0 && u_mem.wbusy_cycles > 0, "memory wait cycles happened");
    check(shifts > 0, "shifts executed");
    $display("read-wait cycles %0d, write-wait cycles %0d, shifts %0d",
             u_mem.rbusy_cycles, u_mem.wbusy_cycles, shifts);
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
