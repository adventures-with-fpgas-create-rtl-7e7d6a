// tb_pl_prog_rom: self-checking testbench of the program memory.
//
// Loads random words through the load port, then reads random byte
// addresses and checks that the addressed word appears in `instr` exactly one
// edge after the address (synchronous read), and that `instr` holds its value
// while `rd_en` is low (fetch stall). Uses a 1024-word memory. A watchdog
// bounds the run.
module tb_pl_prog_rom;
  localparam int W = 1024;
  logic        clk = 0;
  logic        rd_en = 0, ld_we = 0;
  logic [31:0] addr = 0, instr, ld_data = 0;
  logic [9:0]  ld_addr = 0;
  logic [31:0] shadow [W];
  logic [31:0] expv;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pl_prog_rom #(.WORDS(W)) dut (.clk, .rd_en, .addr, .instr, .ld_we, .ld_addr, .ld_data);

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = 10'(i); ld_data = $urandom; shadow[i] = ld_data;
    end
    @(negedge clk);
    ld_we = 0;
    expv = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      rd_en = (i == 0) || ($urandom_range(0, 4) != 0);
      addr = {$urandom} & 32'h0000_0FFC;
      if (rd_en) expv = shadow[addr[11:2]];
      @(posedge clk);
      #1;
      checks++;
      if (instr !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %h rd_en %0d -> %h expected %h", addr, rd_en, instr, expv);
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
