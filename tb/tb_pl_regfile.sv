// tb_pl_regfile: self-checking testbench of the pipelined core's register
// file.
//
// Random reads and writes are compared with a shadow array kept here. Checks:
// the read data appear in rs1_q/rs2_q one edge after the address with rd_en
// high and hold with rd_en low; a write to the register read on the same edge
// is seen immediately (write-through); x0 reads zero whatever is written to
// it. A watchdog bounds the run.
module tb_pl_regfile;
  logic        clk = 0;
  logic        rd_en, we;
  logic [4:0]  rs1_addr, rs2_addr, waddr;
  logic [31:0] rs1_q, rs2_q, wdata;
  logic [31:0] shadow [32];
  logic [31:0] exp1, exp2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pl_regfile dut (.clk, .rd_en, .rs1_addr, .rs2_addr, .rs1_q, .rs2_q, .we, .waddr, .wdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    rd_en = 0; we = 0; rs1_addr = 0; rs2_addr = 0; waddr = 0; wdata = 0;
    // fill every register
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1; waddr = 5'(r); wdata = $urandom;
      shadow[r] = (r == 0) ? 32'h0 : wdata;
    end
    @(negedge clk);
    we = 0;
    exp1 = 0; exp2 = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      rd_en = (i == 0) || ($urandom_range(0, 3) != 0);
      rs1_addr = 5'($urandom); rs2_addr = (i % 7 == 0) ? rs1_addr : 5'($urandom);
      we = 1'($urandom);
      waddr = (i % 3 == 0) ? rs1_addr : 5'($urandom);
      wdata = $urandom;
      if (rd_en) begin
        exp1 = (we && waddr == rs1_addr && rs1_addr != 0) ? wdata : shadow[rs1_addr];
        exp2 = (we && waddr == rs2_addr && rs2_addr != 0) ? wdata : shadow[rs2_addr];
      end
      if (we && waddr != 0) shadow[waddr] = wdata;
      @(posedge clk);
      #1;
      check(rs1_q == exp1, $sformatf("rs1 x%0d = %h expected %h", rs1_addr, rs1_q, exp1));
      check(rs2_q == exp2, $sformatf("rs2 x%0d = %h expected %h", rs2_addr, rs2_q, exp2));
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
