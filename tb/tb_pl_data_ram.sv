// tb_pl_data_ram: self-checking testbench of the data memory.
//
// Random byte-masked writes and reads over a 1024-word memory are compared
// with a shadow copy. Checks that only the bytes enabled by `wmask` change,
// that read data appear one edge after the address, that a read and a write
// of the same word on one edge return the old contents, and that `rdata`
// holds while `rd_en` is low. A watchdog bounds the run.
module tb_pl_data_ram;
  localparam int W = 1024;
  logic        clk = 0;
  logic        rd_en = 0;
  logic [3:0]  wmask = 0;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic [31:0] shadow [W];
  logic [31:0] expv;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pl_data_ram #(.WORDS(W)) dut (.clk, .addr, .rd_en, .rdata, .wmask, .wdata);

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      addr = 32'(i * 4); wmask = 4'hF; wdata = $urandom; shadow[i] = wdata;
    end
    expv = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      addr = {$urandom} & 32'h0000_0FFF;
      rd_en = 1'($urandom);
      wmask = ($urandom_range(0, 1) == 1) ? 4'($urandom) : 4'h0;
      wdata = $urandom;
      if (rd_en) expv = shadow[addr[11:2]];
      for (int b = 0; b < 4; b++)
        if (wmask[b]) shadow[addr[11:2]][8*b +: 8] = wdata[8*b +: 8];
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %h -> %h expected %h", addr, rdata, expv);
      end
    end
    // read everything back
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      addr = 32'(i * 4); wmask = 0; rd_en = 1;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== shadow[i]) begin
        failures++;
        if (failures < 10) $display("FAIL: final word %0d -> %h expected %h", i, rdata, shadow[i]);
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
