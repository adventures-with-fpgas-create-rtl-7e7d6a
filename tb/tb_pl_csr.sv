// tb_pl_csr: self-checking testbench of the counter CSRs.
//
// After reset, runs a random retire pattern while counting cycles and
// retirements here, and reads cycle, time, instret and their upper halves at
// random moments. A value read on an edge is the counter's value before that
// edge, so the expected value is the count of edges since reset before the
// read. Also checks that an unknown CSR reads 0 and that the upper halves
// read 0 this early. A watchdog bounds the run.
module tb_pl_csr;
  logic        clk = 0, rst = 1, retire = 0, rd_en = 0;
  logic [11:0] addr = 0;
  logic [31:0] rdata;
  longint      ncyc, nret;
  logic [31:0] expv;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pl_csr dut (.clk, .rst, .retire, .rd_en, .addr, .rdata);

  initial begin
    logic [11:0] names [7] = '{12'hC00, 12'hC01, 12'hC02, 12'hC80, 12'hC81, 12'hC82, 12'h123};
    repeat (3) @(negedge clk);
    rst = 0;
    ncyc = 0; nret = 0;
    expv = 0;
    for (int i = 0; i < 3000; i++) begin
      retire = 1'($urandom);
      rd_en = ($urandom_range(0, 2) == 0);
      addr = names[$urandom_range(0, 6)];
      if (rd_en)
        case (addr)
          12'hC00, 12'hC01: expv = ncyc[31:0];
          12'hC02:          expv = nret[31:0];
          12'hC80, 12'hC81: expv = ncyc[63:32];
          12'hC82:          expv = nret[63:32];
          default:          expv = 0;
        endcase
      @(posedge clk);
      ncyc++;
      if (retire) nret++;
      #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL: csr %h -> %0d expected %0d", addr, rdata, expv);
      end
      @(negedge clk);
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
