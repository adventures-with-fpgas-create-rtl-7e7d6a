// mc_mem_model: behavioural memory for the multi-cycle core's bus, used by
// testbenches only.
//
// WORDS x 32-bit, byte addressed (wraps above 4*WORDS). A read strobe latches
// the address and starts a random wait of 0..MAX_WAIT cycles during which
// `rbusy` is high; `rdata` shows the addressed word as soon as `rbusy` is low.
// A write (`wmask` non-zero) updates the enabled bytes on the clock edge and
// holds `wbusy` high for a random 0..MAX_WAIT cycles. With `wait_en` low
// there are no wait cycles (read data one cycle after the strobe). A load port (`ld_*`,
// word address) lets the testbench place a program before reset is released.
// Counters of the cycles with busy lines high let a testbench see that the
// core's waiting state was exercised.
module mc_mem_model #(
  parameter int unsigned WORDS    = 16384,
  parameter int unsigned MAX_WAIT = 3
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic [3:0]  wmask,
  output logic [31:0] rdata,
  input  logic        rstrb,
  output logic        rbusy,
  output logic        wbusy,
  input  logic        wait_en,
  input  logic        ld_we,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_data
);
  localparam int AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];
  logic [AW-1:0] raddr;
  int unsigned rcnt = 0, wcnt = 0;
  int unsigned rbusy_cycles = 0, wbusy_cycles = 0;

  assign rbusy = rcnt != 0;
  assign wbusy = wcnt != 0;
  assign rdata = rbusy ? 32'hDEAD_BEEF : mem[raddr];   // data not valid while busy

  initial foreach (mem[i]) mem[i] = '0;

  always @(posedge clk) begin
    if (ld_we) mem[ld_addr[AW-1:0]] <= ld_data;
    if (rcnt != 0) begin rcnt <= rcnt - 1; rbusy_cycles <= rbusy_cycles + 1; end
    if (wcnt != 0) begin wcnt <= wcnt - 1; wbusy_cycles <= wbusy_cycles + 1; end
    if (rstrb) begin
      raddr <= addr[AW+1:2];
      rcnt  <= wait_en ? $urandom_range(0, MAX_WAIT) : 0;
    end
    if (wmask != 4'b0) begin
      for (int b = 0; b < 4; b++)
        if (wmask[b]) mem[addr[AW+1:2]][8*b +: 8] <= wdata[8*b +: 8];
      wcnt <= wait_en ? $urandom_range(0, MAX_WAIT) : 0;
    end
  end
endmodule
