// tb_pl_muldiv: self-checking testbench of the M-extension unit pl_muldiv.
//
// For all eight operations (funct3 0..7) the unit's result is compared with
// a reference computed here from 64-bit integer arithmetic and the RISC-V
// rules for the special cases. Operands are: the corner values 0, 1, -1,
// 2^31-1, -2^31 and small numbers paired with each other (this includes
// division by zero and the -2^31 / -1 overflow), then random 32-bit values,
// random small values and random divisors of a few bits. The unit is
// combinational, so each result is sampled 1 time unit after the inputs
// change. A watchdog ends a hung run with a failure.
module tb_pl_muldiv;

  logic [31:0] a, b, result;
  logic [2:0]  funct3;
  logic        clk = 0;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  pl_muldiv dut (.a, .b, .funct3, .result);

  function automatic logic [31:0] ref_md(input logic [31:0] x, y, input logic [2:0] f);
    longint      sx, sy;
    logic [63:0] pu;
    sx = longint'($signed(x));
    sy = longint'($signed(y));
    pu = {32'b0, x} * {32'b0, y};
    case (f)
      3'd0: return 32'(sx * sy);
      3'd1: return 32'((sx * sy) >>> 32);
      3'd2: return 32'((sx * longint'({32'b0, y})) >>> 32);
      3'd3: return pu[63:32];
      3'd4: return (y == 0) ? 32'hFFFF_FFFF :
                   (x == 32'h8000_0000 && y == 32'hFFFF_FFFF) ? x : 32'(sx / sy);
      3'd5: return (y == 0) ? 32'hFFFF_FFFF : x / y;
      3'd6: return (y == 0) ? x :
                   (x == 32'h8000_0000 && y == 32'hFFFF_FFFF) ? 32'd0 : 32'(sx % sy);
      default: return (y == 0) ? x : x % y;
    endcase
  endfunction

  task automatic try(input logic [31:0] x, y);
    for (int f = 0; f < 8; f++) begin
      logic [31:0] exp;
      a = x; b = y; funct3 = 3'(f);
      #1;
      exp = ref_md(x, y, 3'(f));
      checks++;
      if (result !== exp) begin
        failures++;
        if (failures < 20)
          $display("FAIL: funct3 %0d a %h b %h: got %h expected %h", f, x, y, result, exp);
      end
    end
  endtask

  initial begin
    static logic [31:0] corner [10] = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000,
                                 32'd7, 32'hFFFF_FFF9, 32'd3, 32'h0001_0000, 32'hFFFF_0000};
    foreach (corner[i]) foreach (corner[j]) try(corner[i], corner[j]);
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] x, y;
      case (n % 3)
        0: begin x = $urandom; y = $urandom; end
        1: begin x = 32'($signed(8'($urandom))); y = 32'($signed(4'($urandom))); end
        default: begin x = $urandom; y = $urandom >> $urandom_range(20, 31); end
      endcase
      try(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
