// tb_wide_mult35: checks the 35 x 35 signed multiplier built from four
// 18 x 18 partial products against a direct 70-bit product, for the corner
// operands (most negative, most positive, -1, 0, half boundaries) and random
// ones.
//
// The 35 x 35 operand size follows the original design; the operand choice
// is this testbench's own.
module tb_wide_mult35;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [34:0] a, b;
  logic signed [69:0] p, ref_p;

  wide_mult35 dut (.a(a), .b(b), .p(p));

  task automatic try(logic signed [34:0] aa, logic signed [34:0] bb);
    a = aa; b = bb;
    #1;
    ref_p = 70'(aa) * 70'(bb);
    checks++;
    if (p !== ref_p) begin
      failures++;
      if (failures < 10) $display("FAIL: %0d * %0d = %0d, expected %0d", aa, bb, p, ref_p);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [34:0] corner [8];
    corner = '{35'sh4_0000_0000, 35'sh3_FFFF_FFFF, -35'sd1, 35'sd0, 35'sd1,
               35'sh0_0001_FFFF, 35'sh0_0002_0000, -35'sh0_0002_0000};
    foreach (corner[i]) foreach (corner[j]) try(corner[i], corner[j]);
    for (int n = 0; n < 5000; n++) try(35'({$urandom, $urandom}), 35'({$urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
