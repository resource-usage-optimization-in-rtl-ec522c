// tb_array_mult: checks the full-adder array multiplier exhaustively at the
// 4 x 4 size and with random operands at 17 x 17 (the size used inside the
// wide multiplier) against the simulator's own product.
//
// The 4 x 4 size is the one in the original design's figure; the 17 x 17
// random test and the checks are this testbench's own.
module tb_array_mult;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0]  x4, y4;  logic [7:0]  z4;
  logic [16:0] x17, y17; logic [33:0] z17;

  array_mult #(.W(4))  dut4  (.x(x4),  .y(y4),  .z(z4));
  array_mult #(.W(17)) dut17 (.x(x17), .y(y17), .z(z17));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
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
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        x4 = 4'(a); y4 = 4'(b);
        #1;
        check(z4 == 8'(a * b), $sformatf("4x4 %0d*%0d=%0d", a, b, z4));
      end
    x17 = '1; y17 = '1; #1;
    check(z17 == 34'(longint'(131071) * 131071), "17x17 max");
    for (int n = 0; n < 2000; n++) begin
      x17 = 17'($urandom); y17 = 17'($urandom);
      #1;
      check(z17 == 34'(longint'(x17) * longint'(y17)),
            $sformatf("17x17 %0d*%0d=%0d", x17, y17, z17));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
