// tb_cmult3: checks the three-multiplier complex product against the
// four-multiplier textbook formula, its one-clock latency, and that the
// output holds while en is low.
//
// The 24-bit operand size follows the original design; the stimulus and the
// 1-clock latency check are this design's own.
module tb_cmult3;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0;
  always #5 clk = ~clk;

  logic signed [23:0] ar, ai, br, bi;
  logic signed [48:0] cr, ci;
  longint er, ei;

  cmult3 #(.AW(24), .BW(24)) dut (.clk(clk), .rst(rst), .en(en), .a_re(ar), .a_im(ai),
    .b_re(br), .b_im(bi), .c_re(cr), .c_im(ci));

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
    ar = 0; ai = 0; br = 0; bi = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      if (n < 4) begin
        ar <= -24'sd8388608; ai <= (n[0] ? 24'sd8388607 : -24'sd8388608);
        br <= -24'sd8388608; bi <= (n[1] ? 24'sd8388607 : -24'sd8388608);
      end else begin
        ar <= 24'($urandom); ai <= 24'($urandom); br <= 24'($urandom); bi <= 24'($urandom);
      end
      en <= 1;
      @(posedge clk);
      #1;
      // inputs were captured at this edge: the product must already be out
      er = longint'(ar) * br - longint'(ai) * bi;
      ei = longint'(ar) * bi + longint'(ai) * br;
      check(longint'(cr) == er && longint'(ci) == ei,
            $sformatf("(%0d,%0d)*(%0d,%0d) -> (%0d,%0d) exp (%0d,%0d)", ar, ai, br, bi, cr, ci, er, ei));
      // hold: en low, change inputs, output must not move
      en <= 0; ar <= 24'($urandom);
      @(posedge clk);
      #1;
      check(longint'(cr) == er && longint'(ci) == ei, "hold with en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
