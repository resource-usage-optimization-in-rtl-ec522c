// tb_cic_decim: drives random 12-bit samples (with gaps in in_valid) into the
// CIC decimator at rate 8 and then, after a reset, at rate 128, and compares
// every output with four cascaded moving sums of length R taken at the
// decimated instants, shifted down by 16 bits (floor), since the 24-bit output
// keeps the top of the 40-bit word.
//
// N = 4, rate 128 and the 24-bit truncation follow the original design; the
// other rates tested are this testbench's choice.
module tb_cic_decim;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  logic signed [11:0] din = 0;
  logic [7:0] rate = 8;
  logic signed [23:0] dout;
  longint xs [$];
  int     nout;

  cic_decim dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_data(din), .rate(rate),
    .out_valid(out_valid), .out_data(dout));

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      longint x [];
      longint full, exp_o;
      x = new[xs.size()];
      foreach (xs[i]) x[i] = xs[i];
      full  = cic_full(x, int'(rate), 4, nout);
      exp_o = full >>> 16;
      checks++;
      if (longint'(dout) != exp_o || xs.size() != nout * int'(rate) + int'(rate)) begin
        failures++;
        if (failures < 10) $display("FAIL R=%0d out %0d: %0d exp %0d (inputs %0d)", rate, nout, dout, exp_o, xs.size());
      end
      nout++;
    end
  end

  task automatic run(int r, int nin, int amp_full);
    @(negedge clk);
    rst = 1; rate = 8'(r); in_valid = 0;
    repeat (2) @(negedge clk);
    xs.delete(); nout = 0;
    rst = 0;
    for (int n = 0; n < nin; n++) begin
      logic signed [11:0] v;
      v = amp_full ? ((n % 64 < 32) ? 12'sd2047 : -12'sd2048) : 12'($urandom);
      @(negedge clk);
      in_valid = 1; din = v;
      @(posedge clk);
      xs.push_back(longint'(v));
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        in_valid = 0;
        @(posedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    run(8, 400, 0);
    run(128, 1536, 0);
    run(128, 1024, 1);
    run(16, 640, 1);
    if (checks < 100) begin failures++; $display("FAIL: too few outputs %0d", checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
