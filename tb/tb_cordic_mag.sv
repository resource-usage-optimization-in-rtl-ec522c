// tb_cordic_mag: sends random complex vectors (all quadrants, small and
// near-full-scale) through the pipelined CORDIC one per clock and compares
// each magnitude with sqrt(x^2 + y^2): error at most 4 LSB plus 2^-11 of the
// value (the angle left after 12 stages). Checks the latency of STAGES + 2
// clocks by matching outputs to inputs in order.
//
// The 12 stages follow the original design; the tolerance and latency
// checked are this design's own.
module tb_cordic_mag;
  localparam int W = 34, STAGES = 12, LAT = STAGES + 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  logic signed [W-1:0] xi = 0, yi = 0;
  logic [W-1:0] mag;
  real    expq [$];
  int     sent_cycle [$];
  int     cycle = 0;

  cordic_mag dut (.clk(clk), .rst(rst), .in_valid(in_valid), .x_in(xi), .y_in(yi),
    .out_valid(out_valid), .mag(mag));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      real e, err;
      int  c0;
      e  = expq.pop_front();
      c0 = sent_cycle.pop_front();
      err = real'(mag) - e;
      if (err < 0) err = -err;
      checks++;
      if (err > 4.0 + e / 2048.0 || cycle - c0 != LAT) begin
        failures++;
        if (failures < 10) $display("FAIL mag=%0d exp %f lat %0d", mag, e, cycle - c0);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      logic signed [W-1:0] a, b;
      automatic int sh = $urandom_range(0, 30);
      a = W'($signed({$urandom, $urandom})) >>> sh;
      b = W'($signed({$urandom, $urandom})) >>> sh;
      if (n == 0) begin a = {1'b1, {(W-1){1'b0}}}; b = a; end   // both most negative
      if (n == 1) begin a = 0; b = 0; end
      @(negedge clk);
      in_valid = 1; xi = a; yi = b;
      expq.push_back($sqrt(real'(a) * real'(a) + real'(b) * real'(b)));
      sent_cycle.push_back(cycle);
      if (n % 7 == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
