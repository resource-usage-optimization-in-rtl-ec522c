// tb_series_recip: feeds positive Q12.14 values (every power of two, values
// just around the 1.5 normalisation boundary and random ones) through the
// series-expansion reciprocal one per clock. Each result must be within
// 2^-14 relative plus 2 LSB of 2^28 / b, or saturate at the largest word when
// 1/b does not fit. The three-clock latency is checked by matching in order.
//
// The series follows the original design; the Q12.14 range, tolerance and
// saturation checked are this design's own choices.
module tb_series_recip;
  localparam int IWL = 12, FWL = 14, W = IWL + FWL, LAT = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  logic [W-1:0] b = 0;
  logic signed [W-1:0] r;
  longint bq [$];
  int     cq [$];
  int     cycle = 0;
  localparam longint RMAX = (longint'(1) << (W - 1)) - 1;

  series_recip dut (.clk(clk), .rst(rst), .in_valid(in_valid), .b(b), .out_valid(out_valid), .r(r));

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
      longint bb;
      int     c0;
      real    ideal, diff;
      bit     ok;
      bb    = bq.pop_front();
      c0    = cq.pop_front();
      ideal = (bb == 0) ? 1.0e30 : real'(longint'(1) << (2 * FWL)) / real'(bb);
      diff  = real'(r) - ideal;
      if (diff < 0.0) diff = -diff;
      if (ideal >= real'(RMAX)) ok = (longint'(r) == RMAX);
      else ok = (diff <= 2.0 + ideal / 16384.0);
      checks++;
      if (!ok || cycle - c0 != LAT) begin
        failures++;
        if (failures < 10) $display("FAIL b=%0d r=%0d ideal=%f lat=%0d", bb, r, ideal, cycle - c0);
      end
    end
  end

  task automatic send(longint v);
    @(negedge clk);
    in_valid = 1; b = W'(v);
    bq.push_back(v); cq.push_back(cycle);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    send(0);
    for (int p = 0; p < W - 1; p++) send(longint'(1) << p);
    for (int p = 2; p < W - 1; p++) begin
      send((longint'(3) << (p - 1)) - 1);   // just below 1.5 * 2^p
      send((longint'(3) << (p - 1)));       // exactly 1.5 * 2^p
      send((longint'(1) << (p + 1)) - 1);   // just below 2^(p+1)
    end
    for (int n = 0; n < 3000; n++) send(longint'($urandom_range(1, (1 << (W - 1)) - 1)) >> $urandom_range(0, 20));
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    if (bq.size() != 0) begin failures++; $display("FAIL: %0d results missing", bq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
