// tb_peak_detect: builds bursts of 12 complex correlation values whose
// magnitudes follow a sinc-shaped peak at a random fractional position (with a
// random phase on each value) and runs them through the peak detector. The
// reference repeats the early/late search in floating point on the exact
// magnitudes: the integer peak must match (a lag within 0.1% of the largest
// counts as a tie), the time of arrival must agree to within 4/256 of a
// sample, and the interpolated peak value to within 0.5%.
// The number of clocks from the last input to out_valid is checked against
// the CORDIC latency plus the fixed interpolation schedule, and the state
// machine must pass through all four states.
//
// The 12 lags, 8 steps and 1/256 resolution follow the original design; the
// synthetic sinc-shaped bursts, the tolerances and the latency checked are
// this design's own.
module tb_peak_detect;
  import tb_ref_pkg::*;
  import sdr_pkg::*;
  localparam int NL = 12, W = 34, ITER = 8, HALF = 4, STAGES = 12;
  // CORDIC, store of the last magnitude, setup, 8 x (early + late) + final
  // value, Output Ready.
  localparam int EXP_LAT = (STAGES + 2) + 1 + 1 + ITER * 4 * HALF + 2 * HALF + 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start = 0, in_valid = 0, out_valid;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic signed [15:0] toa;
  logic [3:0] pidx;
  logic [W-1:0] pval;
  pd_state_e state;
  int cycle = 0;
  bit seen [4];

  peak_detect dut (.clk(clk), .rst(rst), .start(start), .in_valid(in_valid), .in_re(in_re),
    .in_im(in_im), .out_valid(out_valid), .toa_q8(toa), .peak_index(pidx), .peak_val(pval),
    .state(state));

  always @(posedge clk) begin
    cycle <= cycle + 1;
    seen[state] = 1'b1;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic burst(real p0, real amp);
    real m [];
    int  last_cycle, ref_pos, best;
    real ref_val, dv;
    m = new[NL];
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int k = 0; k < NL; k++) begin
      real mag, ph, s;
      logic signed [W-1:0] re, im;
      s   = sinc((real'(k) - p0) * 0.7);
      mag = amp * (s < 0 ? -s : s) + amp * 0.02 * real'($urandom_range(0, 100)) / 100.0;
      ph  = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
      re  = W'($rtoi(mag * $cos(ph)));
      im  = W'($rtoi(mag * $sin(ph)));
      m[k] = $sqrt(real'(re) * real'(re) + real'(im) * real'(im));
      in_valid = 1; in_re = re; in_im = im;
      @(posedge clk);
      last_cycle = cycle;
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(0, 1) == 1) @(negedge clk);
    end
    while (!out_valid) @(negedge clk);
    best = 0;
    for (int k = 1; k < NL; k++) if (m[k] > m[best]) best = k;
    ref_pos = peak_search(m, ITER, HALF);
    ref_val = interp_val(m, real'(toa) / 256.0, HALF);
    dv = real'(pval) - ref_val;
    if (dv < 0) dv = -dv;
    // a lag within 0.1% of the largest counts as a tie (CORDIC rounding)
    check(int'(pidx) < NL && m[pidx] >= 0.999 * m[best], $sformatf("peak index %0d exp %0d", pidx, best));
    check(int'(toa) - ref_pos <= 4 && ref_pos - int'(toa) <= 4,
          $sformatf("toa %0d exp %0d (p0 %f)", toa, ref_pos, p0));
    check(dv <= ref_val * 0.005 + 8.0, $sformatf("peak value %0d exp %f", pval, ref_val));
    check(cycle - last_cycle == EXP_LAT, $sformatf("latency %0d exp %0d", cycle - last_cycle, EXP_LAT));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    burst(5.0, 1.0e9);
    burst(0.3, 3.0e9);
    burst(10.8, 5.0e8);
    for (int n = 0; n < 40; n++)
      burst(1.0 + 9.0 * real'($urandom_range(0, 1000)) / 1000.0,
            1.0e6 * real'($urandom_range(1, 8000)));
    for (int s = 0; s < 4; s++) check(seen[s], $sformatf("state %0d never reached", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
