// tb_systolic_corr: loads a random 16-sample complex training sequence and
// streams random complex samples, with idle clocks in between, through the
// systolic correlator. Every output is compared with the direct correlation
// sum_j conj(c_j) x(m - 15 + j), m = n - NTAPS - 1 for the output that follows
// input sample n, which also checks the pipeline latency.
//
// The 16 taps and 24-bit data follow the original design; the latency
// checked is this design's own pipeline.
module tb_systolic_corr;
  localparam int NT = 16, DW = 24, ACCW = 2 * DW + 2 + $clog2(NT);
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid = 0, coef_we = 0, out_valid;
  logic signed [DW-1:0] x_re = 0, x_im = 0, c_re = 0, c_im = 0;
  logic [3:0] coef_addr = 0;
  logic signed [ACCW-1:0] y_re, y_im;

  longint cr [NT], ci [NT];
  longint xr [$], xi [$];

  systolic_corr dut (.clk(clk), .rst(rst), .in_valid(in_valid), .x_re(x_re), .x_im(x_im),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_re(c_re), .coef_im(c_im),
    .out_valid(out_valid), .y_re(y_re), .y_im(y_im));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference check on every output.
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      automatic int n = xr.size() - 1;          // last accepted sample
      automatic int m = n - NT - 1;
      automatic longint er = 0, ei = 0;
      for (int j = 0; j < NT; j++) begin
        automatic int idx = m - (NT - 1) + j;
        if (idx >= 0) begin
          er += cr[j] * xr[idx] + ci[j] * xi[idx];   // conj(c) * x
          ei += cr[j] * xi[idx] - ci[j] * xr[idx];
        end
      end
      checks++;
      if (longint'(y_re) != er || longint'(y_im) != ei) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=(%0d,%0d) exp (%0d,%0d)", n, y_re, y_im, er, ei);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int j = 0; j < NT; j++) begin
      cr[j] = (j == 3) ? -longint'(8388608) : longint'($signed(24'($urandom)));
      ci[j] = (j == 3) ? -longint'(8388608) : longint'($signed(24'($urandom)));
      @(negedge clk);
      coef_we = 1; coef_addr = 4'(j); c_re = DW'(cr[j]); c_im = DW'(ci[j]);
    end
    @(negedge clk);
    coef_we = 0;
    for (int n = 0; n < 400; n++) begin
      logic signed [DW-1:0] a, b;
      a = (n == 5) ? -24'sd8388608 : 24'($urandom) >>> 0;
      b = (n == 5) ? -24'sd8388608 : 24'($urandom);
      @(negedge clk);
      in_valid = 1; x_re = a; x_im = b;
      @(posedge clk);
      xr.push_back(longint'(a)); xi.push_back(longint'(b));
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        in_valid = 0;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
