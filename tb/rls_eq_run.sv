// rls_eq_run: one complete equalizer test at tap count N, used by
// tb_rls_equalizer for N = 8, 12 and 16. It runs on its own clock and reports
// its check and failure counts, and raises done at the end.
//
// It sends BPSK symbols through a 4-tap channel with a little noise. It
// trains the equalizer on the known symbols and switches to a different
// channel while still training; the forgetting factor must let it follow.
// Then it lets the equalizer run on its own decisions. A floating-point RLS
// with the same regressor (N/2 received samples, N/2 past symbols),
// forgetting factor and initial P runs alongside.
// Checks:
//   - each output against the floating-point output, within 0.1, except for
//     the first 30 samples and the 50 after the switch;
//   - the error shrinking during training, and again after the switch;
//   - every decision correct in equalization mode;
//   - the weights, read through the w_addr port, against the floating-point
//     weights at the end;
//   - the 2N^2 + 3N + 7 clock schedule per sample;
//   - in_ready staying low while a sample is being processed.
//
// The conventional RLS recursion follows the original design; lambda, P(0),
// the channels, the noise and the tolerances are this design's or this
// testbench's own choices.
module rls_eq_run #(
  parameter int N = 16
) (
  output int checks,
  output int failures,
  output bit done
);
  import sdr_pkg::*;
  localparam int NFB = N / 2, NFF = N - NFB, FWL = 14, W = 26;
  localparam int EXP_CYC = 2 * N * N + 3 * N + 7;
  localparam real LAM = 16220.0 / 16384.0;
  localparam real NOISE = 0.1;            // uniform noise amplitude
  // channel A for the first NSWITCH samples, then channel B
  localparam int NSWITCH = 300, NTRAIN = 600, NDD = 250;
  initial begin
    checks = 0;
    failures = 0;
    done = 0;
  end
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, train = 1, out_valid, dec;
  logic signed [W-1:0] u = 0, d = 0, y, e, wd;
  logic [$clog2(N)-1:0] waddr = 0;
  eq_state_e state;
  int cycle = 0;

  rls_equalizer #(.N(N)) dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready),
    .u_in(u), .d_in(d), .train(train), .out_valid(out_valid), .y_out(y), .dec_out(dec),
    .e_out(e), .w_addr(waddr), .w_data(wd), .state(state));

  always @(posedge clk) cycle <= cycle + 1;

  // floating-point reference
  real P [N][N];
  real wr [N], phi [N], pv [N], kv [N], phi_last [N];

  function automatic real rls_step(real dref, bit use_dec, output real yout);
    real den = LAM, ee, dd;
    yout = 0.0;
    for (int i = 0; i < N; i++) yout += wr[i] * phi[i];
    dd = use_dec ? ((yout >= 0.0) ? 1.0 : -1.0) : dref;
    ee = dd - yout;
    for (int i = 0; i < N; i++) begin
      pv[i] = 0.0;
      for (int j = 0; j < N; j++) pv[i] += P[i][j] * phi[j];
    end
    for (int i = 0; i < N; i++) den += phi[i] * pv[i];
    for (int i = 0; i < N; i++) begin
      kv[i] = pv[i] / den;
      wr[i] += kv[i] * ee;
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) P[i][j] = (P[i][j] - kv[i] * pv[j]) / LAM;
    return dd;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (N=%0d): %s", N, msg);
    end
  endtask


  initial begin
    int  s [$];
    real err_early = 0.0, err_late = 0.0, err_a = 0.0;
    int  busy_violations = 0;
    real sum_dy = 0.0;
    for (int i = 0; i < N; i++) begin
      wr[i] = 0.0; phi[i] = 0.0;
      for (int j = 0; j < N; j++) P[i][j] = (i == j) ? 10.0 : 0.0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < NTRAIN + NDD; n++) begin
      real ur, yref, dref, noise;
      int  c0;
      logic signed [W-1:0] uq;
      s.push_back($urandom_range(0, 1) ? 1 : -1);
      noise = NOISE * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
      if (n < NSWITCH) begin
        ur = 0.9 * s[n] + noise;
        if (n >= 1) ur += 0.4 * s[n-1];
        if (n >= 2) ur += -0.25 * s[n-2];
        if (n >= 3) ur += 0.1 * s[n-3];
      end else begin
        ur = 0.9 * s[n] + 0.1 * s[n-1] + 0.2 * s[n-2] - 0.2 * s[n-3] + noise;
      end
      uq = W'($rtoi(ur * 16384.0));
      // reference regressor update (forward part)
      for (int i = NFF - 1; i > 0; i--) phi[i] = phi[i-1];
      phi[0] = real'(uq) / 16384.0;
      // drive one sample
      train = (n < NTRAIN);
      in_valid = 1; u = uq; d = W'(s[n] * 16384);
      @(posedge clk);
      c0 = cycle;
      @(negedge clk);
      in_valid = 0;
      while (!out_valid) begin
        if (in_ready && state != EQ_IDLE) busy_violations++;
        if (state != EQ_IDLE && in_ready) busy_violations++;
        @(negedge clk);
      end
      check(cycle - c0 == EXP_CYC, $sformatf("sample %0d took %0d clocks, exp %0d", n, cycle - c0, EXP_CYC));
      phi_last = phi;
      dref = rls_step(real'(s[n]), n >= NTRAIN, yref);
      for (int i = N - 1; i > NFF; i--) phi[i] = phi[i-1];
      phi[NFF] = dref;
      if (n >= 30 && !(n >= NSWITCH && n < NSWITCH + 50)) begin
        automatic real dy = real'(y) / 16384.0 - yref;
        if (dy < 0) dy = -dy;
        check(dy < 0.1, $sformatf("sample %0d y=%f ref=%f", n, real'(y) / 16384.0, yref));
        sum_dy += dy;
      end
      if (n < 20) err_early += (real'(e) / 16384.0) ** 2 / 20.0;
      if (n >= NSWITCH - 30 && n < NSWITCH) err_a += (real'(e) / 16384.0) ** 2;
      if (n >= NTRAIN - 30 && n < NTRAIN) err_late += (real'(e) / 16384.0) ** 2;
      if (n >= NTRAIN) check(dec == (s[n] > 0), $sformatf("decision %0d wrong", n));
    end
    check(err_a / 30.0 < err_early, $sformatf("training error did not fall: %f -> %f", err_early, err_a / 30.0));
    $display("N=%0d training MSE: start %f, before switch %f, end %f", N, err_early, err_a / 30.0, err_late / 30.0);
    check(err_a / 30.0 < 0.03, $sformatf("MSE before the channel switch %f", err_a / 30.0));
    // the forgetting factor lets the equalizer follow the channel switch
    check(err_late / 30.0 < 0.03, $sformatf("MSE after the channel switch %f", err_late / 30.0));
    $display("N=%0d mean |y - y_ref| = %f", N, sum_dy / real'(NTRAIN + NDD - 80));
    check(busy_violations == 0, "in_ready high while busy");
    // The regressor is ill-conditioned (forward and feedback taps carry the
    // same symbols), so the weights themselves may settle at a slightly
    // different point; what must agree is the output they give on the last
    // regressor, and each weight must stay near the reference.
    begin
      automatic real ydut = 0.0, yr = 0.0, dyf;
      for (int i = 0; i < N; i++) begin
        automatic real dw;
        waddr = $clog2(N)'(i);
        #1;
        ydut += real'(wd) / 16384.0 * phi_last[i];
        yr   += wr[i] * phi_last[i];
        dw = real'(wd) / 16384.0 - wr[i];
        if (dw < 0) dw = -dw;
        check(dw < 0.3, $sformatf("w[%0d]=%f ref %f", i, real'(wd) / 16384.0, wr[i]));
      end
      dyf = ydut - yr;
      if (dyf < 0) dyf = -dyf;
      check(dyf < 0.1, $sformatf("final weights give %f, reference %f", ydut, yr));
    end
    done = 1;
  end
endmodule
