// tb_sdr_rx_top: end-to-end test of the receiver at its default (full) size:
// 12-bit ADC, 4-stage CIC decimating by 128, 16-tap complex correlator,
// 12-lag peak detector and 16-tap RLS equalizer.
//
// Burst timing path: the ADC carries QPSK symbols, each held for 128 ADC
// samples (one decimated sample), with small noise and random gaps in
// adc_valid. Before each burst the symbol boundary is shifted by a random
// number of ADC samples so the correlation peak falls between decimated
// samples. Each burst contains the 16-symbol training sequence at a random
// position; the same sequence is loaded into the correlator through the
// coefficient port. References:
//   - every decimated sample against four cascaded length-128 moving sums of
//     the ADC input (exact integer), keeping the top 24 of 40 bits;
//   - the 12 correlation lags recomputed from the decimated samples, their
//     magnitudes, and the early/late sinc search in floating point: the
//     integer peak must match (a lag within 0.1% of the largest counts as
//     a tie), the time of arrival must agree within 4/256 sample and the
//     peak value within 1%.
// Equalizer path: BPSK symbols through a 4-tap channel, 80 training samples
// then 60 decision-directed samples, offered at random times so that the
// in_valid/in_ready handshake has to wait. Decisions must all be correct and
// the training error must fall.
//
// Every mechanism is counted and a mechanism that never occurred counts as a
// failure: decimated samples, coefficient writes, lags handed to the peak
// detector, each peak-detector state, time of arrival before and after the
// integer peak, adc_valid gaps, equalizer training and decision-directed
// samples, divisions, and handshake stalls.
//
// Sizes are those of the original design (decimation by 128, 16/27-sample
// correlation, 12 lags, 16-tap equalizer); the QPSK bursts, channel, noise
// and tolerances are this testbench's own.
module tb_sdr_rx_top;
  import tb_ref_pkg::*;
  import sdr_pkg::*;
  localparam int R = 128, NT = 16, NL = 12, AMP = 1400, CSH = 20;
  localparam int NBURST = 8, EQ_TRAIN = 80, EQ_DD = 60;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic adc_valid = 0;
  logic signed [11:0] adc_i = 0, adc_q = 0;
  logic [7:0] dec_rate = 8'(R);
  logic dec_valid;
  cplx_t dec_sample;
  logic coef_we = 0;
  logic [3:0] coef_addr = 0;
  logic signed [23:0] coef_re = 0, coef_im = 0;
  logic burst_start = 0, toa_valid;
  logic signed [15:0] toa_q8;
  logic [3:0] peak_index;
  logic [33:0] peak_val;
  pd_state_e pd_state;
  logic eq_in_valid = 0, eq_in_ready, eq_train = 1, eq_out_valid, eq_dec;
  logic signed [25:0] eq_u = 0, eq_d = 0, eq_y, eq_e, eq_w_data;
  logic [3:0] eq_w_addr = 0;
  eq_state_e eq_state;

  sdr_rx_top dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ---------------------------------------------------
  int n_dec = 0, n_coef = 0, n_lag = 0, n_toa = 0, n_gap = 0;
  int n_st_cordic = 0, n_st_interp = 0, n_st_ready = 0;
  int n_toa_late = 0, n_toa_early = 0;
  int n_eq_train = 0, n_eq_dd = 0, n_div = 0, n_stall = 0;
  eq_state_e eq_prev = EQ_IDLE;
  always @(posedge clk) if (!rst) begin
    if (coef_we) n_coef++;
    if (dut.lag_valid) n_lag++;
    if (pd_state == PD_CORDIC) n_st_cordic++;
    if (pd_state == PD_INTERP) n_st_interp++;
    if (pd_state == PD_READY)  n_st_ready++;
    if (eq_state == EQ_DIV && eq_prev != EQ_DIV) n_div++;
    eq_prev = eq_state;
    if (eq_in_valid && !eq_in_ready) n_stall++;
    if (!adc_valid) n_gap++;
  end

  // ---- CIC reference: four cascaded moving sums of length R ----------------
  int     in_cnt = 0;
  longint ref_q [$];
  always @(posedge clk) if (!rst && adc_valid) begin
    longint v [2];
    v[0] = adc_i;
    v[1] = adc_q;
    for (int c = 0; c < 2; c++) begin
      automatic longint x = v[c];
      for (int s = 0; s < 4; s++) begin
        automatic int sl = s + 4 * c;
        // stage s: running sum of the last R values of its input
        sums[sl] += x - hbuf[sl][in_cnt % R];
        hbuf[sl][in_cnt % R] = x;
        x = sums[sl];
      end
      if (in_cnt % R == R - 1) ref_q.push_back(x);
    end
    in_cnt++;
  end
  longint hbuf [8][R];
  longint sums [8];

  // decimated samples, checked and stored by global number
  longint dre [$], dim [$];
  always @(negedge clk) if (!rst && dec_valid) begin
    longint er, ei;
    er = ref_q.pop_front();
    ei = ref_q.pop_front();
    check(dec_sample.re == 24'(er >>> 16) && dec_sample.im == 24'(ei >>> 16),
          $sformatf("decimated sample %0d: %0d,%0d expected %0d,%0d", n_dec,
                    dec_sample.re, dec_sample.im, er >>> 16, ei >>> 16));
    dre.push_back(longint'(dec_sample.re));
    dim.push_back(longint'(dec_sample.im));
    n_dec++;
  end

  // ---- ADC stimulus ----------------------------------------------------------
  int sym_re [$], sym_im [$], hold [$];
  int cre [NT], cim [NT];

  task automatic add_symbol(int re, int im, int h);
    sym_re.push_back(re);
    sym_im.push_back(im);
    hold.push_back(h);
  endtask

  function automatic int rnd_pm();
    return $urandom_range(0, 1) ? AMP : -AMP;
  endfunction

  initial begin : adc_drive
    int k = 0;
    wait (!rst);
    forever begin
      @(negedge clk);
      if (k < sym_re.size()) begin
        if ($urandom_range(0, 9) == 0) begin
          adc_valid = 0;
        end else begin
          adc_valid = 1;
          adc_i = 12'(sym_re[k] + int'($urandom_range(0, 16)) - 8);
          adc_q = 12'(sym_im[k] + int'($urandom_range(0, 16)) - 8);
          hold[k]--;
          if (hold[k] == 0) k++;
        end
      end else begin
        adc_valid = 1;
        adc_i = 12'(int'($urandom_range(0, 16)) - 8);
        adc_q = 12'(int'($urandom_range(0, 16)) - 8);
      end
    end
  end

  // ---- burst timing ------------------------------------------------------------
  initial begin : timing
    // training sequence (+-1 +-j), loaded as coefficients scaled by 2^CSH
    for (int j = 0; j < NT; j++) begin
      cre[j] = $urandom_range(0, 1) ? 1 : -1;
      cim[j] = $urandom_range(0, 1) ? 1 : -1;
    end
    // symbol stream: lead-in, then per burst: random symbols, training
    // sequence at a random offset, random symbols.
    for (int i = 0; i < 6; i++) add_symbol(rnd_pm(), rnd_pm(), R);
    for (int b = 0; b < NBURST; b++) begin
      automatic int off = $urandom_range(1, 6);
      add_symbol(rnd_pm(), rnd_pm(), R + $urandom_range(0, R - 1));
      for (int i = 1; i < off; i++) add_symbol(rnd_pm(), rnd_pm(), R);
      for (int j = 0; j < NT; j++) add_symbol(cre[j] * AMP, cim[j] * AMP, R);
      for (int i = 0; i < 60 - off - NT; i++) add_symbol(rnd_pm(), rnd_pm(), R);
    end
    repeat (4) @(negedge clk);
    rst = 0;
    for (int j = 0; j < NT; j++) begin
      coef_we = 1;
      coef_addr = 4'(j);
      coef_re = 24'(cre[j] << CSH);
      coef_im = 24'(cim[j] << CSH);
      @(negedge clk);
    end
    coef_we = 0;
    // Bursts start 6 decimated samples before the first symbol of each burst
    // segment is expected; the segment boundaries drift by the extra hold.
    for (int b = 0; b < NBURST; b++) begin
      automatic int b0;
      real m [];
      int  pos;
      longint lre, lim;
      wait (n_dec >= 6 + 60 * b);
      @(negedge clk);
      while (!dec_valid) @(negedge clk);
      #1;
      b0 = n_dec;              // next decimated sample is window sample 0
      burst_start = 1;
      @(negedge clk);
      burst_start = 0;
      while (!toa_valid) @(negedge clk);
      n_toa++;
      m = new[NL];
      for (int l = 0; l < NL; l++) begin
        lre = 0;
        lim = 0;
        for (int j = 0; j < NT; j++) begin
          // conj(c_j) * x(l + j)
          lre += (longint'(cre[j]) * dre[b0 + l + j] + longint'(cim[j]) * dim[b0 + l + j]) <<< CSH;
          lim += (longint'(cre[j]) * dim[b0 + l + j] - longint'(cim[j]) * dre[b0 + l + j]) <<< CSH;
        end
        lre = lre >>> 20;
        lim = lim >>> 20;
        m[l] = $sqrt(real'(lre) * real'(lre) + real'(lim) * real'(lim));
      end
      pos = peak_search(m, 8, 4);
      begin
        automatic int best = 0;
        automatic real pv, dv, dtoa;
        for (int l = 1; l < NL; l++) if (m[l] > m[best]) best = l;
        // a lag within 0.1% of the largest counts as a tie (CORDIC rounding)
        check(int'(peak_index) < NL && m[peak_index] >= 0.999 * m[best],
              $sformatf("burst %0d peak index %0d expected %0d", b, peak_index, best));
        dtoa = real'(toa_q8 - pos);
        if (dtoa < 0) dtoa = -dtoa;
        check(dtoa <= 4.0, $sformatf("burst %0d toa %0d expected %0d", b, toa_q8, pos));
        pv = interp_val(m, real'(toa_q8) / 256.0, 4);
        dv = real'(peak_val) - pv;
        if (dv < 0) dv = -dv;
        check(dv <= 0.01 * pv, $sformatf("burst %0d peak value %0d expected %f", b, peak_val, pv));
        if (toa_q8 > 16'(int'(peak_index) * 256)) n_toa_late++;
        if (toa_q8 < 16'(int'(peak_index) * 256)) n_toa_early++;
        $display("burst %0d: peak index %0d, toa %0d/256 (reference %0d/256)", b, peak_index, toa_q8, pos);
      end
    end
    timing_done = 1;
  end
  bit timing_done = 0;

  // ---- equalizer -------------------------------------------------------------
  // The driver offers each sample a random time after the previous one was
  // accepted, often while the equalizer is still busy; the monitor checks the
  // outputs in order.
  bit eq_done = 0;
  int eq_sym [$];
  initial begin : eq_drive
    wait (!rst);
    for (int n = 0; n < EQ_TRAIN + EQ_DD; n++) begin
      real ur;
      eq_sym.push_back($urandom_range(0, 1) ? 1 : -1);
      ur = 0.9 * eq_sym[n] + 0.02 * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
      if (n >= 1) ur += 0.4 * eq_sym[n-1];
      if (n >= 2) ur += -0.25 * eq_sym[n-2];
      if (n >= 3) ur += 0.1 * eq_sym[n-3];
      repeat ($urandom_range(0, 700)) @(negedge clk);
      eq_in_valid = 1;
      eq_u = 26'($rtoi(ur * 16384.0));
      eq_d = 26'(eq_sym[n] * 16384);
      eq_train = (n < EQ_TRAIN);
      @(posedge clk);
      while (!eq_in_ready) @(posedge clk);
      @(negedge clk);
      eq_in_valid = 0;
    end
  end

  initial begin : eq_monitor
    real e_early = 0.0, e_late = 0.0;
    for (int n = 0; n < EQ_TRAIN + EQ_DD; n++) begin
      @(negedge clk);
      while (!eq_out_valid) @(negedge clk);
      if (n < EQ_TRAIN) n_eq_train++; else n_eq_dd++;
      if (n >= 5 && n < 20) e_early += (real'(eq_e) / 16384.0) ** 2;
      if (n >= EQ_TRAIN - 15 && n < EQ_TRAIN) e_late += (real'(eq_e) / 16384.0) ** 2;
      if (n >= EQ_TRAIN) check(eq_dec == (eq_sym[n] > 0), $sformatf("equalizer decision %0d wrong", n));
    end
    check(e_late < e_early, $sformatf("equalizer training error did not fall: %f -> %f", e_early, e_late));
    eq_done = 1;
  end

  // ---- end ---------------------------------------------------------------------
  initial begin
    wait (timing_done && eq_done);
    repeat (10) @(negedge clk);
    check(n_dec > 60 * NBURST, $sformatf("decimated samples: %0d", n_dec));
    check(n_coef == NT, $sformatf("coefficient writes: %0d", n_coef));
    check(n_lag == NL * NBURST, $sformatf("lags to peak detector: %0d", n_lag));
    check(n_st_cordic > 0, "peak detector never in CORDIC");
    check(n_st_interp > 0, "peak detector never in Interpolation");
    check(n_st_ready == NBURST, $sformatf("Output Ready %0d times", n_st_ready));
    check(n_toa == NBURST, $sformatf("time of arrival outputs: %0d", n_toa));
    check(n_toa_late > 0, "no time of arrival after the integer peak");
    check(n_toa_early > 0, "no time of arrival before the integer peak");
    check(n_gap > 0, "no adc_valid gaps");
    check(n_eq_train == EQ_TRAIN, $sformatf("equalizer training samples: %0d", n_eq_train));
    check(n_eq_dd == EQ_DD, $sformatf("equalizer decision-directed samples: %0d", n_eq_dd));
    check(n_div == EQ_TRAIN + EQ_DD, $sformatf("divisions: %0d", n_div));
    check(n_stall > 0, "equalizer handshake never stalled");
    $display("mechanisms: dec=%0d coef=%0d lags=%0d toa=%0d early=%0d late=%0d gaps=%0d eq_train=%0d eq_dd=%0d div=%0d stall=%0d",
             n_dec, n_coef, n_lag, n_toa, n_toa_early, n_toa_late, n_gap, n_eq_train, n_eq_dd, n_div, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
