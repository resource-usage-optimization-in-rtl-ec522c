// tb_rls_equalizer: tests the RLS decision-feedback equalizer at the three
// tap counts N = 8, 12 and 16 for which resource figures are given for the
// original design (16 is the default). Each size is run by rls_eq_run, which
// trains the equalizer, switches the channel, checks it against a
// floating-point RLS and then runs it on its own decisions. All three run at
// once. A watchdog ends the run if they do not finish.
//
// The three tap counts are those the original design gives resource figures
// for; the channels and noise are this testbench's own.
module tb_rls_equalizer;
  int  c8, f8, c12, f12, c16, f16;
  bit  d8, d12, d16;

  rls_eq_run #(.N(8))  u_n8  (.checks(c8),  .failures(f8),  .done(d8));
  rls_eq_run #(.N(12)) u_n12 (.checks(c12), .failures(f12), .done(d12));
  rls_eq_run #(.N(16)) u_n16 (.checks(c16), .failures(f16), .done(d16));

  initial begin
    #10ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c12 + c16, f8 + f12 + f16 + 1);
    $finish;
  end

  initial begin
    wait (d8 && d12 && d16);
    $display("N=8: %0d checks, %0d failures; N=12: %0d, %0d; N=16: %0d, %0d", c8, f8, c12, f12, c16, f16);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c12 + c16, f8 + f12 + f16);
    $finish;
  end
endmodule
