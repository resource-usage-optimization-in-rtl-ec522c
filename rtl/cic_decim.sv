// cic_decim: cascaded integrator-comb (CIC) decimator.
//
// N integrators run at the input rate, a down-sampler keeps every R-th
// integrator output, and N comb sections y = x - x(-M) run at the output rate.
// The transfer function is ((1 - z^-RM) / (1 - z^-1))^N, i.e. N cascaded
// moving sums of length R*M, followed by decimation by R. The word grows by
// ceil(N * log2(M * RMAX)) bits (28 bits for N = 4, M*RMAX = 128), so the
// integrators and combs are IN_W + 28 = 40 bits wide; two's-complement
// wrap-around in the integrators is harmless because the combs undo it. The
// output keeps the top OUT_W = 24 bits of that word (truncation, no rounding),
// so for rates below RMAX the output is correspondingly smaller.
//
// Interface: in_valid/in_data (IN_W bits signed); rate (1 .. RMAX) sets the
// decimation factor at run time (change it only in reset). out_valid pulses one
// clock after the R-th accepted input of each group, with out_data. The first
// output covers inputs 0 .. R-1 after reset. Synchronous active-high reset
// clears all state.
//
// Source and choices: 4 stages, rates up to 128 (log2(M*R) = 7), a 12-bit
// input, 40 bits inside and a 24-bit truncated output follow the original
// design. The differential delay M = 1, the run-time rate input, the valid
// handshake and the unscaled output at lower rates are this design's choices.
module cic_decim #(
  parameter int N     = sdr_pkg::CIC_N,
  parameter int RMAX  = sdr_pkg::CIC_RMAX,
  parameter int M     = 1,
  parameter int IN_W  = sdr_pkg::ADC_W,
  parameter int OUT_W = sdr_pkg::DEC_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  input  logic [$clog2(RMAX+1)-1:0] rate,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);
  localparam int GROW = $clog2((M * RMAX) ** N);   // = ceil(N log2(M RMAX))
  localparam int IW   = IN_W + GROW;
  localparam int CW   = $clog2(RMAX + 1);

  logic signed [IW-1:0] integ [N];
  logic signed [IW-1:0] integ_nx [N];  // integrator values including this input
  logic signed [IW-1:0] dly   [N][M];   // comb delay lines
  logic signed [IW-1:0] comb  [N+1];
  logic [CW-1:0]        cnt;
  logic                 tick;

  assign tick = in_valid && (cnt == rate - 1'b1);

  // Integrators (chained within the clock so that the decimated sample
  // includes the current input) and combs, evaluated on the decimated sample.
  always_comb begin
    integ_nx[0] = integ[0] + IW'(in_data);
    for (int s = 1; s < N; s++) integ_nx[s] = integ[s] + integ_nx[s-1];
    comb[0] = integ_nx[N-1];
    for (int s = 0; s < N; s++) comb[s+1] = comb[s] - dly[s][M-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int s = 0; s < N; s++) begin
        integ[s] <= '0;
        for (int m = 0; m < M; m++) dly[s][m] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int s = 0; s < N; s++) integ[s] <= integ_nx[s];
        cnt <= tick ? '0 : cnt + 1'b1;
      end
      if (tick) begin
        for (int s = 0; s < N; s++) begin
          dly[s][0] <= comb[s];
          for (int m = 1; m < M; m++) dly[s][m] <= dly[s][m-1];
        end
        out_data  <= OUT_W'(comb[N] >>> (IW - OUT_W));
        out_valid <= 1'b1;
      end
    end
  end
endmodule
