// sdr_rx_top: receive-side signal processing of a GSM base station moved from
// the host processor into the FPGA.
//
// Path 1, burst timing ("analyze traffic burst"):
//   ADC I/Q (12 bit) -> cic_decim x2 (N = 4, rate up to 128, 24-bit output)
//   -> systolic_corr (16-sample training sequence, complex, 3-multiplier
//   products) -> peak_detect (CORDIC magnitude of 12 lags, integer peak,
//   8-step sinc interpolation) -> time of arrival in 1/256 sample.
// A burst is announced by burst_start. The decimated samples that follow are
// numbered 0, 1, ...; samples 0 .. 26 form the 27-sample window that is
// correlated, and correlation lag l (0 .. 11) leaves the correlator after
// sample 2*NTAPS + l, when it is handed to the peak detector. toa_q8 counts
// from lag 0, in 1/256 of a decimated sample.
//
// Path 2, channel equalization: rls_equalizer (16-tap RLS decision-feedback
// equalizer with series-expansion division). Its input stream comes through
// the eq_* ports: the derotation that would sit between timing recovery and
// the equalizer is not part of this design, nor are the VITA framing, stream
// multiplexer and bus master that carry samples to the processor, so the
// decimated samples are also brought out (dec_valid/dec_sample).
//
// All blocks share one clock and a synchronous active-high reset.
//
// Source and choices: the chain of blocks follows the original design's
// "analyze traffic burst" function and its equalizer. This design chose:
//   - the burst_start window control;
//   - the port-fed equalizer;
//   - the >>> 20 scaling into the peak detector.
module sdr_rx_top #(
  parameter int CIC_STAGES = sdr_pkg::CIC_N,
  parameter int CIC_RMAX   = sdr_pkg::CIC_RMAX,
  parameter int ADC_W      = sdr_pkg::ADC_W,
  parameter int DW         = sdr_pkg::DEC_W,
  parameter int NTAPS      = sdr_pkg::CORR_TAPS,
  parameter int RXLEN      = sdr_pkg::RX_LEN,
  parameter int PD_W       = 34,
  parameter int EQ_N       = 16,
  parameter int EQ_W       = sdr_pkg::EQ_IWL + sdr_pkg::EQ_FWL
) (
  input  logic                         clk,
  input  logic                         rst,
  // ADC and decimation
  input  logic                         adc_valid,
  input  logic signed [ADC_W-1:0]      adc_i,
  input  logic signed [ADC_W-1:0]      adc_q,
  input  logic [$clog2(CIC_RMAX+1)-1:0] dec_rate,
  output logic                         dec_valid,
  output sdr_pkg::cplx_t                        dec_sample,
  // training sequence
  input  logic                         coef_we,
  input  logic [$clog2(NTAPS)-1:0]     coef_addr,
  input  logic signed [DW-1:0]         coef_re,
  input  logic signed [DW-1:0]         coef_im,
  // burst timing
  input  logic                         burst_start,
  output logic                         toa_valid,
  output logic signed [15:0]           toa_q8,
  output logic [$clog2(RXLEN-NTAPS+1)-1:0] peak_index,
  output logic [PD_W-1:0]              peak_val,
  output sdr_pkg::pd_state_e                    pd_state,
  // equalizer
  input  logic                         eq_in_valid,
  output logic                         eq_in_ready,
  input  logic signed [EQ_W-1:0]       eq_u,
  input  logic signed [EQ_W-1:0]       eq_d,
  input  logic                         eq_train,
  output logic                         eq_out_valid,
  output logic signed [EQ_W-1:0]       eq_y,
  output logic                         eq_dec,
  output logic signed [EQ_W-1:0]       eq_e,
  input  logic [$clog2(EQ_N)-1:0]      eq_w_addr,
  output logic signed [EQ_W-1:0]       eq_w_data,
  output sdr_pkg::eq_state_e                    eq_state
);
  localparam int NLAGS = RXLEN - NTAPS + 1;
  localparam int ACCW  = 2 * DW + 2 + $clog2(NTAPS);
  localparam int CNT_W = $clog2(2 * NTAPS + NLAGS + 1) + 1;

  // ---- decimation ---------------------------------------------------------
  logic                 dv_i, dv_q;
  logic signed [DW-1:0] di, dq;

  cic_decim #(.N(CIC_STAGES), .RMAX(CIC_RMAX), .IN_W(ADC_W), .OUT_W(DW)) u_cic_i (
    .clk(clk), .rst(rst), .in_valid(adc_valid), .in_data(adc_i), .rate(dec_rate),
    .out_valid(dv_i), .out_data(di));
  cic_decim #(.N(CIC_STAGES), .RMAX(CIC_RMAX), .IN_W(ADC_W), .OUT_W(DW)) u_cic_q (
    .clk(clk), .rst(rst), .in_valid(adc_valid), .in_data(adc_q), .rate(dec_rate),
    .out_valid(dv_q), .out_data(dq));

  assign dec_valid     = dv_i;
  assign dec_sample.re = di;
  assign dec_sample.im = dq;

  // ---- correlation --------------------------------------------------------
  logic                   cv;
  logic signed [ACCW-1:0] cre, cim;

  systolic_corr #(.NTAPS(NTAPS), .DW(DW), .CW(DW)) u_corr (
    .clk(clk), .rst(rst), .in_valid(dv_i), .x_re(di), .x_im(dq),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_re(coef_re), .coef_im(coef_im),
    .out_valid(cv), .y_re(cre), .y_im(cim));

  // ---- burst window: which correlator outputs are lags 0 .. NLAGS-1 --------
  logic             win;
  logic [CNT_W-1:0] cnt, cur;
  logic             lag_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      win <= 1'b0;
      cnt <= '0;
      cur <= '0;
    end else begin
      if (burst_start) begin
        win <= 1'b1;
        cnt <= '0;
      end else if (dv_i && win) begin
        cur <= cnt;
        cnt <= cnt + 1'b1;
        if (cnt == CNT_W'(2 * NTAPS + NLAGS - 1)) win <= 1'b0;
      end
    end
  end

  // cur is the number of the sample whose correlator output is now valid.
  logic cur_win;
  always_ff @(posedge clk) begin
    if (rst)        cur_win <= 1'b0;
    else if (burst_start) cur_win <= 1'b0;
    else            cur_win <= dv_i && win;
  end
  assign lag_valid = cv && cur_win && (cur >= CNT_W'(2 * NTAPS))
                   && (cur < CNT_W'(2 * NTAPS + NLAGS));

  // ---- peak detection -----------------------------------------------------
  peak_detect #(.NLAGS(NLAGS), .W(PD_W)) u_peak (
    .clk(clk), .rst(rst), .start(burst_start),
    .in_valid(lag_valid),
    .in_re(PD_W'(cre >>> (ACCW - PD_W))), .in_im(PD_W'(cim >>> (ACCW - PD_W))),
    .out_valid(toa_valid), .toa_q8(toa_q8), .peak_index(peak_index),
    .peak_val(peak_val), .state(pd_state));

  // ---- channel equalization -----------------------------------------------
  rls_equalizer #(.N(EQ_N)) u_eq (
    .clk(clk), .rst(rst),
    .in_valid(eq_in_valid), .in_ready(eq_in_ready),
    .u_in(eq_u), .d_in(eq_d), .train(eq_train),
    .out_valid(eq_out_valid), .y_out(eq_y), .dec_out(eq_dec), .e_out(eq_e),
    .w_addr(eq_w_addr), .w_data(eq_w_data), .state(eq_state));

  // Both CIC channels run in lock step.
  assert property (@(posedge clk) disable iff (rst) dv_i == dv_q);
endmodule
