// rls_equalizer: decision-feedback channel equalizer adapted by the
// conventional exponentially weighted recursive-least-squares (RLS) algorithm,
// in Q(IWL).(FWL) fixed point, with its single division per sample done by
// the series-expansion reciprocal (series_recip).
//
// The regressor phi holds NFF received samples u(n) .. u(n-NFF+1) (forward
// taps) and NFB past symbols d(n-1) .. d(n-NFB) (feedback taps), N = NFF + NFB
// taps in all. For each received sample:
//   y  = w' phi                      output (a priori)
//   d  = training symbol (train = 1) or decision sign(y) = +-1 (train = 0)
//   e  = d - y
//   pi = P phi
//   k  = pi / (lambda + phi' pi)     the division: pi * (1 / den)
//   w  = w + k e
//   P  = (P - k pi') / lambda        (1/lambda is a constant multiplier)
// and d is then shifted into the feedback taps. The weights adapt in both
// modes; in equalization mode they follow the decisions.
//
// The work is done by a sequencer with one multiply-add (two in the P update)
// per clock, which is why so little multiplier hardware is needed: a sample
// takes 2N^2 + 3N + 7 clocks (567 for N = 16). P is an N x N register array
// (a memory in an FPGA). Products are truncated (arithmetic shift) and every
// stored result saturates to the word. Only the upper triangle of the new P
// is computed and it is mirrored into the lower triangle, so P stays exactly
// symmetric; without this, rounding makes the fixed-point recursion diverge
// after a few hundred samples (this design's choice; the original design
// does not discuss numerical stability). The schedule still spends N^2
// clocks on the update.
//
// Interface: in_valid/in_ready handshake with u_in, d_in (training symbol)
// and train (mode); out_valid pulses once per sample with y_out, dec_out
// (1 = +1, 0 = -1) and e_out. w_addr/w_data read one weight. Synchronous,
// active-high reset sets w = 0, P = P0 * I and clears the regressor.
//
// Source and choices: the original design specifies a conventional RLS
// decision-feedback equalizer of 8, 12 or 16 taps, with Q12.14 words, a
// training/equalization mode input, and division by the series expansion.
// This design chose:
//   - lambda = 0.99 and P(0) = 10 I;
//   - the even split between forward and feedback taps;
//   - the one-multiplier sequencer and its schedule;
//   - the symmetric P update;
//   - the handshake.
module rls_equalizer
  import sdr_pkg::*;
#(
  parameter int N            = 16,
  parameter int NFB          = N / 2,
  parameter int IWL          = sdr_pkg::EQ_IWL,
  parameter int FWL          = sdr_pkg::EQ_FWL,
  parameter int LAMBDA_Q     = 16220,       // 0.99 * 2^FWL
  parameter int INV_LAMBDA_Q = 16550,       // 2^FWL / 0.99
  parameter int P0_Q         = 10 << 14     // initial P diagonal, 10.0
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic signed [IWL+FWL-1:0]  u_in,
  input  logic signed [IWL+FWL-1:0]  d_in,
  input  logic                       train,
  output logic                       out_valid,
  output logic signed [IWL+FWL-1:0]  y_out,
  output logic                       dec_out,
  output logic signed [IWL+FWL-1:0]  e_out,
  input  logic [$clog2(N)-1:0]       w_addr,
  output logic signed [IWL+FWL-1:0]  w_data,
  output eq_state_e                  state
);
  localparam int W   = IWL + FWL;
  localparam int NFF = N - NFB;
  localparam int AW  = 2 * W + 8;
  localparam int IW  = $clog2(N);
  localparam logic signed [W-1:0] ONE  = W'(1) <<< FWL;
  localparam logic signed [W-1:0] WMAX = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] WMIN = {1'b1, {(W-1){1'b0}}};

  function automatic logic signed [W-1:0] sat(input logic signed [AW-1:0] v);
    if (v > AW'(WMAX))      return WMAX;
    else if (v < AW'(WMIN)) return WMIN;
    else                    return W'(v);
  endfunction

  logic signed [W-1:0] w    [N];
  logic signed [W-1:0] phi  [N];
  logic signed [W-1:0] pi_v [N];
  logic signed [W-1:0] k_v  [N];
  logic signed [W-1:0] P    [N*N];

  logic [IW-1:0]       i, j;
  logic signed [AW-1:0] acc, prod, acc_next;
  logic signed [W-1:0] y_r, e_r, d_r, dsel, den, inv;
  logic                train_r, div_started;
  logic                rc_valid;
  logic signed [W-1:0] rc_r;

  // One shared multiply-add; its operands depend on the step.
  always_comb begin
    unique case (state)
      EQ_FILT: prod = AW'(w[i])    * AW'(phi[i]);
      EQ_PI:   prod = AW'(P[int'(i)*N + int'(j)]) * AW'(phi[j]);
      EQ_DEN:  prod = AW'(phi[i])  * AW'(pi_v[i]);
      default: prod = '0;
    endcase
    acc_next = acc + prod;
  end

  series_recip #(.IWL(IWL), .FWL(FWL)) u_recip (
    .clk(clk), .rst(rst),
    .in_valid(state == EQ_DIV && !div_started),
    .b((den > 0) ? den : W'(1)),
    .out_valid(rc_valid), .r(rc_r));

  // Gain and P-update arithmetic.
  logic signed [W-1:0] kval, ptmp;
  always_comb begin
    kval = sat((AW'(pi_v[i]) * AW'(inv)) >>> FWL);
    ptmp = sat(AW'(P[int'(i)*N + int'(j)]) - ((AW'(k_v[i]) * AW'(pi_v[j])) >>> FWL));
  end

  // Reference symbol: training symbol, or the +-1 decision on y.
  logic signed [W-1:0] dnow;
  assign dnow = train_r ? d_r : ((y_r >= 0) ? ONE : -ONE);

  assign in_ready = (state == EQ_IDLE);
  assign w_data   = w[w_addr];

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= EQ_IDLE;
      out_valid   <= 1'b0;
      i <= '0; j <= '0;
      acc <= '0;
      y_r <= '0; e_r <= '0; d_r <= '0; dsel <= '0; den <= '0; inv <= '0;
      train_r     <= 1'b0;
      div_started <= 1'b0;
      y_out <= '0; e_out <= '0; dec_out <= 1'b0;
      for (int a = 0; a < N; a++) begin
        w[a] <= '0; phi[a] <= '0; pi_v[a] <= '0; k_v[a] <= '0;
      end
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++)
          P[a*N + b] <= (a == b) ? W'(P0_Q) : '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        EQ_IDLE: if (in_valid) begin
          phi[0] <= u_in;
          for (int a = 1; a < NFF; a++) phi[a] <= phi[a-1];
          d_r     <= d_in;
          train_r <= train;
          i <= '0; j <= '0; acc <= '0;
          state <= EQ_FILT;
        end
        EQ_FILT: begin
          acc <= acc_next;
          i   <= i + 1'b1;
          if (i == IW'(N - 1)) begin
            y_r   <= sat(acc_next >>> FWL);
            state <= EQ_ERR;
          end
        end
        EQ_ERR: begin
          dsel  <= dnow;
          e_r   <= sat(AW'(dnow) - AW'(y_r));
          i <= '0; j <= '0; acc <= '0;
          state <= EQ_PI;
        end
        EQ_PI: begin
          acc <= acc_next;
          j   <= j + 1'b1;
          if (j == IW'(N - 1)) begin
            pi_v[i] <= sat(acc_next >>> FWL);
            acc <= '0;
            j   <= '0;
            i   <= i + 1'b1;
            if (i == IW'(N - 1)) begin
              i <= '0;
              state <= EQ_DEN;
            end
          end
        end
        EQ_DEN: begin
          acc <= acc_next;
          i   <= i + 1'b1;
          if (i == IW'(N - 1)) begin
            den <= sat((acc_next >>> FWL) + AW'(LAMBDA_Q));
            div_started <= 1'b0;
            state <= EQ_DIV;
          end
        end
        EQ_DIV: begin
          div_started <= 1'b1;
          if (rc_valid) begin
            inv   <= rc_r;
            i     <= '0;
            state <= EQ_GAIN;
          end
        end
        EQ_GAIN: begin
          k_v[i] <= kval;
          w[i]   <= sat(AW'(w[i]) + ((AW'(kval) * AW'(e_r)) >>> FWL));
          i      <= i + 1'b1;
          if (i == IW'(N - 1)) begin
            i <= '0; j <= '0;
            state <= EQ_PUPD;
          end
        end
        EQ_PUPD: begin
          // upper triangle computed, mirrored into the lower one
          if (j >= i) begin
            P[int'(i)*N + int'(j)] <= sat((AW'(ptmp) * AW'(INV_LAMBDA_Q)) >>> FWL);
            P[int'(j)*N + int'(i)] <= sat((AW'(ptmp) * AW'(INV_LAMBDA_Q)) >>> FWL);
          end
          j <= j + 1'b1;
          if (j == IW'(N - 1)) begin
            j <= '0;
            i <= i + 1'b1;
            if (i == IW'(N - 1)) state <= EQ_DONE;
          end
        end
        EQ_DONE: begin
          if (NFB > 0) begin
            phi[NFF] <= dsel;
            for (int a = NFF + 1; a < N; a++) phi[a] <= phi[a-1];
          end
          y_out     <= y_r;
          e_out     <= e_r;
          dec_out   <= (y_r >= 0);
          out_valid <= 1'b1;
          state     <= EQ_IDLE;
        end
        default: state <= EQ_IDLE;
      endcase
    end
  end

  // The reciprocal answers exactly once per request, only while waiting for it.
  assert property (@(posedge clk) disable iff (rst) rc_valid |-> state == EQ_DIV);
endmodule
