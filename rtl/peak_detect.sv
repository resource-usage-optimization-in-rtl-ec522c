// peak_detect: finds the correlation peak of a burst to 1/256 of a sample.
//
// A four-state machine (Idle -> CORDIC -> Interpolation -> Output Ready):
//  * Idle: waits for start.
//  * CORDIC: the NLAGS complex correlation values that follow start are passed
//    through a 12-stage vectoring CORDIC (cordic_mag); their magnitudes are
//    stored and the largest one gives the integer peak index (the first of
//    equal maxima wins).
//  * Interpolation: an early and a late point are placed one sample apart
//    around the peak (pos -+ step, step = 1/2 sample). Their values are
//    interpolated from the stored magnitudes with a sinc kernel over the
//    2*HALF nearest lags, f(t) = sum_k |r_k| sinc(t - k). The position moves
//    by step towards the larger of the two (towards early on a tie), the step
//    is halved, and this repeats ITER = 8 times, so the last move is 1/256 of a
//    sample. Finally the value at the final position is interpolated too.
//    Each interpolated value takes 2*HALF clocks: one 35 x 35 multiply-add
//    (wide_mult35, magnitude x kernel value) per clock.
//  * Output Ready: out_valid is high for one clock with the results, then the
//    machine returns to Idle.
//
// Interface: start (pulse), in_valid with in_re/in_im (W bits) while in the
// CORDIC state; outputs toa_q8 (peak position in 1/256 sample units counted
// from the first lag), peak_index (integer peak), peak_val (interpolated peak
// magnitude) and state. Timing: out_valid rises STAGES + 2 (CORDIC) + 1 (last
// magnitude stored) + 1 (setup) + ITER*4*HALF + 2*HALF (interpolation) + 1
// (Output Ready) = 153 clocks after the last input is taken, for the defaults.
// Synchronous active-high reset.
//
// Source and choices: the four states, the 12-stage CORDIC magnitude, the
// early/late search that starts one sample wide and halves its step, 8
// repetitions for 1/256 resolution, and a 24-bit sinc table all follow the
// original design. This design chose the rest:
//   - the 8-lag kernel window;
//   - the tie rules;
//   - a fixed 8 repetitions, with the peak value interpolated once at the end
//     rather than in every repetition;
//   - one shared multiplier;
//   - the 34-bit magnitudes;
//   - the return to Idle after Output Ready.
module peak_detect
  import sdr_pkg::*;
#(
  parameter int NLAGS  = sdr_pkg::N_LAGS,
  parameter int W      = 34,
  parameter int STAGES = sdr_pkg::CORDIC_ITERS,
  parameter int ITER   = sdr_pkg::INTERP_ITERS,
  parameter int HALF   = 4,
  parameter int SW     = 24,      // kernel word width
  parameter int SFRAC  = 22,      // kernel fraction bits
  parameter int TOA_W  = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic                    in_valid,
  input  logic signed [W-1:0]     in_re,
  input  logic signed [W-1:0]     in_im,
  output logic                    out_valid,
  output logic signed [TOA_W-1:0] toa_q8,
  output logic [$clog2(NLAGS)-1:0] peak_index,
  output logic [W-1:0]            peak_val,
  output pd_state_e               state
);
  localparam int LW    = $clog2(NLAGS);
  localparam int KDEP  = HALF * 256 + 1;
  localparam int AW    = $clog2(KDEP);
  localparam int ACC_W = 70 + $clog2(2*HALF) + 1;
  localparam int JW    = $clog2(2*HALF);

  typedef enum logic [1:0] {PH_EARLY, PH_LATE, PH_FINAL} phase_e;

  // CORDIC front end
  logic          c_in_valid, c_out_valid;
  logic [W-1:0]  c_mag;
  logic [LW:0]   n_in, n_out;
  logic [W-1:0]  mags [NLAGS];
  logic [W-1:0]  best;
  logic [LW-1:0] best_idx;

  assign c_in_valid = in_valid && (state == PD_CORDIC) && (n_in < (LW+1)'(NLAGS));

  cordic_mag #(.W(W), .STAGES(STAGES)) u_cordic (
    .clk(clk), .rst(rst), .in_valid(c_in_valid), .x_in(in_re), .y_in(in_im),
    .out_valid(c_out_valid), .mag(c_mag));

  // Interpolation datapath
  phase_e                  phase;
  logic                    setup;
  logic signed [TOA_W-1:0] pos, step, t;
  logic [$clog2(ITER+1)-1:0] it;
  logic [JW-1:0]           j;
  logic signed [TOA_W-1:0] k, d, dabs;
  logic                    k_in;
  logic signed [SW-1:0]    kern;
  logic signed [69:0]      prod;
  logic signed [ACC_W-1:0] acc, acc_next, early_val;
  logic [W-1:0]            mag_k;

  always_comb begin
    unique case (phase)
      PH_EARLY: t = pos - step;
      PH_LATE:  t = pos + step;
      default:  t = pos;
    endcase
    k    = (t >>> 8) - TOA_W'(HALF - 1) + TOA_W'(j);
    d    = t - (k <<< 8);
    dabs = (d < 0) ? -d : d;
    k_in = (k >= 0) && (k < TOA_W'(NLAGS));
    mag_k = k_in ? mags[LW'(k)] : '0;
  end

  sinc_rom #(.DEPTH(KDEP), .VW(SW), .FRAC(SFRAC)) u_rom (
    .addr(AW'(dabs)), .data(kern));

  wide_mult35 u_mul (.a(35'($signed({1'b0, mag_k}))), .b(35'(kern)), .p(prod));

  assign acc_next = acc + ACC_W'(prod);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= PD_IDLE;
      out_valid <= 1'b0;
      n_in      <= '0;
      n_out     <= '0;
      best      <= '0;
      best_idx  <= '0;
      phase     <= PH_EARLY;
      setup     <= 1'b0;
      pos       <= '0;
      step      <= '0;
      it        <= '0;
      j         <= '0;
      acc       <= '0;
      early_val <= '0;
      toa_q8    <= '0;
      peak_index <= '0;
      peak_val  <= '0;
      for (int i = 0; i < NLAGS; i++) mags[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        PD_IDLE: begin
          if (start) begin
            state <= PD_CORDIC;
            n_in  <= '0;
            n_out <= '0;
            best  <= '0;
            best_idx <= '0;
          end
        end
        PD_CORDIC: begin
          if (c_in_valid) n_in <= n_in + 1'b1;
          if (c_out_valid) begin
            mags[n_out[LW-1:0]] <= c_mag;
            if (n_out == '0 || c_mag > best) begin
              best     <= c_mag;
              best_idx <= n_out[LW-1:0];
            end
            n_out <= n_out + 1'b1;
            if (n_out == (LW+1)'(NLAGS - 1)) begin
              state <= PD_INTERP;
              setup <= 1'b1;
            end
          end
        end
        PD_INTERP: begin
          if (setup) begin
            setup <= 1'b0;
            pos   <= TOA_W'(best_idx) <<< 8;
            step  <= TOA_W'(128);
            it    <= '0;
            j     <= '0;
            acc   <= '0;
            phase <= PH_EARLY;
          end else begin
            j   <= j + 1'b1;
            acc <= acc_next;
            if (j == JW'(2*HALF - 1)) begin
              acc <= '0;
              unique case (phase)
                PH_EARLY: begin
                  early_val <= acc_next;
                  phase     <= PH_LATE;
                end
                PH_LATE: begin
                  if (acc_next > early_val) pos <= pos + step;
                  else                      pos <= pos - step;
                  step <= step >>> 1;
                  it   <= it + 1'b1;
                  phase <= (it == ($clog2(ITER+1))'(ITER - 1)) ? PH_FINAL : PH_EARLY;
                end
                default: begin
                  toa_q8     <= pos;
                  peak_index <= best_idx;
                  if (acc_next < 0)
                    peak_val <= '0;
                  else if ((acc_next >>> SFRAC) >= (ACC_W'(1) <<< W))
                    peak_val <= '1;
                  else
                    peak_val <= W'(acc_next >>> SFRAC);
                  state <= PD_READY;
                end
              endcase
            end
          end
        end
        PD_READY: begin
          out_valid <= 1'b1;
          state     <= PD_IDLE;
        end
        default: state <= PD_IDLE;
      endcase
    end
  end

  // out_valid marks the single Output Ready clock.
  assert property (@(posedge clk) disable iff (rst) out_valid |-> state == PD_IDLE);
endmodule
