// cordic_mag: pipelined vectoring CORDIC that returns the magnitude (2-norm)
// of a complex sample, with the CORDIC gain removed.
//
// The input is first folded into the right half-plane (x, y) -> (-x, -y) when
// x < 0, which leaves the magnitude unchanged. Each of the STAGES micro-
// rotations then turns the vector towards the x axis by +-atan(2^-i), chosen by
// the sign of y, so that y is driven to zero and x ends at K * |v| with
// K = prod sqrt(1 + 2^-2i) = 1.64676 for 12 stages. A last stage multiplies by
// 1/K (an 18-bit fraction, 159188 / 2^18) to compensate the gain. The angle is
// not accumulated: only the norm is needed.
//
// Interface: in_valid, x_in/y_in (W bits signed) -> out_valid, mag (W bits,
// unsigned). Fully pipelined, one sample per clock, latency STAGES + 2 clocks
// (input fold, STAGES rotations, gain compensation). G guard bits below the
// input LSB keep the shift-and-add rounding error to about one output LSB.
// Synchronous active-high reset clears the valid pipeline.
//
// Source and choices: twelve vectoring stages with the gain compensated
// follow the original design. The half-plane fold, the guard bits, and the
// single-multiply compensation by round(2^18/1.64676) are this design's
// choices.
module cordic_mag #(
  parameter int W      = 34,
  parameter int STAGES = 12,
  parameter int G      = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic                out_valid,
  output logic        [W-1:0] mag
);
  localparam int IW = W + 2 + G;             // growth by K < 2.33 and guard bits
  localparam int KF = 18;                    // fraction bits of 1/K
  localparam logic [KF:0] KINV = 19'd159188; // round(2^18 / 1.6467602)

  logic signed [IW-1:0] xs [STAGES+1];
  logic signed [IW-1:0] ys [STAGES+1];
  logic [STAGES+1:0]    vld;
  logic signed [IW+KF:0] prod;

  // Stage 0: fold into the right half-plane and add the guard bits.
  always_ff @(posedge clk) begin
    if (x_in < 0) begin
      xs[0] <= -(IW'(x_in) <<< G);
      ys[0] <= -(IW'(y_in) <<< G);
    end else begin
      xs[0] <= IW'(x_in) <<< G;
      ys[0] <= IW'(y_in) <<< G;
    end
  end

  // Micro-rotations.
  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (ys[i] >= 0) begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
      end else begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
      end
    end
  end

  // Gain compensation.
  assign prod = (IW+KF+1)'(xs[STAGES]) * $signed({1'b0, KINV});
  always_ff @(posedge clk) begin
    mag <= W'(prod >>> (KF + G));
  end

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[STAGES:0], in_valid};
  end
  assign out_valid = vld[STAGES+1];
endmodule
