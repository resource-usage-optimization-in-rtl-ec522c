// series_recip: reciprocal 1/b of a positive fixed-point number by the
// truncated series 1/(1+x) = (1-x)(1+x^2)(1+x^4)(1+x^8).
//
// Division a/b is done as a * (1/b); this block produces 1/b without a
// divider. Like a floating-point number, b is first written as m * 2^e with
// the mantissa m close to 1, so that x = m - 1 is small. The network then uses
// six multipliers (three squarings x^2, x^4, x^8 and three products) and four
// adders (1-x, 1+x^2, 1+x^4, 1+x^8), which is the 8-bit-accuracy form. The
// mantissa is normalised into [0.75, 1.5), so |x| <= 1/2 and the dropped
// factor x^16 stays below 2^-16: the result is good to about 16 bits, well
// beyond 8.
//
// Interface: in_valid with b (W = IWL+FWL bits, Q(IWL).(FWL), taken as
// unsigned) -> out_valid with r = 1/b in the same format, three clocks later
// (normalise | series | de-normalise). Results too large for the format,
// including b = 0, saturate to the largest positive value. Arithmetic is
// truncating; MF fraction bits are kept inside. Fully pipelined; the
// synchronous active-high reset clears the valid pipeline.
//
// Source and choices: the product (1-x)(1+x^2)(1+x^4)(1+x^8), with six
// multipliers, four adders and b written as 1 + x after normalisation, follows
// the original design. There, the product addresses a block-RAM table of
// reciprocals. Here it is used directly as the reciprocal, and no table is
// built. This design also chose the [0.75, 1.5) mantissa range, the pipeline
// and the saturation.
module series_recip #(
  parameter int IWL = sdr_pkg::EQ_IWL,
  parameter int FWL = sdr_pkg::EQ_FWL,
  parameter int MF  = 20
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  logic [IWL+FWL-1:0]         b,
  output logic                       out_valid,
  output logic signed [IWL+FWL-1:0]  r
);
  localparam int W  = IWL + FWL;
  localparam int XW = MF + 3;                       // signed, |value| < 4
  localparam logic signed [XW-1:0] ONE = XW'(1) <<< MF;
  localparam int EW = 8;

  // ---- stage 1: normalise b = m * 2^e, x = m - 1 -------------------------
  logic [$clog2(W)-1:0] msb;
  logic [W-1:0]         bn;
  logic [MF:0]          mq;           // m in [1,2), MF fraction bits
  logic signed [XW-1:0] x_c, x_s1;
  logic signed [EW-1:0] e_c, e_s1;
  logic                 zero_s1;

  always_comb begin
    msb = '0;
    for (int i = 0; i < W; i++) if (b[i]) msb = ($clog2(W))'(i);
    bn  = b << (W - 1 - int'(msb));
    mq  = bn[W-1 -: MF+1];
    if (mq[MF-1]) begin               // m >= 1.5: use m/2 in [0.75, 1)
      x_c = XW'({1'b0, mq} >> 1) - ONE;
      e_c = EW'(int'(msb) - FWL + 1);
    end else begin
      x_c = XW'({1'b0, mq}) - ONE;
      e_c = EW'(int'(msb) - FWL);
    end
  end

  // ---- stage 2: the series network ------------------------------------------
  logic signed [2*XW-1:0] x2f, x4f, x8f, p12f, p123f, p1234f;
  logic signed [XW-1:0]   x2, x4, x8, t1, t2, t3, t4, p12, p123, rser, r_s2;
  logic signed [EW-1:0]   e_s2;
  logic                   zero_s2;

  always_comb begin
    x2f    = (2*XW)'(x_s1) * (2*XW)'(x_s1);
    x2     = XW'(x2f >>> MF);
    x4f    = (2*XW)'(x2) * (2*XW)'(x2);
    x4     = XW'(x4f >>> MF);
    x8f    = (2*XW)'(x4) * (2*XW)'(x4);
    x8     = XW'(x8f >>> MF);
    t1     = ONE - x_s1;
    t2     = ONE + x2;
    t3     = ONE + x4;
    t4     = ONE + x8;
    p12f   = (2*XW)'(t1) * (2*XW)'(t2);
    p12    = XW'(p12f >>> MF);
    p123f  = (2*XW)'(p12) * (2*XW)'(t3);
    p123   = XW'(p123f >>> MF);
    p1234f = (2*XW)'(p123) * (2*XW)'(t4);
    rser   = XW'(p1234f >>> MF);
  end

  // ---- stage 3: 1/b = (1/m) * 2^-e, back to Q(IWL).(FWL) ---------------------
  localparam int SW = XW + 16;
  localparam logic signed [SW-1:0] RMAX = SW'((64'sd1 <<< (W-1)) - 1);
  logic signed [SW-1:0] wide, r_c;
  int                   sh;

  always_comb begin
    sh   = MF - FWL + int'(e_s2);
    wide = SW'(r_s2);
    if (sh >= 0) r_c = wide >>> sh;
    else         r_c = wide <<< (-sh);
    if (zero_s2 || sh < -(SW - XW) || r_c > RMAX) r_c = RMAX;
  end

  logic [2:0] vld;
  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[1:0], in_valid};
    x_s1    <= x_c;
    e_s1    <= e_c;
    zero_s1 <= (b == '0);
    r_s2    <= rser;
    e_s2    <= e_s1;
    zero_s2 <= zero_s1;
    r       <= W'(r_c);
  end
  assign out_valid = vld[2];
endmodule
