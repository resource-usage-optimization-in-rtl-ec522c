// cmult3: complex multiplier using three real multiplications instead of four.
//
//   common = (re(a) - im(a)) * im(b)
//   re(c)  = common + (re(b) - im(b)) * re(a)
//   im(c)  = common + (re(b) + im(b)) * im(a)
//
// which equals re(a)re(b) - im(a)im(b) and re(a)im(b) + im(a)re(b). The shared
// product trades one multiplier for three extra adders. The result is exact:
// PW = AW + BW + 1 bits hold any product of an AW-bit and a BW-bit complex
// number.
//
// Interface: a (AW-bit re/im) times b (BW-bit re/im); the product is registered
// when en is high (one clock of latency, the multiplier pipeline register of a
// DSP slice). The register is cleared by rst (synchronous, active high).
//
// Source and choices: the three-multiplier factorisation follows the
// original design's complex-multiplication guideline. The output register,
// the enable and the full-precision output width are this design's choices.
module cmult3 #(
  parameter int AW = 24,
  parameter int BW = 24,
  parameter int PW = AW + BW + 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [AW-1:0] a_re,
  input  logic signed [AW-1:0] a_im,
  input  logic signed [BW-1:0] b_re,
  input  logic signed [BW-1:0] b_im,
  output logic signed [PW-1:0] c_re,
  output logic signed [PW-1:0] c_im
);
  localparam int IW = AW + BW + 2;   // internal width before the exact truncation

  logic signed [AW:0]   a_d;          // re(a) - im(a)
  logic signed [BW:0]   b_d, b_s;     // re(b) - im(b), re(b) + im(b)
  logic signed [IW-1:0] common, pr, pi;

  always_comb begin
    a_d    = {a_re[AW-1], a_re} - {a_im[AW-1], a_im};
    b_d    = {b_re[BW-1], b_re} - {b_im[BW-1], b_im};
    b_s    = {b_re[BW-1], b_re} + {b_im[BW-1], b_im};
    common = IW'(a_d) * IW'(b_im);
    pr     = common + IW'(b_d) * IW'(a_re);
    pi     = common + IW'(b_s) * IW'(a_im);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      c_re <= '0;
      c_im <= '0;
    end else if (en) begin
      c_re <= PW'(pr);
      c_im <= PW'(pi);
    end
  end
endmodule
