// systolic_corr: complex correlator built as a systolic FIR filter with an
// adder cascade, one multiply-add slice per training-sequence sample.
//
// The received stream x is correlated with the stored training sequence c:
//   y(n) = sum_{j=0}^{NTAPS-1} conj(c_j) * x(n - (NTAPS-1) + j)
// which is an FIR filter with coefficients h_k = conj(c_{NTAPS-1-k}); writing
// c_j through the coefficient port stores h_k = conj(c_j) in slice
// k = NTAPS-1-j.
//
// Slice k (0-based) holds a registered coefficient, a two-register delay line
// for x (one register in slice 0), a complex multiplier with a pipeline
// register (cmult3) and a cascade adder with an output register that adds the
// product to the previous slice's cascade value. Every register advances only
// on an accepted input sample (in_valid). With one sample per clock, the output
// in clock t is y(t - NTAPS - 2), the N+2 latency of the 8-slice textbook
// example (output Y(n-10)); put in samples, the y that comes with the
// out_valid pulse following input sample n is y(n - NTAPS - 1).
//
// Interface: in_valid with x_re/x_im (DW bits); coef_we/coef_addr/coef_re/
// coef_im load c_j (stored conjugated with one extra bit, so that the most
// negative value conjugates exactly); y_re/y_im (ACCW bits, exact) with out_valid one clock after
// each accepted input. Synchronous active-high reset clears all state.
//
// Source and choices: the systolic FIR with an adder cascade, one slice per
// training symbol (16), follows the original design. This design chose:
//   - complex slices built with cmult3;
//   - the conjugated coefficient store and its load port;
//   - full-precision widths (a 54-bit cascade where the original uses 48 bits
//     with 18-bit DSP slices).
module systolic_corr #(
  parameter int NTAPS = 16,
  parameter int DW    = 24,
  parameter int CW    = 24,
  parameter int ACCW  = DW + CW + 2 + $clog2(NTAPS)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  logic signed [DW-1:0]      x_re,
  input  logic signed [DW-1:0]      x_im,
  input  logic                      coef_we,
  input  logic [$clog2(NTAPS)-1:0]  coef_addr,
  input  logic signed [CW-1:0]      coef_re,
  input  logic signed [CW-1:0]      coef_im,
  output logic                      out_valid,
  output logic signed [ACCW-1:0]    y_re,
  output logic signed [ACCW-1:0]    y_im
);
  localparam int HW = CW + 1;        // conj(-2^(CW-1)) needs one more bit
  localparam int PW = DW + HW + 1;

  logic signed [HW-1:0]   h_re [NTAPS];
  logic signed [HW-1:0]   h_im [NTAPS];
  logic signed [DW-1:0]   xa_re [NTAPS], xa_im [NTAPS];  // first delay register
  logic signed [DW-1:0]   xb_re [NTAPS], xb_im [NTAPS];  // second delay register
  logic signed [PW-1:0]   m_re [NTAPS], m_im [NTAPS];    // registered products
  logic signed [ACCW-1:0] p_re [NTAPS], p_im [NTAPS];    // cascade registers

  // Coefficient registers: h_{NTAPS-1-j} = conj(c_j).
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) begin
        h_re[k] <= '0;
        h_im[k] <= '0;
      end
    end else if (coef_we) begin
      h_re[NTAPS-1-int'(coef_addr)] <= HW'(coef_re);
      h_im[NTAPS-1-int'(coef_addr)] <= -HW'(coef_im);
    end
  end

  // Input delay line: slice 0 has one register, the others two.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) begin
        xa_re[k] <= '0; xa_im[k] <= '0;
        xb_re[k] <= '0; xb_im[k] <= '0;
      end
    end else if (in_valid) begin
      xb_re[0] <= x_re;
      xb_im[0] <= x_im;
      for (int k = 1; k < NTAPS; k++) begin
        xa_re[k] <= xb_re[k-1];
        xa_im[k] <= xb_im[k-1];
        xb_re[k] <= xa_re[k];
        xb_im[k] <= xa_im[k];
      end
    end
  end

  for (genvar k = 0; k < NTAPS; k++) begin : g_slice
    cmult3 #(.AW(DW), .BW(HW), .PW(PW)) u_mul (
      .clk(clk), .rst(rst), .en(in_valid),
      .a_re(xb_re[k]), .a_im(xb_im[k]), .b_re(h_re[k]), .b_im(h_im[k]),
      .c_re(m_re[k]), .c_im(m_im[k]));
  end

  // Adder cascade: slice 0 adds zero.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) begin
        p_re[k] <= '0;
        p_im[k] <= '0;
      end
    end else if (in_valid) begin
      p_re[0] <= ACCW'(m_re[0]);
      p_im[0] <= ACCW'(m_im[0]);
      for (int k = 1; k < NTAPS; k++) begin
        p_re[k] <= p_re[k-1] + ACCW'(m_re[k]);
        p_im[k] <= p_im[k-1] + ACCW'(m_im[k]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

  assign y_re = p_re[NTAPS-1];
  assign y_im = p_im[NTAPS-1];

  // xa of slice 0 is not used (slice 0 has a single input register).
  // Coefficient writes and samples never collide in normal use; no rule here.
endmodule
