// wide_mult35: 35 x 35-bit signed multiplier assembled from four 18 x 18-bit
// partial products, the way a wide product is formed from the 18 x 18
// multipliers of an FPGA.
//
// Each operand is split into an upper signed half U = A[34:17] (18 bits) and a
// lower half L = {0, A[16:0]} (18 bits, always positive). The product is
//   P = (AU*BU << 34) + ((AU*BL + AL*BU) << 17) + AL*BL
// AL*BL is unsigned and is produced by the full-adder array multiplier
// (17 x 17); the three other partial products are signed 18 x 18 products.
//
// Interface: a, b (35 bits signed) -> p (70 bits signed). Combinational.
//
// Source and choices: the split into four partial products and the 17- and
// 34-bit shifts follow the original design's wide-multiplier guideline. Using
// array_mult for the unsigned lower product is this design's choice.
module wide_mult35 (
  input  logic signed [34:0] a,
  input  logic signed [34:0] b,
  output logic signed [69:0] p
);
  logic signed [17:0] au, bu, al, bl;
  logic signed [35:0] p_uu, p_ul, p_lu;
  logic        [33:0] p_ll;

  assign au = a[34:17];
  assign bu = b[34:17];
  assign al = {1'b0, a[16:0]};
  assign bl = {1'b0, b[16:0]};

  assign p_uu = au * bu;
  assign p_ul = au * bl;
  assign p_lu = al * bu;

  array_mult #(.W(17)) u_ll (.x(a[16:0]), .y(b[16:0]), .z(p_ll));

  assign p = (70'(p_uu) <<< 34) + (70'(p_ul) <<< 17) + (70'(p_lu) <<< 17)
           + 70'($signed({1'b0, p_ll}));
endmodule
