// array_mult: unsigned W x W iterative array multiplier made of one-bit
// full-adder cells.
//
// Partial-product bit x[j]&y[i] enters the cell of row i, column j. Each row of
// cells adds the next partial product to the sum and carry bits of the row
// above (carry-save); the lowest product bit of each row leaves as z[i]. The
// last row's sum and carry vectors are merged by a ripple-carry row of cells,
// giving the upper W product bits. The array has (W-1)*W cells plus the final
// ripple row, which is what the full-adder cost of a multiplier counts.
//
// Interface: x, y (W bits, unsigned) -> z (2W bits). Combinational, no clock.
// The cell arrangement follows the 4 x 4 example structure; W = 4 is that
// example, and the block is reused at W = 17 for the unsigned low-half product
// of the wide multiplier.
//
// Source and choices: the array of 1-bit full-adder cells follows the
// iterative array multiplier of the original design (4 x 4 in its figure); the
// carry-save rows closed by a ripple row, and W as a parameter, are this
// design's own arrangement. The last carry-out of the ripple row is always 0
// for an unsigned W x W product and is left unconnected.
module array_mult #(
  parameter int W = 4
) (
  input  logic [W-1:0]   x,
  input  logic [W-1:0]   y,
  output logic [2*W-1:0] z
);
  // Row i keeps its sum bits s (weight i+j) and carry bits c (weight i+j+1).
  for (genvar i = 0; i < W; i++) begin : g_row
    logic [W-1:0] s, c;
    if (i == 0) begin : g_first
      // Row 0: the first partial product, nothing to add yet.
      assign s = x & {W{y[0]}};
      assign c = '0;
    end else begin : g_cells
      for (genvar j = 0; j < W; j++) begin : g_col
        logic a_in;
        if (j == W-1) begin : g_top
          assign a_in = 1'b0;
        end else begin : g_mid
          assign a_in = g_row[i-1].s[j+1];
        end
        full_adder u_fa (.a(a_in), .b(x[j] & y[i]), .ci(g_row[i-1].c[j]),
                         .s(s[j]), .co(c[j]));
      end
    end
    assign z[i] = s[0];
  end

  // Final ripple row: {0, s[W-1][W-1:1]} + c[W-1][W-1:0]. Its last carry is
  // always 0 because the product fits in 2W bits, so it is left unconnected.
  for (genvar j = 0; j < W; j++) begin : g_rip
    logic a_in, cin, cout;
    if (j == W-1) begin : g_top
      assign a_in = 1'b0;
    end else begin : g_mid
      assign a_in = g_row[W-1].s[j+1];
    end
    if (j == 0) begin : g_c0
      assign cin = 1'b0;
    end else begin : g_cn
      assign cin = g_rip[j-1].cout;
    end
    full_adder u_fa (.a(a_in), .b(g_row[W-1].c[j]), .ci(cin),
                     .s(z[W+j]), .co(cout));
  end

endmodule
