// full_adder: one-bit full adder, the cell from which the array multiplier
// is built. Purely combinational: s = a ^ b ^ ci, co = majority(a, b, ci).
//
// Source and choices: the 1-bit full-adder cell is the unit the original
// design counts multiplier cost in. Writing it as a module of its own is this
// design's choice, so that array_mult is built from visible cells.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
