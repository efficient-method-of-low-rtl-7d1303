// One-bit full adder: the cell of the carry-save array and of the final
// ripple-carry row of the array multiplier. Purely combinational:
// s = x ^ y ^ ci, co = majority(x, y, ci).
module full_adder (
  input  logic x,
  input  logic y,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = x ^ y ^ ci;
  assign co = (x & y) | (x & ci) | (y & ci);
endmodule
