// full_adder: one-bit full adder, the 3:2 counter of the Dadda tree.
// sum = x ^ y ^ ci, co = majority(x, y, ci).  The published design builds it
// as an 11-transistor GDI cell; this is its logic function.  Combinational.
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
