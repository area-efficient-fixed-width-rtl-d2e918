// half_adder: one-bit half adder, the 2:2 counter of the Dadda tree.
// sum = x ^ y, co = x & y.  Combinational.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic co
);

  assign s  = x ^ y;
  assign co = x & y;

endmodule
