// error_comp_fun: lambda / omega correction of the fixed-width Booth multiplier.
//
// Two bits of the discarded region are folded into the kept columns exactly:
//   * The LSB of the last row, p(N/2-1,0), and that row's correction bit
//     c(N/2-1) share column N-2.  Their sum epsilon stays behind (and is
//     discarded); their carry lambda has weight 2^(N-1).
//       epsilon = a0 & o(N/2-1)
//       lambda  = ~epsilon & ~z(N/2-1) & b(N-1)
//   * lambda meets the rounding '1' of a post-truncated multiplier in column
//     N-1: the sum is ~lambda (kept in column N-1) and the carry lambda goes
//     to column N.
//   * That carry is absorbed by the sign-extension bits (~s0, s0, s0) of row 0
//     at columns N+2..N, giving omega2 omega1 omega0 = {~s0,s0,s0} + lambda:
//       omega0 = s0 ^ lambda,  omega1 = s0 & ~lambda,  omega2 = ~omega1
//     (this addition never carries out of column N+2).
// The equations for omega follow the truth table of the published design;
// the gate network drawn for it is not copied.  Combinational.
module error_comp_fun (
  input  logic       a0,        // multiplicand LSB
  input  logic       b_msb,     // multiplier MSB b(N-1), the last row's negate
  input  logic       o_last,    // o of the last Booth encoder
  input  logic       z_last,    // z of the last Booth encoder
  input  logic       s0,        // sign bit of row 0
  output logic       lambda_n,  // ~lambda, column N-1
  output logic [2:0] omega      // {omega2, omega1, omega0}, columns N+2..N
);

  logic epsilon, lambda;

  always_comb begin
    epsilon  = a0 & o_last;
    lambda   = ~epsilon & ~z_last & b_msb;
    lambda_n = ~lambda;
    omega[0] = s0 ^ lambda;
    omega[1] = s0 & ~lambda;
    omega[2] = ~omega[1];
  end

endmodule
