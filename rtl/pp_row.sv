// pp_row: one partial product row PP_J of the modified Booth multiplier.
//
// The row holds its own Booth encoder (as the per-row blocks of the published
// block diagram do) and one bit generator per position:
//     p(J,k) = o & (a_k ^ n)  |  t & (a_(k-1) ^ n),    a_(-1) = 0
// i.e. the selected multiple (A or 2A) passed through an XOR that inverts it
// for a negative digit.  The +1 of the two's complement is not added here; it
// leaves the row as enc.c.  A zero digit (z) gives an all-zero row.
// The sign bit s is the same formula one position above the MSB (a_N = a_(N-1)).
// The row is N bits wide (p(J,0) .. p(J,N-1)); the top only connects the bits
// that fall in retained columns and synthesis drops the rest.
// Combinational.
module pp_row
  import fwb_pkg::*;
#(
  parameter int unsigned N = 8,   // operand width
  parameter int unsigned J = 0    // row index, 0 .. N/2-1 (informational)
) (
  input  logic [N-1:0] a,         // multiplicand
  input  logic [2:0]   trip,      // {b(2J+1), b(2J), b(2J-1)}
  output logic [N-1:0] pp,        // p(J, N-1 .. 0)
  output logic         s,         // sign bit s_J
  output booth_enc_t   enc        // encoder outputs of this row
);

  // a extended by one bit at each end: ax[k+1] = a_k, ax[0] = a_(-1) = 0,
  // ax[N+1] = a_N = a_(N-1).
  logic [N+1:0] ax;

  booth_encoder u_enc (
    .trip (trip),
    .enc  (enc)
  );

  assign ax = {a[N-1], a, 1'b0};

  always_comb begin
    for (int k = 0; k < N; k++)
      pp[k] = (enc.o & (ax[k+1] ^ enc.n)) | (enc.t & (ax[k] ^ enc.n));
    s = (enc.o & (ax[N+1] ^ enc.n)) | (enc.t & (ax[N] ^ enc.n));
  end

  // J only documents which row an instance builds.
  if (J >= N / 2) begin : g_bad_row
    $error("pp_row: J must be below N/2");
  end

endmodule
