// booth_encoder: radix-4 (modified) Booth encoder for one multiplier digit.
//
// The triplet {b(2j+1), b(2j), b(2j-1)} selects one of the digits
// -2, -1, 0, +1, +2.  The digit is returned as five one-hot style controls
// (booth_enc_t): o selects A, t selects 2A, n negates, z flags a zero digit and
// c is the '+1' that completes the two's complement of a negated row.  The
// coding, including "-0" for 111 (z = 1, n = 1, c = 0), follows the published
// encoding table; the gate-level form is written here as Boolean equations.
// Purely combinational, no clock.
module booth_encoder
  import fwb_pkg::*;
(
  input  logic [2:0]  trip,  // {b(2j+1), b(2j), b(2j-1)}
  output booth_enc_t  enc
);

  logic hi, mid, lo;
  assign {hi, mid, lo} = trip;

  always_comb begin
    enc.n = hi;
    enc.o = mid ^ lo;
    enc.t = (hi ^ mid) & ~(mid ^ lo);
    enc.z = ~(hi ^ mid) & ~(mid ^ lo);
    enc.c = hi & ~enc.z;
  end

endmodule
