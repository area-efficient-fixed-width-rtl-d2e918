// tb_error_comp_fun: exhaustive test of the lambda / omega correction.
// For every combination of a0, the last digit's triplet and s0, the expected
// values are derived by adding numbers: the last row's LSB (from the digit
// and a0) plus its correction bit gives the carry lambda; the rounding 1 plus
// lambda gives ~lambda in column N-1; and {~s0, s0, s0} + lambda gives omega.
module tb_error_comp_fun;
  import fwb_pkg::*;

  logic       a0, b_msb, o_last, z_last, s0;
  logic       lambda_n;
  logic [2:0] omega;
  booth_enc_t enc;
  logic [2:0] trip;
  int checks = 0, failures = 0;

  booth_encoder u_enc (.trip(trip), .enc(enc));
  error_comp_fun dut (.a0(a0), .b_msb(b_msb), .o_last(o_last), .z_last(z_last), .s0(s0),
                      .lambda_n(lambda_n), .omega(omega));

  assign b_msb  = trip[2];
  assign o_last = enc.o;
  assign z_last = enc.z;

  initial begin
    #100_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, lsb, c, lam, rnd, om;
    for (int i = 0; i < 32; i++) begin
      {trip, a0, s0} = 5'(i);
      #1;
      d   = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      // LSB of |d|*A (a 2A multiple has LSB 0), inverted for a negative digit
      lsb = ((d == 1 || d == -1) ? int'(a0) : 0);
      if (d < 0) lsb = 1 - lsb;
      if (d == 0) lsb = 0;
      c   = d < 0 ? 1 : 0;
      lam = (lsb + c) / 2;
      rnd = 1 + lam;                       // rounding 1 plus lambda, column N-1
      om  = 4 * (1 - int'(s0)) + 2 * int'(s0) + int'(s0) + lam;
      checks++;
      if (int'(lambda_n) != rnd % 2 || om > 7 || int'(omega) != om) begin
        failures++;
        $display("trip=%b a0=%b s0=%b: lambda_n=%b omega=%b expected %0d / %0d",
                 trip, a0, s0, lambda_n, omega, rnd % 2, om);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
