// tb_booth_encoder: applies all eight triplets and checks the five encoder
// outputs against the radix-4 digit d = -2*b(2j+1) + b(2j) + b(2j-1):
// o = (|d| == 1), t = (|d| == 2), n = b(2j+1), z = (d == 0) and
// c = (d < 0).  Combinational; a watchdog stops a stalled run.
module tb_booth_encoder;
  import fwb_pkg::*;

  logic [2:0] trip;
  booth_enc_t enc;
  int checks = 0, failures = 0;

  booth_encoder dut (.trip(trip), .enc(enc));

  initial begin
    #100_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, mag;
    booth_enc_t exp_enc;
    for (int i = 0; i < 8; i++) begin
      trip = 3'(i);
      #1;
      d   = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      mag = d < 0 ? -d : d;
      exp_enc.n = trip[2];
      exp_enc.t = (mag == 2);
      exp_enc.o = (mag == 1);
      exp_enc.z = (d == 0);
      exp_enc.c = (d < 0);
      checks++;
      if (enc !== exp_enc) begin
        failures++;
        $display("triplet %b: got %b expected %b", trip, enc, exp_enc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
