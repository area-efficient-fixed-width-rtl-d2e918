// tb_sc_generator: exhaustive test of the compensation generator for N = 8
// (one output) and N = 16 (three outputs).  The sum of the alpha outputs must
// be floor((k-1)/2) (0 for k <= 1), k being the number of non-zero digits,
// and the outputs must be thermometer coded (alpha_i = 1 implies
// alpha_(i-1) = 1).
module tb_sc_generator;

  logic [3:0] z8;
  logic [0:0] al8;
  logic [7:0] z16;
  logic [2:0] al16;
  int checks = 0, failures = 0;

  sc_generator dut8 (.z(z8), .alpha(al8));
  sc_generator #(.N(16)) dut16 (.z(z16), .alpha(al16));

  initial begin
    #100_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int want(input int k);
    return k > 1 ? (k - 1) / 2 : 0;
  endfunction

  initial begin
    int k;
    for (int i = 0; i < 256; i++) begin
      z8  = 4'(i);
      z16 = 8'(i);
      #1;
      if (i < 16) begin
        k = 4 - $countones(z8);
        checks++;
        if (int'(al8) != want(k)) begin
          failures++;
          $display("N=8 z=%b alpha=%b expected %0d", z8, al8, want(k));
        end
      end
      k = 8 - $countones(z16);
      checks++;
      if ($countones(al16) != want(k) || al16 != 3'((1 << want(k)) - 1)) begin
        failures++;
        $display("N=16 z=%b alpha=%b expected sum %0d", z16, al16, want(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
