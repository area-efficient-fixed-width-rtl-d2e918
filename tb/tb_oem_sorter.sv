// tb_oem_sorter: exhaustive test of the bit sorting network at 4 and 8
// inputs: the output must hold popcount(x) ones at its low indices and zeros
// above.
module tb_oem_sorter;

  logic [3:0] x4, y4;
  logic [7:0] x8, y8;
  int checks = 0, failures = 0;

  oem_sorter dut4 (.x(x4), .beta(y4));
  oem_sorter #(.W(8)) dut8 (.x(x8), .beta(y8));

  initial begin
    #100_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      x4 = 4'(i);
      x8 = 8'(i);
      #1;
      if (i < 16) begin
        checks++;
        if (y4 != 4'((1 << $countones(x4)) - 1)) begin
          failures++;
          $display("W=4 x=%b beta=%b", x4, y4);
        end
      end
      checks++;
      if (y8 != 8'((1 << $countones(x8)) - 1)) begin
        failures++;
        $display("W=8 x=%b beta=%b", x8, y8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
