// tb_add_tree: drives the Dadda tree with random column bits, N = 8 and
// N = 16, and compares p with the weighted sum of those bits: column r has
// weight 2^r (r = 0 is column N-1), only the first col_height(N, r) bits of a
// column count, and p = (sum >> 1) mod 2^N.  Also checks the all-ones
// column pattern (largest sum).
module tb_add_tree;
  import fwb_pkg::*;

  localparam int H8  = max_height(8);
  localparam int H16 = max_height(16);

  logic [H8-1:0]  c8  [9];
  logic [H16-1:0] c16 [17];
  logic [7:0]     p8;
  logic [15:0]    p16;
  int checks = 0, failures = 0;

  add_tree dut8 (.col(c8), .p(p8));
  add_tree #(.N(16)) dut16 (.col(c16), .p(p16));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned sum8, sum16;
    for (int it = 0; it < 20000; it++) begin
      sum8  = 0;
      sum16 = 0;
      for (int r = 0; r < 9; r++) begin
        for (int i = 0; i < H8; i++) begin
          c8[r][i] = (it == 0) ? 1'b1 : 1'($urandom);
          if (i < col_height(8, r)) sum8 += longint'(c8[r][i]) << r;
        end
      end
      for (int r = 0; r < 17; r++) begin
        for (int i = 0; i < H16; i++) begin
          c16[r][i] = (it == 0) ? 1'b1 : 1'($urandom);
          if (i < col_height(16, r)) sum16 += longint'(c16[r][i]) << r;
        end
      end
      #1;
      checks++;
      if (longint'(p8) != ((sum8 >> 1) & 64'hff)) begin
        failures++;
        if (failures < 10) $display("N=8: p=%0d expected %0d", p8, (sum8 >> 1) & 64'hff);
      end
      checks++;
      if (longint'(p16) != ((sum16 >> 1) & 64'hffff)) begin
        failures++;
        if (failures < 10) $display("N=16: p=%0d expected %0d", p16, (sum16 >> 1) & 64'hffff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
