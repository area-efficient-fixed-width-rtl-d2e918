// tb_fw_booth_mult_sizes: the fixed-width Booth multiplier at sizes other than
// the default: N = 4 (all 256 operand pairs), N = 12 and N = 16 (random
// operands plus the corner values 0, 1, -1, the most negative and the most
// positive number).  Outputs are compared with the arithmetic reference in
// fwb_ref_pkg, and the error against the exact product is reported.
module tb_fw_booth_mult_sizes;
  import fwb_ref_pkg::*;

  logic [3:0]  a4, b4, p4;
  logic [11:0] a12, b12, p12;
  logic [15:0] a16, b16, p16;
  int checks = 0, failures = 0;

  fw_booth_mult #(.N(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  fw_booth_mult #(.N(12)) dut12 (.a(a12), .b(b12), .p(p12));
  fw_booth_mult #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned pick(input int i, input int n);
    longint unsigned m;
    m = (64'd1 << n) - 1;
    case (i % 8)
      0: return 0;
      1: return 1;
      2: return m;                       // -1
      3: return 64'd1 << (n - 1);        // most negative
      4: return m >> 1;                  // most positive
      default: return {$urandom, $urandom} & m;
    endcase
  endfunction

  task automatic check(input int n, input longint unsigned got, input longint unsigned a,
                       input longint unsigned b, inout real se, inout real se2);
    ref_t r;
    real  err;
    r = fw_ref(a, b, n);
    checks++;
    if (got != r.p) begin
      failures++;
      if (failures < 10) $display("N=%0d a=%0h b=%0h p=%0h expected %0h", n, a, b, got, r.p);
    end
    err = real'(sext(got, n)) - real'(sext(a, n) * sext(b, n)) / real'(longint'(1) << n);
    se  += err;
    se2 += err * err;
  endtask

  initial begin
    real s4 = 0, q4 = 0, s12 = 0, q12 = 0, s16 = 0, q16 = 0;
    int  cnt = 0;
    for (int i = 0; i < 256; i++) begin
      a4 = 4'(i >> 4);
      b4 = 4'(i);
      #1;
      check(4, longint'(p4), longint'(a4), longint'(b4), s4, q4);
    end
    for (int i = 0; i < 100000; i++) begin
      a12 = 12'(pick(i, 12));
      b12 = 12'(pick(i / 8, 12));
      a16 = 16'(pick(i, 16));
      b16 = 16'(pick(i / 8, 16));
      #1;
      check(12, longint'(p12), longint'(a12), longint'(b12), s12, q12);
      check(16, longint'(p16), longint'(a16), longint'(b16), s16, q16);
      cnt++;
    end
    $display("error vs exact, output LSBs: N=4 mean=%f ms=%f; N=12 mean=%f ms=%f; N=16 mean=%f ms=%f",
             s4 / 256.0, q4 / 256.0, s12 / cnt, q12 / cnt, s16 / cnt, q16 / cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
