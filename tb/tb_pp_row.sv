// tb_pp_row: checks one partial product row for N = 8 and N = 16.  For every
// triplet and many multiplicands the row {s, pp} read as an (N+1)-bit number,
// plus the correction bit c, must equal d * A modulo 2^(N+1), where d is the
// radix-4 digit of the triplet; a zero digit must give an all-zero row with
// c = 0.  A watchdog stops a stalled run.
module tb_pp_row;
  import fwb_pkg::*;

  logic [7:0]  a8;
  logic [15:0] a16;
  logic [2:0]  trip;
  logic [7:0]  pp8;
  logic [15:0] pp16;
  logic        s8, s16;
  booth_enc_t  enc8, enc16;
  int checks = 0, failures = 0;

  pp_row dut8 (.a(a8), .trip(trip), .pp(pp8), .s(s8), .enc(enc8));
  pp_row #(.N(16), .J(3)) dut16 (.a(a16), .trip(trip), .pp(pp16), .s(s16), .enc(enc16));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit row_ok(input longint av, input int d, input int n,
                                input longint unsigned row, input bit c);
    longint unsigned m, want;
    m    = (64'd1 << (n + 1)) - 1;
    want = longint'(d) * av;
    if (d == 0) return row == 0 && c == 0;
    return ((row + longint'(c)) & m) == (want & m);
  endfunction

  initial begin
    int d;
    for (int i = 0; i < 8; i++) begin
      for (int k = 0; k < 600; k++) begin
        trip = 3'(i);
        a8   = (k < 256) ? 8'(k) : 8'($urandom);
        a16  = (k < 4) ? 16'({k[0], 15'(0)} | 16'(k[1])) : 16'($urandom);
        #1;
        d = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
        checks++;
        if (!row_ok(longint'($signed(a8)), d, 8, {55'd0, s8, pp8}, enc8.c)) begin
          failures++;
          if (failures < 10) $display("N=8 trip=%b a=%0d: row %b%b c=%b", trip, $signed(a8), s8, pp8, enc8.c);
        end
        checks++;
        if (!row_ok(longint'($signed(a16)), d, 16, {47'd0, s16, pp16}, enc16.c)) begin
          failures++;
          if (failures < 10) $display("N=16 trip=%b a=%0d: row %b%b c=%b", trip, $signed(a16), s16, pp16, enc16.c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
