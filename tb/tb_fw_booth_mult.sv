// tb_fw_booth_mult: end-to-end test of the fixed-width Booth multiplier at its
// default size (N = 8).  All 65536 operand pairs are applied and each output
// is compared with the arithmetic reference in fwb_ref_pkg.  The test also
// counts how often each mechanism of the design is exercised (lambda carry,
// the four omega cases, every compensation value I, zero / negative / 2A
// digits) and fails if one never occurs, reports the mean and mean-square
// error against the exact product, and checks the per-index averages of the
// dropped value against the published table (S(phi)/2^(N-1) for N = 8).
// A watchdog ends the run if it stalls.
module tb_fw_booth_mult;
  import fwb_ref_pkg::*;

  localparam int N = 8;

  logic [N-1:0] a, b, p;
  int checks = 0, failures = 0;

  fw_booth_mult dut (.a(a), .b(b), .p(p));

  // published averages of the dropped value per zero-pattern index phi
  real table4 [16] = '{0.0, 0.5025, 0.5105, 0.9989, 0.5415, 0.9885, 0.9963, 1.5035,
                       0.1665, 0.6693, 0.6771, 1.1655, 0.7081, 1.1553, 1.1631, 1.6703};

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_t   r;
    int     seen_lambda = 0, seen_omega [4] = '{0, 0, 0, 0}, seen_I [3] = '{0, 0, 0};
    int     seen_zero = 0, seen_neg = 0, seen_two = 0;
    real    sum_s [16], cnt_s [16];
    real    err, sum_e = 0.0, sum_e2 = 0.0, max_e = 0.0;
    longint exact;
    for (int i = 0; i < 16; i++) begin sum_s[i] = 0.0; cnt_s[i] = 0.0; end

    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        a = N'(ia);
        b = N'(ib);
        #1;
        r = fw_ref(longint'(ia), longint'(ib), N);
        checks++;
        if (longint'(p) != r.p) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH a=%0d b=%0d p=%0d expected=%0d", $signed(a), $signed(b), p, r.p);
        end
        // mechanism coverage
        if (r.lambda) seen_lambda++;
        seen_omega[{r.s0, r.lambda}]++;
        seen_I[r.k > 1 ? (r.k - 1) / 2 : 0]++;
        if (r.k < N / 2) seen_zero++;
        if (r.n_neg > 0) seen_neg++;
        if (r.n_two > 0) seen_two++;
        sum_s[r.phi] += real'(r.smin) / real'(1 << (N - 1));
        cnt_s[r.phi] += 1.0;
        exact  = sext(longint'(ia), N) * sext(longint'(ib), N);
        err    = real'(sext(longint'(p), N) * 256 - exact) / 256.0;
        sum_e  += err;
        sum_e2 += err * err;
        if ((err < 0 ? -err : err) > max_e) max_e = err < 0 ? -err : err;
      end
    end

    // every mechanism must have happened
    checks++;
    if (seen_lambda == 0) begin failures++; $display("lambda carry never exercised"); end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen_omega[i] == 0) begin failures++; $display("omega case %0d never exercised", i); end
    end
    for (int i = 0; i <= (N / 2 - 1) / 2; i++) begin   // I can reach floor((N/2-1)/2)
      checks++;
      if (seen_I[i] == 0) begin failures++; $display("compensation I=%0d never exercised", i); end
    end
    checks += 3;
    if (seen_zero == 0 || seen_neg == 0 || seen_two == 0) begin
      failures++;
      $display("a digit kind was never exercised");
    end
    $display("coverage: lambda=%0d omega(s0,lambda)=%0d/%0d/%0d/%0d I=0:%0d I=1:%0d",
             seen_lambda, seen_omega[0], seen_omega[1], seen_omega[2], seen_omega[3],
             seen_I[0], seen_I[1]);
    $display("coverage: zero digits=%0d negative digits=%0d 2A digits=%0d",
             seen_zero, seen_neg, seen_two);

    // dropped-value averages against the published table
    for (int i = 0; i < 16; i++) begin
      real avg;
      avg = sum_s[i] / cnt_s[i];
      checks++;
      if (avg - table4[i] > 0.001 || table4[i] - avg > 0.001) begin
        failures++;
        $display("S(phi)/2^(N-1) phi=%0d: %f, table %f", i, avg, table4[i]);
      end
    end

    // the error of a fixed-width result must stay within a couple of LSBs
    checks++;
    if (max_e > 2.0) begin failures++; $display("max error %f LSB too large", max_e); end
    $display("error vs exact product, in output LSBs: mean=%f mean-square=%f max=%f",
             sum_e / 65536.0, sum_e2 / 65536.0, max_e);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
