// sc_generator: compensation generator of the fixed-width Booth multiplier.
//
// The discarded columns carry, on average, a value that grows with the number
// k of non-zero Booth digits.  The compensation added at column N-1 is
// I = floor((k-1)/2) (0 when k <= 1), spread over m = floor((N/2-1)/2) output
// bits alpha_1 .. alpha_m whose sum is I.  The ~z flags are sorted with an
// odd-even merge network (ones to the low indices); then alpha_i = beta[2i],
// i.e. alpha_i = 1 when at least 2i+1 digits are non-zero.  Only the sorter
// outputs beta[2], beta[4], ... are used, so synthesis keeps just the cone of
// gates that feeds them (seven gates for N = 8: two OR/AND pairs, two ANDs
// and an OR).  When N/2 is not a power of two the sorter is widened to the
// next power of two with constant-zero inputs, which sort to the top and do
// not change the count.  Only the outputs beta[2], beta[4], ... are read; the
// other sorter outputs are left unconnected on purpose.  Combinational.
module sc_generator
  import fwb_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N/2-1:0]                    z,      // zero flag of every Booth digit
  output logic [(sc_outputs(N) > 0 ? sc_outputs(N) : 1)-1:0] alpha  // alpha_(i+1) at index i
);

  localparam int unsigned M  = sc_outputs(N);
  localparam int unsigned WS = 2 ** $clog2(N / 2 < 2 ? 2 : N / 2);  // sorter width

  logic [WS-1:0] nz, beta;

  always_comb begin
    nz          = '0;
    nz[N/2-1:0] = ~z;   // ~z_j: one for every non-zero digit
  end

  oem_sorter #(.W(WS)) u_sort (
    .x    (nz),
    .beta (beta)
  );

  if (M == 0) begin : g_none
    assign alpha = 1'b0;   // N = 4: no compensation bit exists
  end else begin : g_alpha
    for (genvar i = 1; i <= M; i++) begin : g_bit
      assign alpha[i-1] = beta[2*i];
    end
  end

endmodule
