// oem_sorter: Batcher odd-even merge sorting network on single bits.
//
// Sorts W bits so that all ones gather at the low indices: beta[0] is the
// largest bit, and beta[i] = 1 exactly when more than i inputs are 1.  On
// bits a compare-exchange element is one OR gate (the larger value, kept at
// the lower index) and one AND gate (the smaller value).  The network is the
// standard odd-even merge sort, built merge level by merge level; W must be a
// power of two (4 inputs for an 8-bit multiplier, 8 for a 16-bit one).
// Combinational; every output depends on every input through at most
// log2(W)*(log2(W)+1)/2 gate levels.
module oem_sorter #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] beta
);

  always_comb begin
    logic [W-1:0] v;
    logic         hi_bit, lo_bit;
    v = x;
    for (int p = 1; p < W; p = p * 2)
      for (int k = p; k >= 1; k = k / 2)
        for (int j = k % p; j + k < W; j = j + 2 * k)
          for (int i = 0; i < k; i++)
            if (i + j + k < W && (i + j) / (2 * p) == (i + j + k) / (2 * p)) begin
              hi_bit       = v[i+j] | v[i+j+k];
              lo_bit       = v[i+j] & v[i+j+k];
              v[i+j]       = hi_bit;
              v[i+j+k]     = lo_bit;
            end
    beta = v;
  end

  if ((W & (W - 1)) != 0 || W < 2) begin : g_bad_width
    $error("oem_sorter: W must be a power of two, at least 2");
  end

endmodule
