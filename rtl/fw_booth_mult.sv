// fw_booth_mult: N x N fixed-width modified Booth multiplier.
//
// Returns the N most significant bits of the product of two N-bit two's
// complement numbers without building the N-1 least significant columns of
// the partial product matrix.  The loss is compensated in three ways:
//   * the last row's LSB and its correction bit are pre-added; their carry
//     (lambda) and the rounding '1' of a post-truncated multiplier become the
//     bit ~lambda in column N-1 and a carry that error_comp_fun folds into the
//     sign-extension bits of row 0 (omega2..0);
//   * sc_generator adds floor((k-1)/2) at column N-1, k being the number of
//     non-zero Booth digits, as an estimate of the carries the dropped columns
//     would have produced;
//   * column N-1 itself (one bit of each row, ~lambda and the alphas) is kept
//     and only its carries reach the output.
// Sign extension uses the usual ~s / constant-1 scheme: row 0 carries
// {~s0, s0, s0} (as omega), row j >= 1 carries ~s_j and a constant 1 above it.
// The rows come from N/2 pp_row blocks and all retained bits are summed by a
// Dadda tree (add_tree).  The structure follows the published design for
// N = 8; other even N >= 4 are built the same way.
// Interface: a, b in, p out, all combinational; p approximates
// (a * b) >> N to within a few units of its LSB.
module fw_booth_mult
  import fwb_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p
);

  localparam int R    = N / 2;            // partial product rows
  localparam int M    = sc_outputs(N);    // compensation bits
  localparam int HMAX = max_height(N);

  logic [N-1:0]   pp [R];
  logic [R-1:0]   sgn;
  logic [R-1:0]   zf;
  booth_enc_t     enc [R];
  logic [N:0]     bx;                     // b with b(-1) = 0 below it
  logic           lambda_n;
  logic [2:0]     omega;
  logic [(M > 0 ? M : 1)-1:0] alpha;
  logic [HMAX-1:0] col [N+1];

  assign bx = {b, 1'b0};

  for (genvar j = 0; j < R; j++) begin : g_row
    pp_row #(.N(N), .J(j)) u_row (
      .a    (a),
      .trip (bx[2*j+2 -: 3]),
      .pp   (pp[j]),
      .s    (sgn[j]),
      .enc  (enc[j])
    );
    assign zf[j] = enc[j].z;
  end

  error_comp_fun u_ecf (
    .a0       (a[0]),
    .b_msb    (b[N-1]),
    .o_last   (enc[R-1].o),
    .z_last   (enc[R-1].z),
    .s0       (sgn[0]),
    .lambda_n (lambda_n),
    .omega    (omega)
  );

  sc_generator #(.N(N)) u_sc (
    .z     (zf),
    .alpha (alpha)
  );

  // Place every retained bit in its column (see fwb_pkg for the item order).
  for (genvar r = 0; r <= N; r++) begin : g_col
    localparam int POS = N - 1 + r;
    for (genvar it = 0; it < n_items(N); it++) begin : g_item
      if (present(N, r, it)) begin : g_on
        localparam int S = slot(N, r, it);
        if (it < R) begin : g_pp
          assign col[r][S] = pp[it][POS-2*it];
        end else if (it == R) begin : g_omega
          assign col[r][S] = omega[POS-N];
        end else if (it == R + 1) begin : g_sext
          // ~s_j at N+2j, constant 1 at N+2j+1
          if ((POS - N) % 2 == 0) begin : g_sbar
            assign col[r][S] = ~sgn[(POS-N)/2];
          end else begin : g_one
            assign col[r][S] = 1'b1;
          end
        end else if (it == R + 2) begin : g_lambda
          assign col[r][S] = lambda_n;
        end else begin : g_alpha
          assign col[r][S] = alpha[it-R-3];
        end
      end
    end
    for (genvar i = col_height(N, r); i < HMAX; i++) begin : g_zero
      assign col[r][i] = 1'b0;
    end
  end

  add_tree #(.N(N)) u_tree (
    .col (col),
    .p   (p)
  );

  if (N < 4 || N % 2 != 0) begin : g_bad_n
    $error("fw_booth_mult: N must be even and at least 4");
  end

endmodule
