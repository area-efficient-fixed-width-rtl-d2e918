// add_tree: Dadda-tree adder for the retained columns of the fixed-width
// Booth multiplier.
//
// Input col[r] holds the bits of matrix column N-1+r, r = 0 .. N, packed
// from bit 0 upward; how many bits a column has is fixed by
// fwb_pkg::col_height() and higher bits are ignored.  The tree reduces the
// columns with full and half adders in Dadda fashion: stage heights are
// 2, 3, 4, 6, 9, ... and in each stage a column gets just enough full adders
// (and at most one half adder) to fall to the stage's target height, counting
// the carries that arrive from the column below.  The cell counts are worked
// out at elaboration by fwb_pkg::dadda_info().  Within a stage a column is
// laid out as [sums | bits passed through | carries in], from bit 0 up.  The
// last two rows go through a carry-propagate adder.  The sum bit of column
// N-1 is dropped and carries out of column 2N-1 are discarded, so p is bits
// 2N-1 .. N of the column sum.  Combinational.
module add_tree
  import fwb_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [max_height(N)-1:0] col [N+1],
  output logic [N-1:0]             p
);

  localparam int W    = N + 1;
  localparam int HMAX = max_height(N);
  localparam int NST  = dadda_stages(N);

  for (genvar t = 0; t < NST; t++) begin : g_st
    logic [HMAX-1:0] cur [W];   // columns entering the stage
    logic [HMAX-1:0] nx  [W];   // columns leaving the stage
    logic [HMAX-1:0] cy  [W];   // carries produced by each column

    if (t == 0) begin : g_in
      assign cur = col;
    end else begin : g_in
      assign cur = g_st[t-1].nx;
    end

    for (genvar r = 0; r < W; r++) begin : g_col
      localparam int H    = dadda_info(N, t, r, DADDA_HEIGHT);
      localparam int FA   = dadda_info(N, t, r, DADDA_FA);
      localparam int HA   = dadda_info(N, t, r, DADDA_HA);
      localparam int CIN  = dadda_info(N, t, r, DADDA_CIN);
      localparam int PASS = H - 3 * FA - 2 * HA;
      localparam int USED = FA + HA + PASS + CIN;

      if (PASS < 0 || USED > HMAX) begin : g_bad
        $error("add_tree: inconsistent Dadda schedule");
      end

      for (genvar i = 0; i < FA; i++) begin : g_fa
        full_adder u_fa (
          .x  (cur[r][3*i]),
          .y  (cur[r][3*i+1]),
          .ci (cur[r][3*i+2]),
          .s  (nx[r][i]),
          .co (cy[r][i])
        );
      end
      for (genvar i = 0; i < HA; i++) begin : g_ha
        half_adder u_ha (
          .x  (cur[r][3*FA+2*i]),
          .y  (cur[r][3*FA+2*i+1]),
          .s  (nx[r][FA+i]),
          .co (cy[r][FA+i])
        );
      end
      for (genvar i = 0; i < PASS; i++) begin : g_pass
        assign nx[r][FA+HA+i] = cur[r][3*FA+2*HA+i];
      end
      for (genvar i = 0; i < CIN; i++) begin : g_cin
        assign nx[r][FA+HA+PASS+i] = cy[r-1][i];
      end
      for (genvar i = USED; i < HMAX; i++) begin : g_nx0
        assign nx[r][i] = 1'b0;
      end
      for (genvar i = FA + HA; i < HMAX; i++) begin : g_cy0
        assign cy[r][i] = 1'b0;
      end
    end
  end

  // Final carry-propagate addition of the two remaining rows.  Column N-1
  // only contributes its carry.
  logic [W-1:0] row0, row1;

  for (genvar r = 0; r < W; r++) begin : g_rows
    assign row0[r] = g_st[NST-1].nx[r][0];
    assign row1[r] = g_st[NST-1].nx[r][1];
  end

  assign p = row0[W-1:1] + row1[W-1:1] + N'(row0[0] & row1[0]);

endmodule
