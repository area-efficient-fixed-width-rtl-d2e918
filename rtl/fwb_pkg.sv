// fwb_pkg: types and elaboration-time functions shared by the fixed-width
// modified Booth multiplier.
//
// booth_enc_t holds the five radix-4 Booth encoder outputs of Table 1 style
// encoding: n (negate), t (select 2A), o (select A), z (digit is zero) and
// c (two's complement correction bit, 1 for a negative non-zero digit).
//
// The functions describe the retained partial product matrix of an N x N
// multiplier.  Only columns N-1 .. 2N-1 are built; column index r in the
// functions is the bit position minus (N-1), so r = 0 is the column N-1 that
// receives the compensation terms and r = N is the product MSB.  Each column
// is a list of "items" in a fixed order:
//   item j, 0 <= j < N/2 : partial product bit p(j, pos-2j) of row j
//   item N/2             : omega bit of row 0 (positions N .. N+2)
//   item N/2+1           : sign-extension bit of row j >= 1
//                          (~s_j at N+2j, constant 1 at N+2j+1)
//   item N/2+2           : lambda-bar (column N-1 only)
//   item N/2+3+i         : SC-generator output alpha_(i+1) (column N-1 only)
// slot() packs the items that are present into consecutive bit positions, and
// col_height() gives the number of bits in a column.  The Dadda helpers
// replay the Dadda reduction on these heights so that add_tree can place its
// full and half adders at elaboration time.  Everything here is evaluated
// only on constants.
package fwb_pkg;

  typedef struct packed {
    logic n;   // negate (b_2j+1)
    logic t;   // select 2A
    logic o;   // select A
    logic z;   // digit is zero
    logic c;   // correction bit, added at the row LSB position
  } booth_enc_t;

  // Number of SC-generator outputs: m = floor((N/2 - 1) / 2).
  function automatic int sc_outputs(input int n);
    return (n / 2 - 1) / 2;
  endfunction

  function automatic int n_items(input int n);
    return n / 2 + 3 + sc_outputs(n);
  endfunction

  // Is item 'item' present in retained column r of an N x N multiplier?
  function automatic bit present(input int n, input int r, input int item);
    int pos;
    int j;
    pos = n - 1 + r;
    if (item < n / 2) begin
      j = item;
      return (pos - 2 * j >= 0) && (pos - 2 * j <= n - 1);
    end
    if (item == n / 2)
      return (pos >= n) && (pos <= n + 2);
    if (item == n / 2 + 1) begin
      for (j = 1; j < n / 2; j++)
        if (pos == n + 2 * j || pos == n + 2 * j + 1) return 1'b1;
      return 1'b0;
    end
    return r == 0;
  endfunction

  // Bit index that item 'item' occupies within column r.
  function automatic int slot(input int n, input int r, input int item);
    int cnt;
    cnt = 0;
    for (int i = 0; i < item; i++)
      if (present(n, r, i)) cnt++;
    return cnt;
  endfunction

  function automatic int col_height(input int n, input int r);
    return slot(n, r, n_items(n));
  endfunction

  function automatic int max_height(input int n);
    int mx;
    mx = 0;
    for (int r = 0; r <= n; r++)
      if (col_height(n, r) > mx) mx = col_height(n, r);
    return mx;
  endfunction

  // Dadda target heights d1 = 2, d(k+1) = floor(1.5 * d(k)).
  function automatic int dadda_d(input int k);
    int d;
    d = 2;
    for (int i = 1; i < k; i++) d = (d * 3) / 2;
    return d;
  endfunction

  // Number of Dadda reduction stages needed for the retained matrix.
  function automatic int dadda_stages(input int n);
    int s;
    s = 0;
    while (dadda_d(s + 1) < max_height(n)) s++;
    return s;
  endfunction

  localparam int DADDA_HEIGHT = 0;  // column height entering the stage
  localparam int DADDA_FA     = 1;  // full adders in the column
  localparam int DADDA_HA     = 2;  // half adders in the column
  localparam int DADDA_CIN    = 3;  // carries arriving from column r-1

  // Replays the Dadda reduction up to stage t and reports one quantity of
  // column r at that stage.  Columns beyond the product MSB are dropped.
  function automatic int dadda_info(input int n, input int t, input int r,
                                    input int what);
    int h [0:64];
    int nh [0:64];
    int w, ns, d, cin, cur, fa, ha;
    w  = n + 1;
    ns = dadda_stages(n);
    for (int c = 0; c < w; c++) h[c] = col_height(n, c);
    for (int s = 0; s <= t; s++) begin
      d   = dadda_d(ns - s);
      cin = 0;
      for (int c = 0; c < w; c++) begin
        cur = h[c] + cin;
        fa  = (cur > d) ? (cur - d) / 2 : 0;
        ha  = (cur > d) ? (cur - d) % 2 : 0;
        if (s == t && c == r) begin
          case (what)
            DADDA_HEIGHT: return h[c];
            DADDA_FA:     return fa;
            DADDA_HA:     return ha;
            DADDA_CIN:    return cin;
            default:      return 0;
          endcase
        end
        nh[c] = h[c] - 2 * fa - ha + cin;
        cin   = fa + ha;
      end
      for (int c = 0; c < w; c++) h[c] = nh[c];
    end
    return 0;
  endfunction

endpackage
