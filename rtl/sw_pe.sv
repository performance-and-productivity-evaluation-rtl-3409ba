// sw_pe: one Smith-Waterman processing element (one cell of the matrix).
//
// Computes, for query residue q (row) and database residue d (column), the affine
// gap (Gotoh) recurrences
//   E = max(H_left - (OPEN+EXT), E_left - EXT)     gap along the database
//   F = max(H_up   - (OPEN+EXT), F_up   - EXT)     gap along the query
//   H = max(0, H_diag + s(q,d), E, F)
// with s = +MATCH for equal residues and -MISMATCH otherwise (SW_PAD never
// matches). All values are unsigned with subtraction saturating at zero.
// Purely combinational; sw_tile_array places the registers. The document names
// the PEs but not their scoring, so the scoring model is this design's choice.
module sw_pe
  import sw_pkg::*;
#(
  parameter int unsigned MATCH    = 5,
  parameter int unsigned MISMATCH = 4,
  parameter int unsigned GAP_OPEN = 10,
  parameter int unsigned GAP_EXT  = 1
) (
  input  res_t   q,
  input  res_t   d,
  input  score_t h_diag,
  input  score_t h_up,
  input  score_t f_up,
  input  score_t h_left,
  input  score_t e_left,
  output score_t h,
  output score_t e,
  output score_t f
);
  function automatic score_t sat_sub(score_t a, int unsigned b);
    return (a > score_t'(b)) ? a - score_t'(b) : '0;
  endfunction

  function automatic score_t max2(score_t a, score_t b);
    return (a > b) ? a : b;
  endfunction

  score_t diag;
  always_comb begin
    e = max2(sat_sub(h_left, GAP_OPEN + GAP_EXT), sat_sub(e_left, GAP_EXT));
    f = max2(sat_sub(h_up,   GAP_OPEN + GAP_EXT), sat_sub(f_up,   GAP_EXT));
    if (q == d && q != SW_PAD) diag = h_diag + score_t'(MATCH);
    else                        diag = sat_sub(h_diag, MISMATCH);
    h = max2(diag, max2(e, f));
  end
endmodule
