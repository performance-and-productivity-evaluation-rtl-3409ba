// sw_ref: software Smith-Waterman (affine gaps, match/mismatch scoring) used by
// the testbenches as the reference for alignment scores.
package sw_ref;
  function automatic int mx2(int a, int b); return a > b ? a : b; endfunction

  // best local alignment score of q against d
  function automatic int sw_score(int q[$], int d[$], int match_s, int mismatch_s,
                                  int gap_open, int gap_ext);
    int hprev[$], fprev[$], hcur[$], fcur[$];
    int best, e;
    best = 0;
    hprev = {}; fprev = {};
    for (int j = 0; j <= d.size(); j++) begin hprev.push_back(0); fprev.push_back(0); end
    for (int i = 0; i < q.size(); i++) begin
      hcur = {}; fcur = {};
      hcur.push_back(0); fcur.push_back(0);
      e = 0;
      for (int j = 1; j <= d.size(); j++) begin
        int f, h, s;
        e = mx2(0, mx2(hcur[j-1] - gap_open - gap_ext, e - gap_ext));
        f = mx2(0, mx2(hprev[j] - gap_open - gap_ext, fprev[j] - gap_ext));
        s = (q[i] == d[j-1]) ? match_s : -mismatch_s;
        h = mx2(mx2(0, hprev[j-1] + s), mx2(e, f));
        hcur.push_back(h); fcur.push_back(f);
        best = mx2(best, h);
      end
      hprev = hcur; fprev = fcur;
    end
    return best;
  endfunction
endpackage
