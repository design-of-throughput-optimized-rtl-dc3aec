// nussinov_ref_pkg: software reference of the Nussinov score for the
// testbenches. It runs the textbook O(L^3) dynamic programme with every
// split point, not the two-ended split the array uses, so it checks the
// array's decomposition as well as its arithmetic.
//   S(i,i) = S(i,i+1) = 0
//   S(i,j) = max( S(i+1,j-1) + delta(x_i, x_{j-1}),
//                 max over i<m<j of S(i,m) + S(m,j) )
// seq[0] holds x_1; the result is S(1, L+1) for L = seq.size().
package nussinov_ref_pkg;
  import nussinov_pkg::*;

  function automatic int ref_delta(base_t a, base_t b);
    int ia, ib;
    ia = int'(a);
    ib = int'(b);
    // A=0 C=1 G=2 U=3; pairs AU, GC, GU in either order
    if ((ia == 0 && ib == 3) || (ia == 3 && ib == 0)) return 1;
    if ((ia == 1 && ib == 2) || (ia == 2 && ib == 1)) return 1;
    if ((ia == 2 && ib == 3) || (ia == 3 && ib == 2)) return 1;
    return 0;
  endfunction

  function automatic int ref_score(base_t seq[$]);
    int n, best, s[][];
    n = seq.size() + 1;
    s = new[n + 2];
    foreach (s[r]) begin
      s[r] = new[n + 2];
      foreach (s[r][c]) s[r][c] = 0;
    end
    for (int d = 2; d <= n - 1; d++) begin
      for (int i = 1; i + d <= n; i++) begin
        int j;
        j = i + d;
        best = s[i+1][j-1] + ref_delta(seq[i-1], seq[j-2]);
        for (int m = i + 1; m < j; m++)
          if (s[i][m] + s[m][j] > best) best = s[i][m] + s[m][j];
        s[i][j] = best;
      end
    end
    return s[1][n];
  endfunction

  // Random sequence of len bases; about one base in 16 is the unknown code.
  function automatic void rand_seq(int len, ref base_t seq[$]);
    seq.delete();
    for (int n = 0; n < len; n++) begin
      if ($urandom_range(15) == 0) seq.push_back(base_t'(BASE_N));
      else seq.push_back(base_t'($urandom_range(3)));
    end
  endfunction

endpackage
