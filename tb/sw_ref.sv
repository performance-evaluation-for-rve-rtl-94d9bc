// sw_ref: integer reference of Smith-Waterman local alignment with a linear
// gap penalty, shared by the testbenches.
//   H(i,0) = H(0,j) = 0
//   H(i,j) = max(0, H(i-1,j-1) + s(a_i, b_j), H(i-1,j) - d, H(i,j-1) - d)
// with s = match when the characters are equal, mismatch otherwise. Row i
// runs over the database sequence, column j over the query.
package sw_ref;

  typedef int mat_t [][];

  function automatic mat_t sw_matrix(input int db [], input int q [],
                                     input int d, input int match, input int mismatch);
    mat_t h;
    int s, best;
    h = new[db.size() + 1];
    foreach (h[i]) begin
      h[i] = new[q.size() + 1];
      foreach (h[i][j]) h[i][j] = 0;
    end
    for (int i = 1; i <= db.size(); i++)
      for (int j = 1; j <= q.size(); j++) begin
        s = (db[i-1] == q[j-1]) ? match : mismatch;
        best = 0;
        if (h[i-1][j-1] + s > best) best = h[i-1][j-1] + s;
        if (h[i-1][j] - d > best) best = h[i-1][j] - d;
        if (h[i][j-1] - d > best) best = h[i][j-1] - d;
        h[i][j] = best;
      end
    return h;
  endfunction

  function automatic int mat_max(input mat_t h);
    int m = 0;
    foreach (h[i, j]) if (h[i][j] > m) m = h[i][j];
    return m;
  endfunction

endpackage
