// ed_ref_pkg: reference models for the testbenches, written independently of
// the systolic array: plain row-by-row dynamic programming for the
// Levenshtein distance and the Smith-Waterman local-alignment score
// (+2 match, -1 mismatch, -1 linear gap, floor 0).
package ed_ref_pkg;

  typedef byte unsigned str_t [];

  function automatic int lev(input str_t s, input str_t t);
    int prev [], cur [];
    prev = new[t.size() + 1];
    cur  = new[t.size() + 1];
    foreach (prev[j]) prev[j] = j;
    for (int i = 1; i <= s.size(); i++) begin
      cur[0] = i;
      for (int j = 1; j <= t.size(); j++) begin
        int best;
        best = prev[j-1] + ((s[i-1] == t[j-1]) ? 0 : 1);
        if (prev[j] + 1 < best) best = prev[j] + 1;
        if (cur[j-1] + 1 < best) best = cur[j-1] + 1;
        cur[j] = best;
      end
      prev = cur;
    end
    return prev[t.size()];
  endfunction

  function automatic int sw(input str_t s, input str_t t);
    int prev [], cur [], top;
    prev = new[t.size() + 1];
    cur  = new[t.size() + 1];
    foreach (prev[j]) prev[j] = 0;
    top = 0;
    for (int i = 1; i <= s.size(); i++) begin
      cur[0] = 0;
      for (int j = 1; j <= t.size(); j++) begin
        int h;
        h = prev[j-1] + ((s[i-1] == t[j-1]) ? 2 : -1);
        if (prev[j] - 1 > h) h = prev[j] - 1;
        if (cur[j-1] - 1 > h) h = cur[j-1] - 1;
        if (h < 0) h = 0;
        cur[j] = h;
        if (h > top) top = h;
      end
      prev = cur;
    end
    return top;
  endfunction

  // random string over a small alphabet so that matches are frequent
  function automatic str_t rand_str(input int maxlen, input int alpha);
    str_t s;
    s = new[$urandom_range(maxlen, 0)];
    foreach (s[k]) s[k] = 8'(8'h61 + $urandom_range(alpha - 1, 0));
    return s;
  endfunction

endpackage
