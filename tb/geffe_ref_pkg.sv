// geffe_ref_pkg: testbench reference model of the generators.
//
// Works from the polynomial exponent list as printed (e.g. {7,6,4,1,0} for
// x^7+x^6+x^4+x+1) rather than from the RTL's tap masks, and from printed
// state strings ("0000101" = S_0 .. S_6, leftmost character is S_0).
package geffe_ref_pkg;

  typedef int      exps_t[$];
  typedef logic [63:0] st_t;

  function automatic bit has_term(exps_t p, int j);
    foreach (p[k]) if (p[k] == j) return 1'b1;
    return 1'b0;
  endfunction

  // One step of a type-2 LFSR whose feedback is cut after cell emb-1. With
  // emb = 0 (or sel = 0) it is the plain LFSR of polynomial p.
  function automatic st_t step(st_t s, exps_t p, int emb, bit sel);
    int  d = p[0];
    bit  f_last = s[d-1];
    bit  f_emb  = (emb > 0) ? s[emb-1] : 1'b0;
    st_t n = '0;
    for (int j = 0; j < d; j++) begin
      bit fb = (sel && j < emb) ? f_emb : f_last;
      if (j == 0)             n[j] = fb;
      else if (has_term(p, j)) n[j] = s[j-1] ^ fb;
      else                    n[j] = s[j-1];
    end
    return n;
  endfunction

  function automatic st_t seed(int d);
    return st_t'(1) << (d - 1);
  endfunction

  function automatic st_t from_str(string s);
    st_t v = '0;
    for (int j = 0; j < s.len(); j++) v[j] = (s[j] == "1");
    return v;
  endfunction

  function automatic string to_str(st_t v, int w);
    string s = "";
    for (int j = 0; j < w; j++) s = {s, v[j] ? "1" : "0"};
    return s;
  endfunction

endpackage
