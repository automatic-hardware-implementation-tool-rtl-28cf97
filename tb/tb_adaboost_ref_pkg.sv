// tb_adaboost_ref_pkg -- reference model of the default Adaboost classifier
// for the testbenches. It evaluates y = sgn(sum alpha_t h_t(x)) with plain
// integer comparisons on the default model of adaboost_pkg, independently of
// the comparator chains, lookup tables and adder tree of the RTL.
package tb_adaboost_ref_pkg;
  import adaboost_pkg::*;

  localparam int MAX_D = 64;
  typedef logic [MAX_D-1:0][7:0] fvec_t;

  // 1 if x lies in the box of default classifier t (open bounds pass)
  function automatic bit ref_in_box(fvec_t x, int t, int d_cnt);
    bit r = 1'b1;
    for (int d = 0; d < d_cnt; d++) begin
      int lo = int'(dflt_theta_l(t, d, d_cnt));
      int hi = int'(dflt_theta_u(t, d, d_cnt));
      if (lo != 0   && !(int'(x[d]) > lo)) r = 1'b0;
      if (hi != 255 && !(int'(x[d]) < hi)) r = 1'b0;
    end
    return r;
  endfunction

  function automatic int ref_score(fvec_t x, int t_cnt, int d_cnt, int a_w);
    int s = 0;
    for (int t = 0; t < t_cnt; t++) begin
      bit h = ref_in_box(x, t, d_cnt) ? dflt_y(t) : !dflt_y(t);
      int a = int'(dflt_alpha(t, a_w));
      s += h ? a : -a;
    end
    return s;
  endfunction

  // A vector in the middle of the box of default classifier t; features
  // the box leaves open are random.
  function automatic fvec_t inside_vector(int t, int d_cnt);
    fvec_t x = '0;
    for (int d = 0; d < d_cnt; d++) begin
      int lo = int'(dflt_theta_l(t, d, d_cnt));
      int hi = int'(dflt_theta_u(t, d, d_cnt));
      if (lo == 0 && hi == 255) x[d] = 8'($urandom);
      else                      x[d] = 8'((lo + hi) / 2);
    end
    return x;
  endfunction

  function automatic fvec_t random_vector(int d_cnt);
    fvec_t x = '0;
    for (int d = 0; d < d_cnt; d++) x[d] = 8'($urandom);
    return x;
  endfunction

endpackage
