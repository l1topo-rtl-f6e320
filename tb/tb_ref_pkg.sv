// tb_ref_pkg: reference models and stimulus helpers for the testbenches.
//
// The reference models restate the algorithms in plain behavioural code, independent of
// the RTL: selection cuts, TOB reduction, and the pair cuts with the invariant mass
// computed from the real-valued $cosh and $cos (rounded to the same 2^10 fixed point the
// hardware tables use). Random TOBs and parameter records come from $urandom.
package tb_ref_pkg;
  import topo_pkg::*;

  function automatic bit ref_sel(generic_tob_t t, sel_param_t p);
    return t.valid && (int'(t.et) >= int'(p.et_min)) && (int'(t.eta) >= int'(p.eta_min))
        && (int'(t.eta) <= int'(p.eta_max)) && ((t.flags & p.flag_mask) == p.flag_req);
  endfunction

  function automatic reduced_tob_t ref_reduce(generic_tob_t t);
    reduced_tob_t r;
    r = '0;
    r.valid = t.valid; r.flags = t.flags[1:0]; r.et = t.et; r.eta = t.eta; r.phi = t.phi;
    return r;
  endfunction

  function automatic int ref_deta(reduced_tob_t a, reduced_tob_t b);
    int d;
    d = int'(a.eta) - int'(b.eta);
    if (d < 0) d = -d;
    if (d > 99) d = 99;
    return d;
  endfunction

  function automatic int ref_dphi(reduced_tob_t a, reduced_tob_t b);
    int d;
    d = int'(a.phi) - int'(b.phi);
    if (d < 0) d = -d;
    if (d > 32) d = 64 - d;
    return d;
  endfunction

  function automatic longint ref_invm2(reduced_tob_t a, reduced_tob_t b);
    real    pi;
    longint ch, cs;
    pi = 3.14159265358979;
    ch = longint'($floor($cosh(0.1 * ref_deta(a, b)) * 1024.0 + 0.5));
    cs = longint'($floor($cos(2.0 * pi * ref_dphi(a, b) / 64.0) * 1024.0 + 0.5));
    return (longint'(a.et) * longint'(b.et) * (ch - cs)) >>> 9;
  endfunction

  function automatic bit ref_pair(reduced_tob_t a, reduced_tob_t b, dec_param_t p);
    int     de, dp, dr;
    longint m;
    de = ref_deta(a, b);
    dp = ref_dphi(a, b);
    dr = de * de + dp * dp;
    m  = ref_invm2(a, b);
    if (!(a.valid && b.valid)) return 0;
    if (int'(a.et) < int'(p.et1_min) || int'(b.et) < int'(p.et2_min)) return 0;
    if ((a.flags & p.flag1_mask) != p.flag1_req) return 0;
    if ((b.flags & p.flag2_mask) != p.flag2_req) return 0;
    if (p.deta_en && (de < int'(p.deta_min) || de > int'(p.deta_max))) return 0;
    if (p.dphi_en && (dp < int'(p.dphi_min) || dp > int'(p.dphi_max))) return 0;
    if (p.dr2_en  && (dr < int'(p.dr2_min)  || dr > int'(p.dr2_max)))  return 0;
    if (p.invm_en && (m < longint'(p.invm2_min) || m > longint'(p.invm2_max))) return 0;
    return 1;
  endfunction

  function automatic generic_tob_t rand_tob(int et_max);
    generic_tob_t t;
    t = '0;
    t.valid    = ($urandom_range(0, 15) != 0);
    t.kind     = 4'($urandom);
    t.flags    = 8'($urandom);
    t.reserved = 24'($urandom);
    t.et       = 13'($urandom_range(0, et_max));
    t.eta      = 8'(int'($urandom_range(0, 98)) - 49);
    t.phi      = 6'($urandom);
    return t;
  endfunction

  function automatic reduced_tob_t rand_rtob(int et_max);
    return ref_reduce(rand_tob(et_max));
  endfunction

  // A loose selection: ET threshold and central eta.
  function automatic sel_param_t rand_sel();
    sel_param_t p;
    p.et_min    = 13'($urandom_range(0, 300));
    p.eta_min   = 8'(-int'($urandom_range(10, 49)));
    p.eta_max   = 8'($urandom_range(10, 49));
    p.flag_mask = 8'($urandom_range(0, 3));
    p.flag_req  = p.flag_mask & 8'($urandom);
    return p;
  endfunction

  // Decision parameters of the kind used by the example (ET, invariant mass, dphi),
  // with the generic cuts switched on at random.
  function automatic dec_param_t rand_dec();
    dec_param_t p;
    p = '0;
    p.et1_min   = 13'($urandom_range(0, 200));
    p.et2_min   = 13'($urandom_range(0, 200));
    p.invm_en   = 1'b1;
    p.invm2_min = 48'($urandom_range(0, 200000));
    p.invm2_max = 48'(longint'($urandom_range(300000, 4000000)));
    p.dphi_en   = 1'b1;
    p.dphi_min  = 6'($urandom_range(0, 10));
    p.dphi_max  = 6'($urandom_range(12, 32));
    p.deta_en   = 1'($urandom);
    p.deta_min  = 8'($urandom_range(0, 5));
    p.deta_max  = 8'($urandom_range(20, 99));
    p.dr2_en    = 1'($urandom);
    p.dr2_min   = 15'($urandom_range(0, 50));
    p.dr2_max   = 15'($urandom_range(500, 9000));
    p.flag1_mask = 2'($urandom);
    p.flag1_req  = p.flag1_mask & 2'($urandom);
    p.flag2_mask = 2'($urandom);
    p.flag2_req  = p.flag2_mask & 2'($urandom);
    return p;
  endfunction
endpackage
