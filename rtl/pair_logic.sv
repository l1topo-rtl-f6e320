// pair_logic: the logic block that judges one combination of two TOBs.
//
// It computes, for TOB a (list 1) and TOB b (list 2):
//   deta  = |eta_a - eta_b|                      (0.1 steps, table index saturating at 99)
//   dphi  = |phi_a - phi_b| folded to 0..32      (2*pi/64 steps)
//   dR^2  = deta^2 + dphi^2                      (both steps treated as equal)
//   M^2   = 2*ET_a*ET_b*(cosh(deta) - cos(dphi)) (ET in 100 MeV counts, M^2 in counts^2)
// and passes the combination when both TOBs are valid, each passes its ET threshold and
// flag requirement, and every enabled window cut (deta, dphi, dR^2, M^2 in [min, max])
// holds: the AND of all thresholds. The calculators, thresholds and AND follow the
// published structure of the example and generic decision algorithms; the fixed-point
// formats and the enable bits are this design's choices.
//
// Purely combinational; callers register pass_o.
module pair_logic
  import topo_pkg::*;
(
  input  reduced_tob_t a_i,
  input  reduced_tob_t b_i,
  input  dec_param_t   par_i,
  output logic         pass_o
);
  logic signed [ETA_W:0]   eta_diff;
  logic [ETA_W-1:0]        deta_abs;
  logic [DETA_W-1:0]       deta;
  logic [PHI_W-1:0]        phi_diff;
  logic [DPHI_W-1:0]       dphi;
  logic [DR2_W-1:0]        dr2;
  logic [TRIG_W-1:0]       cosh_v;
  logic signed [TRIG_W:0]  cos_v;
  logic [TRIG_W:0]         trig_diff;
  logic [2*ET_W-1:0]       et_prod;
  logic [INVM2_W-1:0]      invm2;
  logic                    et_ok, flag_ok, deta_ok, dphi_ok, dr2_ok, invm_ok;

  always_comb begin
    eta_diff = (ETA_W+1)'(signed'(a_i.eta)) - (ETA_W+1)'(signed'(b_i.eta));
    deta_abs = eta_diff[ETA_W] ? ETA_W'(-eta_diff) : ETA_W'(eta_diff);
    deta     = (deta_abs > ETA_W'(DETA_MAX)) ? DETA_W'(DETA_MAX) : DETA_W'(deta_abs);

    phi_diff = a_i.phi - b_i.phi;
    dphi     = (phi_diff > PHI_W'(NPHI/2)) ? DPHI_W'(PHI_W'(NPHI) - phi_diff) : DPHI_W'(phi_diff);
    dr2      = DR2_W'(deta * deta) + DR2_W'(dphi * dphi);

    cosh_v    = COSH_TABLE[deta*TRIG_W +: TRIG_W];
    cos_v     = signed'({COS_TABLE[dphi*TRIG_W + TRIG_W-1], COS_TABLE[dphi*TRIG_W +: TRIG_W]});
    trig_diff = (TRIG_W+1)'(signed'({1'b0, cosh_v}) - cos_v);
    et_prod   = a_i.et * b_i.et;
    invm2     = INVM2_W'((INVM2_W'(et_prod) * INVM2_W'(trig_diff)) >> (TRIG_FRAC - 1));

    et_ok   = a_i.valid && b_i.valid && (a_i.et >= par_i.et1_min) && (b_i.et >= par_i.et2_min);
    flag_ok = ((a_i.flags & par_i.flag1_mask) == par_i.flag1_req)
           && ((b_i.flags & par_i.flag2_mask) == par_i.flag2_req);
    deta_ok = !par_i.deta_en || ((deta  >= par_i.deta_min)  && (deta  <= par_i.deta_max));
    dphi_ok = !par_i.dphi_en || ((dphi  >= par_i.dphi_min)  && (dphi  <= par_i.dphi_max));
    dr2_ok  = !par_i.dr2_en  || ((dr2   >= par_i.dr2_min)   && (dr2   <= par_i.dr2_max));
    invm_ok = !par_i.invm_en || ((invm2 >= par_i.invm2_min) && (invm2 <= par_i.invm2_max));

    pass_o  = et_ok && flag_ok && deta_ok && dphi_ok && dr2_ok && invm_ok;
  end
endmodule
