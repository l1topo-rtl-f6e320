// topo_pkg: types, parameter records and lookup tables shared by the topological
// trigger algorithms.
//
// Trigger objects (TOBs) travel in two formats. The GenericTOB is the 64-bit common
// input format that every selector reads. The ReducedTOB keeps only what the decision
// and sort algorithms downstream need: ET, eta, phi and two flag bits. An EmptyTOB is
// the all-zero ReducedTOB (valid = 0); it stands in for a TOB that failed selection.
//
// Units (this design's choice): ET in 100 MeV counts (13 bits), eta in steps of 0.1
// (signed, |eta| <= 4.9), phi in 64 steps of 2*pi/64.
//
// The invariant mass of a pair is M^2 = 2*ET1*ET2*(cosh(deta) - cos(dphi)). cosh and cos
// come from two constant tables (100 and 33 entries, 2^10 fixed point) that constant
// functions build at elaboration from a power series, so no table file is needed.
package topo_pkg;

  localparam int ET_W    = 13;
  localparam int ETA_W   = 8;
  localparam int PHI_W   = 6;
  localparam int FLAG_W  = 8;
  localparam int RFLAG_W = 2;
  localparam int GENERIC_TOB_W = 64;

  localparam int NPHI      = 1 << PHI_W;   // 64 phi bins around the circle
  localparam int DPHI_W    = PHI_W;        // folded dphi 0..32
  localparam int DETA_W    = 8;            // |deta| 0..98 (0.1 steps)
  localparam int DETA_MAX  = 99;           // table index saturates here
  localparam int DR2_W     = 15;           // deta^2 + dphi^2 <= 99^2 + 32^2
  localparam int TRIG_FRAC = 10;           // fixed-point fraction bits of the tables
  localparam int TRIG_W    = 25;           // cosh(9.9) * 2^10 < 2^24
  localparam int INVM2_W   = 48;

  typedef struct packed {
    logic                     valid;
    logic [3:0]               kind;
    logic [FLAG_W-1:0]        flags;
    logic [23:0]              reserved;
    logic [ET_W-1:0]          et;
    logic signed [ETA_W-1:0]  eta;
    logic [PHI_W-1:0]         phi;
  } generic_tob_t;

  typedef struct packed {
    logic                     valid;
    logic [RFLAG_W-1:0]       flags;
    logic [ET_W-1:0]          et;
    logic signed [ETA_W-1:0]  eta;
    logic [PHI_W-1:0]         phi;
  } reduced_tob_t;

  localparam reduced_tob_t EMPTY_TOB = '0;

  // Parameter record of a selector.
  typedef struct packed {
    logic [ET_W-1:0]          et_min;
    logic signed [ETA_W-1:0]  eta_min;
    logic signed [ETA_W-1:0]  eta_max;
    logic [FLAG_W-1:0]        flag_mask;
    logic [FLAG_W-1:0]        flag_req;
  } sel_param_t;

  // Parameter record of a decision algorithm (one combination of two TOBs).
  typedef struct packed {
    logic [ET_W-1:0]          et1_min;
    logic [ET_W-1:0]          et2_min;
    logic                     invm_en;
    logic [INVM2_W-1:0]       invm2_min;
    logic [INVM2_W-1:0]       invm2_max;
    logic                     dphi_en;
    logic [DPHI_W-1:0]        dphi_min;
    logic [DPHI_W-1:0]        dphi_max;
    logic                     deta_en;
    logic [DETA_W-1:0]        deta_min;
    logic [DETA_W-1:0]        deta_max;
    logic                     dr2_en;
    logic [DR2_W-1:0]         dr2_min;
    logic [DR2_W-1:0]         dr2_max;
    logic [RFLAG_W-1:0]       flag1_mask;
    logic [RFLAG_W-1:0]       flag1_req;
    logic [RFLAG_W-1:0]       flag2_mask;
    logic [RFLAG_W-1:0]       flag2_req;
  } dec_param_t;

  // GenericTOB -> ReducedTOB: keep the bits the downstream algorithms use.
  function automatic reduced_tob_t reduce_tob(generic_tob_t g);
    reduced_tob_t r;
    r.valid = g.valid;
    r.flags = g.flags[RFLAG_W-1:0];
    r.et    = g.et;
    r.eta   = g.eta;
    r.phi   = g.phi;
    return r;
  endfunction

  // Sort key: a valid TOB always ranks above an EmptyTOB; any TOB with valid = 0 ranks
  // as empty whatever its other bits hold.
  function automatic logic [ET_W:0] sort_key(reduced_tob_t t);
    return t.valid ? {1'b1, t.et} : '0;
  endfunction

  // Power series of cosh (sgn = +1) or cos (sgn = -1) of x, x given in 2^20 fixed point.
  function automatic longint series_2p20(longint x, int sgn);
    longint x2, term, sum;
    x2   = (x * x) >>> 20;
    term = 64'sd1 <<< 20;
    sum  = term;
    for (longint n = 0; n < 60; n += 2) begin
      term = (term * x2) >>> 20;
      term = term / ((n + 1) * (n + 2));
      if (sgn < 0 && ((n / 2) % 2 == 0)) sum = sum - term;
      else                                sum = sum + term;
    end
    return sum;
  endfunction

  // cosh(0.1*d) in 2^10 fixed point, d = 0..DETA_MAX, packed entry d at bits [d*TRIG_W +: TRIG_W].
  function automatic logic [DETA_MAX*TRIG_W+TRIG_W-1:0] build_cosh_table();
    logic [DETA_MAX*TRIG_W+TRIG_W-1:0] t;
    longint v;
    t = '0;
    for (int d = 0; d <= DETA_MAX; d++) begin
      v = series_2p20((longint'(d) <<< 20) / 10, 1);
      t[d*TRIG_W +: TRIG_W] = TRIG_W'((v + (64'sd1 <<< 9)) >>> 10);
    end
    return t;
  endfunction

  // cos(2*pi*k/64) in 2^10 fixed point (signed), k = 0..32.
  function automatic logic [33*TRIG_W-1:0] build_cos_table();
    logic [33*TRIG_W-1:0] t;
    longint v;
    t = '0;
    for (int k = 0; k <= NPHI/2; k++) begin
      // 2*pi * 2^20 = 6588397.3
      v = series_2p20((longint'(k) * 64'sd6588397) / longint'(NPHI), -1);
      t[k*TRIG_W +: TRIG_W] = TRIG_W'((v + (64'sd1 <<< 9)) >>> 10);
    end
    return t;
  endfunction

  localparam logic [DETA_MAX*TRIG_W+TRIG_W-1:0] COSH_TABLE = build_cosh_table();
  localparam logic [33*TRIG_W-1:0]              COS_TABLE  = build_cos_table();

endpackage
