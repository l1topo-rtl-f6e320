// tob_selector: the "64 bit selector" of the select and multiplicity algorithms.
//
// Looks at one GenericTOB and says with a single bit whether it passes the cuts in its
// parameter record: the TOB must be valid, have ET >= et_min, lie in the eta window
// [eta_min, eta_max], and carry the required flag bits ((flags & flag_mask) == flag_req,
// flags being e.g. isolation bits). The one-bit pass decision follows the published
// description; which cuts the record holds is this design's choice.
//
// Purely combinational: the user registers the result.
module tob_selector
  import topo_pkg::*;
(
  input  generic_tob_t tob,
  input  sel_param_t   par,
  output logic         pass
);
  always_comb begin
    pass = tob.valid
         && (tob.et >= par.et_min)
         && (tob.eta >= par.eta_min)
         && (tob.eta <= par.eta_max)
         && ((tob.flags & par.flag_mask) == par.flag_req);
  end
endmodule
