// serial_multiplicity: sequential multiplicity algorithm.
//
// A selector followed by a counter: every clock with tob_valid_i, a TOB that passes the
// selector increments the count. clr_i (the per-event reset) clears the counter. The
// counter saturates at its all-ones value so an event with many objects reads as
// "at least 2^CNT_W - 1". Selector plus counter follows the published description; the
// width default (3) and saturation are this design's choices.
//
// Timing: count_o is a register and includes a TOB from the clock after it is offered.
module serial_multiplicity
  import topo_pkg::*;
#(
  parameter int unsigned CNT_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr_i,
  input  generic_tob_t     tob_i,
  input  logic             tob_valid_i,
  input  sel_param_t       par_i,
  output logic [CNT_W-1:0] count_o
);
  logic pass;

  tob_selector u_sel (.tob(tob_i), .par(par_i), .pass(pass));

  always_ff @(posedge clk) begin
    if (!rst_n || clr_i)
      count_o <= '0;
    else if (tob_valid_i && pass && (count_o != '1))
      count_o <= count_o + 1'b1;
  end
endmodule
