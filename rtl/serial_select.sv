// serial_select: sequential select algorithm.
//
// One GenericTOB per clock enters with tob_valid_i. The selector decides whether it
// passes; if so the TOB is reduced to a ReducedTOB and forwarded, otherwise an EmptyTOB
// (all zero, valid = 0) is forwarded in its place, so the output stream keeps one slot
// per input TOB. This selector-plus-multiplexer structure follows the published
// description.
//
// Timing: one register after the multiplexer; tob_o, tob_valid_o and pass_o appear one
// clock after the input. Reset (active low, synchronous) clears the output register.
module serial_select
  import topo_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  generic_tob_t tob_i,
  input  logic         tob_valid_i,
  input  sel_param_t   par_i,
  output reduced_tob_t tob_o,
  output logic         tob_valid_o,
  output logic         pass_o
);
  logic pass;

  tob_selector u_sel (.tob(tob_i), .par(par_i), .pass(pass));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tob_o       <= EMPTY_TOB;
      tob_valid_o <= 1'b0;
      pass_o      <= 1'b0;
    end else begin
      tob_valid_o <= tob_valid_i;
      pass_o      <= tob_valid_i && pass;
      tob_o       <= (tob_valid_i && pass) ? reduce_tob(tob_i) : EMPTY_TOB;
    end
  end
endmodule
