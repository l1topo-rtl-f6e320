// parallel_multiplicity: first-generation (fully parallel) multiplicity algorithm.
//
// Counts, in one go, how many of N_IN GenericTOBs pass the selector cuts (ET threshold,
// eta window and the flag bits used as isolation cuts) and outputs the count saturated
// to CNT_W bits. Decoding/cuts followed by object counting follows the published
// structure; representing the cuts by the common selector and the 3-bit saturating
// count are this design's choices.
//
// Timing: two register stages (pass bits, then the count).
module parallel_multiplicity
  import topo_pkg::*;
#(
  parameter int unsigned N_IN  = 144,
  parameter int unsigned CNT_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  generic_tob_t     tobs_i [N_IN],
  input  sel_param_t       par_i,
  output logic [CNT_W-1:0] count_o
);
  localparam int unsigned SW = $clog2(N_IN + 1);

  logic [N_IN-1:0] pass, pass_q;
  logic [SW-1:0]   sum;

  for (genvar i = 0; i < N_IN; i++) begin : g_sel
    tob_selector u_sel (.tob(tobs_i[i]), .par(par_i), .pass(pass[i]));
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < N_IN; i++) sum = sum + SW'(pass_q[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pass_q  <= '0;
      count_o <= '0;
    end else begin
      pass_q  <= pass;
      count_o <= (sum > SW'({CNT_W{1'b1}})) ? {CNT_W{1'b1}} : CNT_W'(sum);
    end
  end
endmodule
