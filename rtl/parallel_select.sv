// parallel_select: first-generation (fully parallel) select algorithm.
//
// From N_IN GenericTOBs presented at once, outputs the first K TOBs (in input order)
// that pass the selector, as ReducedTOBs, and raises overflow_o when more than K pass.
// Each passing TOB's slot is the number of passing TOBs before it (a prefix count).
// Selecting all TOBs that pass a configurable threshold follows the published
// description; keeping the first K in input order is this design's choice, and gives the
// same list as the sequential select followed by tob_list_buffer.
//
// Timing: two register stages (selector results, then the list), like parallel_sort.
module parallel_select
  import topo_pkg::*;
#(
  parameter int unsigned N_IN = 144,
  parameter int unsigned K    = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  generic_tob_t tobs_i [N_IN],
  input  sel_param_t   par_i,
  output reduced_tob_t list_o [K],
  output logic         overflow_o
);
  localparam int unsigned PW = $clog2(N_IN + 1);

  logic [N_IN-1:0] pass;
  reduced_tob_t    red_q [N_IN];
  logic [PW-1:0]   pos   [N_IN];
  logic [PW-1:0]   total;

  for (genvar i = 0; i < N_IN; i++) begin : g_sel
    tob_selector u_sel (.tob(tobs_i[i]), .par(par_i), .pass(pass[i]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_IN; i++) red_q[i] <= EMPTY_TOB;
    end else begin
      for (int i = 0; i < N_IN; i++) red_q[i] <= pass[i] ? reduce_tob(tobs_i[i]) : EMPTY_TOB;
    end
  end

  // Prefix count of passing TOBs.
  always_comb begin
    total = '0;
    for (int i = 0; i < N_IN; i++) begin
      pos[i] = total;
      if (red_q[i].valid) total = total + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) list_o[k] <= EMPTY_TOB;
      overflow_o <= 1'b0;
    end else begin
      for (int k = 0; k < K; k++) begin
        reduced_tob_t slot;
        slot = EMPTY_TOB;
        for (int i = 0; i < N_IN; i++)
          if (red_q[i].valid && (pos[i] == PW'(k))) slot = red_q[i];
        list_o[k] <= slot;
      end
      overflow_o <= (total > PW'(K));
    end
  end
endmodule
