// parallel_sort: first-generation (fully parallel) sort algorithm.
//
// From N_IN GenericTOBs presented at once, outputs the K leading TOBs by ET among those
// that pass the selector, in descending ET order, as ReducedTOBs (unused slots hold
// EmptyTOBs). It works by rank counting: every TOB counts how many other TOBs beat it
// (higher {pass, ET}, or equal and a lower input index) and the TOB of rank k goes to
// output slot k. The function (leading TOBs passing a threshold, sorted by ET) follows
// the published description; the rank-counting insides are this design's choice.
//
// Timing: two register stages (selector results, then the list): list_o reflects the
// inputs of two clocks earlier, matching the two bunch crossings drawn for sort/select.
module parallel_sort
  import topo_pkg::*;
#(
  parameter int unsigned N_IN = 192,
  parameter int unsigned K    = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  generic_tob_t tobs_i [N_IN],
  input  sel_param_t   par_i,
  output reduced_tob_t list_o [K]
);
  localparam int unsigned RW = $clog2(N_IN + 1);

  logic [N_IN-1:0] pass;
  reduced_tob_t    red_q [N_IN];
  logic [RW-1:0]   rank  [N_IN];

  for (genvar i = 0; i < N_IN; i++) begin : g_sel
    tob_selector u_sel (.tob(tobs_i[i]), .par(par_i), .pass(pass[i]));
  end

  // Stage 1: keep only passing TOBs (others become EmptyTOBs and rank last).
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_IN; i++) red_q[i] <= EMPTY_TOB;
    end else begin
      for (int i = 0; i < N_IN; i++) red_q[i] <= pass[i] ? reduce_tob(tobs_i[i]) : EMPTY_TOB;
    end
  end

  // Rank of each TOB = number of TOBs that beat it.
  for (genvar i = 0; i < N_IN; i++) begin : g_rank
    always_comb begin
      rank[i] = '0;
      for (int j = 0; j < N_IN; j++) begin
        if (j < i) begin
          if (sort_key(red_q[j]) >= sort_key(red_q[i])) rank[i] = rank[i] + 1'b1;
        end else if (j > i) begin
          if (sort_key(red_q[j]) > sort_key(red_q[i]))  rank[i] = rank[i] + 1'b1;
        end
      end
    end
  end

  // Stage 2: place the TOB of rank k into slot k.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) list_o[k] <= EMPTY_TOB;
    end else begin
      for (int k = 0; k < K; k++) begin
        reduced_tob_t slot;
        slot = EMPTY_TOB;
        for (int i = 0; i < N_IN; i++)
          if (red_q[i].valid && (rank[i] == RW'(k))) slot = red_q[i];
        list_o[k] <= slot;
      end
    end
  end
endmodule
