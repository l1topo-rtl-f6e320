// parallel_decision: fully parallel (single-clock) decision algorithm.
//
// One pair_logic block per TOB combination evaluates all combinations at once and an OR
// tree fires the trigger bit if any passes; for N1 = 6 and N2 = 10 that is 60 blocks.
// With two_lists_i = 0 the unordered pairs i < j of list 1 are used instead. This
// all-combinations-in-one-clock structure follows the published description of the
// first-generation algorithms, which had one bunch-crossing clock for a decision.
//
// Timing: accept_o and overflow_o are registered: the decision on the lists present at
// one clock edge appears after that edge (one clock of latency).
module parallel_decision
  import topo_pkg::*;
#(
  parameter int unsigned N1 = 6,
  parameter int unsigned N2 = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         two_lists_i,
  input  reduced_tob_t list1_i [N1],
  input  reduced_tob_t list2_i [N2],
  input  logic         ovf1_i,
  input  logic         ovf2_i,
  input  dec_param_t   par_i,
  output logic         accept_o,
  output logic         overflow_o
);
  logic [N1*N2-1:0] two_pass;
  logic [N1*N1-1:0] one_pass;

  for (genvar i = 0; i < N1; i++) begin : g_i
    for (genvar j = 0; j < N2; j++) begin : g_two
      pair_logic u_pair (.a_i(list1_i[i]), .b_i(list2_i[j]), .par_i(par_i), .pass_o(two_pass[i*N2+j]));
    end
    for (genvar j = 0; j < N1; j++) begin : g_one
      if (j > i) begin : g_pair
        pair_logic u_pair (.a_i(list1_i[i]), .b_i(list1_i[j]), .par_i(par_i), .pass_o(one_pass[i*N1+j]));
      end else begin : g_none
        assign one_pass[i*N1+j] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      accept_o   <= 1'b0;
      overflow_o <= 1'b0;
    end else begin
      accept_o   <= two_lists_i ? (|two_pass) : (|one_pass);
      overflow_o <= ovf1_i || (two_lists_i && ovf2_i);
    end
  end
endmodule
