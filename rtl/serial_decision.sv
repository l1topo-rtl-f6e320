// serial_decision: sequential / semi-sequential generic decision algorithm.
//
// Instead of one logic block per TOB combination (the parallel form), NPAR copies of
// pair_logic are fed the combinations one after another and the per-combination results
// are ORed over time ("sequential OR"): the trigger fires if any combination passes.
// NPAR selects the working point: NPAR = 1 is the fully sequential form (N1*N2 clocks),
// NPAR = 2 doubles the logic and halves the number of clocks, and so on (N1 must be a
// multiple of NPAR). Lane k handles list-1 entries k*N1/NPAR .. (k+1)*N1/NPAR-1; for
// each list-2 entry (outer loop) the lanes step through their list-1 entries (inner
// loop), the order printed for the two-lane example. The algorithm can run on two lists
// (two_lists_i = 1: every list1 x list2 pair) or on one list (two_lists_i = 0: every
// unordered pair i < j of list1 once, stepping through N1 x N1/NPAR clocks). The
// parallel-versus-sequential idea, the working points and the one/two-list option follow
// the published description; the schedule details and the one-list pairing are this
// design's choices.
//
// Interface and timing: on start_i (while idle) the lists and their overflow flags are
// latched (the list memories the lanes read from) and the result is cleared. The
// combinations are then issued one group per clock; results are registered once and
// ORed. done_o rises at the (NCOMB/NPAR + 1)-th clock edge after the edge that sampled start_i,
// NCOMB = N1*N2 (two lists) or N1*N1 (one list); accept_o and overflow_o are valid from
// done_o until the next start_i. busy_o is high from start to done.
module serial_decision
  import topo_pkg::*;
#(
  parameter int unsigned N1   = 6,
  parameter int unsigned N2   = 10,
  parameter int unsigned NPAR = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic         two_lists_i,
  input  reduced_tob_t list1_i [N1],
  input  reduced_tob_t list2_i [N2],
  input  logic         ovf1_i,
  input  logic         ovf2_i,
  input  dec_param_t   par_i,
  output logic         busy_o,
  output logic         done_o,
  output logic         accept_o,
  output logic         overflow_o
);
  localparam int unsigned LANE_N = N1 / NPAR;
  localparam int unsigned NOUT   = (N1 > N2) ? N1 : N2;
  localparam int unsigned IW     = (LANE_N > 1) ? $clog2(LANE_N) : 1;
  localparam int unsigned OW     = (NOUT > 1) ? $clog2(NOUT) : 1;

  reduced_tob_t l1 [N1];
  reduced_tob_t l2 [N2];
  logic         two_q;
  logic         issuing;
  logic [IW-1:0] i_in;
  logic [OW-1:0] i_out;
  logic [NPAR-1:0] lane_pass, lane_q;
  logic         res_v, res_last;
  logic         issue_last;
  reduced_tob_t lane_a [NPAR];
  reduced_tob_t lane_b [NPAR];
  logic [NPAR-1:0] lane_use;

  // Last combination group of the schedule.
  always_comb begin
    issue_last = (i_in == IW'(LANE_N - 1))
              && (two_q ? (i_out == OW'(N2 - 1)) : (i_out == OW'(N1 - 1)));
  end

  // Operand multiplexers: the lanes read the latched lists by index.
  for (genvar k = 0; k < NPAR; k++) begin : g_lane
    always_comb begin
      int unsigned idx1;
      idx1      = k * LANE_N + int'(i_in);
      lane_a[k] = l1[idx1];
      if (two_q) begin
        lane_b[k]   = (int'(i_out) < N2) ? l2[int'(i_out)] : EMPTY_TOB;
        lane_use[k] = 1'b1;
      end else begin
        lane_b[k]   = (int'(i_out) < N1) ? l1[int'(i_out)] : EMPTY_TOB;
        lane_use[k] = int'(i_out) > idx1;
      end
    end
    pair_logic u_pair (.a_i(lane_a[k]), .b_i(lane_b[k]), .par_i(par_i), .pass_o(lane_pass[k]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N1; i++) l1[i] <= EMPTY_TOB;
      for (int i = 0; i < N2; i++) l2[i] <= EMPTY_TOB;
      two_q      <= 1'b1;
      issuing    <= 1'b0;
      i_in       <= '0;
      i_out      <= '0;
      lane_q     <= '0;
      res_v      <= 1'b0;
      res_last   <= 1'b0;
      busy_o     <= 1'b0;
      done_o     <= 1'b0;
      accept_o   <= 1'b0;
      overflow_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (start_i && !busy_o) begin
        l1         <= list1_i;
        l2         <= list2_i;
        two_q      <= two_lists_i;
        overflow_o <= ovf1_i || (two_lists_i && ovf2_i);
        accept_o   <= 1'b0;
        issuing    <= 1'b1;
        busy_o     <= 1'b1;
        i_in       <= '0;
        i_out      <= '0;
      end else if (issuing) begin
        if (i_in == IW'(LANE_N - 1)) begin
          i_in  <= '0;
          i_out <= i_out + 1'b1;
        end else begin
          i_in <= i_in + 1'b1;
        end
        if (issue_last) issuing <= 1'b0;
      end
      // register stage after the logic blocks
      res_v    <= issuing;
      res_last <= issuing && issue_last;
      lane_q   <= lane_pass & lane_use & {NPAR{issuing}};
      // sequential OR
      if (res_v) begin
        if (|lane_q) accept_o <= 1'b1;
        if (res_last) begin
          done_o <= 1'b1;
          busy_o <= 1'b0;
        end
      end
    end
  end

  initial begin
    assert (N1 % NPAR == 0) else $error("serial_decision: N1 must be a multiple of NPAR");
  end
endmodule
