// l1topo_top: topological trigger algorithms in their two forms, side by side.
//
// Sequential form (clock clk, the fast "sub-tick" clock of a time-multiplexed event
// processor). One event arrives as two serial TOB streams, electrons (e_*) and jets
// (j_*), one GenericTOB per clock each, ended by *_last. The chain is:
//   electrons -> serial_select -> tob_list_buffer (first N_E selected, overflow flag)
//   electrons -> serial_multiplicity (count of TOBs passing mult_par_i)
//   jets      -> serial_multiplicity (count of TOBs passing jmult_par_i)
//   jets      -> serial_select -> serial_sort (N_J leading jets by ET)
//   {N_J sorted jets} x {N_E selected electrons} ->
//       serial_decision NPAR = 1 (fully sequential, N_J*N_E clocks)
//       serial_decision NPAR = 2 (semi-sequential, half the clocks, twice the logic)
//       serial_decision generic, one list (jets) or two lists by gen_two_lists_i
// A small controller sequences an event: ev_start_i clears the algorithms and opens the
// input (ready_o = 1); once both streams have delivered their last TOB it waits for the
// select register, the sort chain and the list buffer to drain (N_J + 2 clocks), starts
// the three decisions on the finished lists while the sort chain pipes its stored jets
// out on sort_out_tob_o (sort_out_valid_o, lowest ET first), and pulses ev_done_o once
// all three decisions are done. Results then stay valid until the next ev_start_i.
// The controller is this design's own; the algorithms follow the published sequential
// designs.
//
// Parallel form (clock clk_bc, one event per bunch crossing). All TOBs of an event are
// presented at once: parallel_select (first N_E of P1_N_E electrons), parallel_sort
// (N_J leading of P1_N_J jets), parallel_decision on all N_J x N_E pairs in one clock,
// parallel_multiplicity on the electrons, the P1_N_TAU taus and the jets, and
// energy_thresholds on the missing ET.
// Latencies from the inputs: decision 3 clocks, multiplicity 2, energy thresholds 1.
// Both forms use the same parameter records, so the same event gives the same trigger
// bit in both.
//
// Reset rst_n is active low and synchronous to each clock.
module l1topo_top
  import topo_pkg::*;
#(
  parameter int unsigned N_E     = 10,
  parameter int unsigned N_J     = 6,
  parameter int unsigned P1_N_E  = 144,
  parameter int unsigned P1_N_J  = 192,
  parameter int unsigned P1_N_TAU = 144,
  parameter int unsigned CNT_W   = 3,
  parameter int unsigned NTHR    = 4,
  parameter int unsigned MET_W   = 16
) (
  input  logic             clk,
  input  logic             clk_bc,
  input  logic             rst_n,
  // configuration (parameter records)
  input  sel_param_t       e_sel_par_i,
  input  sel_param_t       j_sel_par_i,
  input  sel_param_t       mult_par_i,
  input  sel_param_t       jmult_par_i,
  input  sel_param_t       tmult_par_i,
  input  dec_param_t       dec_par_i,
  input  dec_param_t       gen_par_i,
  input  logic             gen_two_lists_i,
  // sequential form: event streams
  input  logic             ev_start_i,
  output logic             ready_o,
  input  generic_tob_t     e_tob_i,
  input  logic             e_valid_i,
  input  logic             e_last_i,
  input  generic_tob_t     j_tob_i,
  input  logic             j_valid_i,
  input  logic             j_last_i,
  // sequential form: results
  output logic             ev_done_o,
  output logic [CNT_W-1:0] mult_o,
  output logic [CNT_W-1:0] j_mult_o,
  output reduced_tob_t     sort_out_tob_o,
  output logic             sort_out_valid_o,
  output logic             seq_accept_o,
  output logic             seq_overflow_o,
  output logic [15:0]      seq_cycles_o,
  output logic             semi_accept_o,
  output logic             semi_overflow_o,
  output logic [15:0]      semi_cycles_o,
  output logic             gen_accept_o,
  output logic             gen_overflow_o,
  // parallel form
  input  generic_tob_t     p1_e_tobs_i [P1_N_E],
  input  generic_tob_t     p1_j_tobs_i [P1_N_J],
  input  generic_tob_t     p1_tau_tobs_i [P1_N_TAU],
  input  logic [MET_W-1:0] p1_met_i,
  input  logic [MET_W-1:0] p1_met_thr_i [NTHR],
  output logic             p1_accept_o,
  output logic             p1_overflow_o,
  output logic [CNT_W-1:0] p1_mult_o,
  output logic [CNT_W-1:0] p1_j_mult_o,
  output logic [CNT_W-1:0] p1_tau_mult_o,
  output logic [NTHR-1:0]  p1_met_bits_o
);
  // ---------------------------------------------------------------- sequential form
  typedef enum logic [2:0] {S_IDLE, S_COLLECT, S_FLUSH, S_PIPE, S_WAIT} state_t;
  localparam int unsigned FLUSH_N = N_J + 2;

  state_t       state;
  logic [7:0]   cnt;
  logic         e_seen, j_seen;
  logic         clr, e_in, j_in, dec_start, mux_ctrl;
  logic         seq_done, semi_done, gen_done;
  logic         seq_fin, semi_fin, gen_fin;
  logic         seq_busy, semi_busy, gen_busy;

  reduced_tob_t e_sel_tob, j_sel_tob;
  logic         e_sel_v, j_sel_v;
  logic         e_sel_pass, j_sel_pass;
  reduced_tob_t e_list [N_E];
  logic [$clog2(N_E+1)-1:0] e_count;
  logic         e_ovf;
  reduced_tob_t j_sorted [N_J];

  assign clr       = (state == S_IDLE) && ev_start_i;
  assign ready_o   = (state == S_COLLECT);
  assign e_in      = ready_o && e_valid_i && !e_seen;
  assign j_in      = ready_o && j_valid_i && !j_seen;
  assign mux_ctrl  = (state == S_PIPE);
  assign dec_start = (state == S_PIPE) && (cnt == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      cnt              <= '0;
      e_seen           <= 1'b0;
      j_seen           <= 1'b0;
      seq_fin          <= 1'b0;
      semi_fin         <= 1'b0;
      gen_fin          <= 1'b0;
      ev_done_o        <= 1'b0;
      sort_out_valid_o <= 1'b0;
      seq_cycles_o     <= '0;
      semi_cycles_o    <= '0;
    end else begin
      ev_done_o        <= 1'b0;
      sort_out_valid_o <= mux_ctrl;
      if (seq_busy  && !seq_fin)  seq_cycles_o  <= seq_cycles_o + 1'b1;
      if (semi_busy && !semi_fin) semi_cycles_o <= semi_cycles_o + 1'b1;
      if (seq_done)  seq_fin  <= 1'b1;
      if (semi_done) semi_fin <= 1'b1;
      if (gen_done)  gen_fin  <= 1'b1;
      unique case (state)
        S_IDLE: if (ev_start_i) begin
          state         <= S_COLLECT;
          e_seen        <= 1'b0;
          j_seen        <= 1'b0;
          seq_fin       <= 1'b0;
          semi_fin      <= 1'b0;
          gen_fin       <= 1'b0;
          seq_cycles_o  <= '0;
          semi_cycles_o <= '0;
        end
        S_COLLECT: begin
          if (e_in && e_last_i) e_seen <= 1'b1;
          if (j_in && j_last_i) j_seen <= 1'b1;
          if ((e_seen || (e_in && e_last_i)) && (j_seen || (j_in && j_last_i))) begin
            state <= S_FLUSH;
            cnt   <= '0;
          end
        end
        S_FLUSH: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(FLUSH_N - 1)) begin
            state <= S_PIPE;
            cnt   <= '0;
          end
        end
        S_PIPE: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(N_J - 1)) state <= S_WAIT;
        end
        S_WAIT: if ((seq_fin || seq_done) && (semi_fin || semi_done) && (gen_fin || gen_done)) begin
          state     <= S_IDLE;
          ev_done_o <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  serial_select u_e_select (
    .clk, .rst_n, .tob_i(e_tob_i), .tob_valid_i(e_in), .par_i(e_sel_par_i),
    .tob_o(e_sel_tob), .tob_valid_o(e_sel_v), .pass_o(e_sel_pass));

  serial_multiplicity #(.CNT_W(CNT_W)) u_e_mult (
    .clk, .rst_n, .clr_i(clr), .tob_i(e_tob_i), .tob_valid_i(e_in), .par_i(mult_par_i),
    .count_o(mult_o));

  serial_multiplicity #(.CNT_W(CNT_W)) u_j_mult (
    .clk, .rst_n, .clr_i(clr), .tob_i(j_tob_i), .tob_valid_i(j_in), .par_i(jmult_par_i),
    .count_o(j_mult_o));

  tob_list_buffer #(.DEPTH(N_E)) u_e_list (
    .clk, .rst_n, .clr_i(clr), .tob_i(e_sel_tob), .tob_valid_i(e_sel_v),
    .list_o(e_list), .count_o(e_count), .overflow_o(e_ovf));

  serial_select u_j_select (
    .clk, .rst_n, .tob_i(j_tob_i), .tob_valid_i(j_in), .par_i(j_sel_par_i),
    .tob_o(j_sel_tob), .tob_valid_o(j_sel_v), .pass_o(j_sel_pass));

  serial_sort #(.NSTAGE(N_J)) u_j_sort (
    .clk, .rst_n, .clr_i(clr), .mux_ctrl_i(mux_ctrl), .tob_i(j_sel_v ? j_sel_tob : EMPTY_TOB),
    .tob_o(sort_out_tob_o), .sorted_o(j_sorted));

  serial_decision #(.N1(N_J), .N2(N_E), .NPAR(1)) u_dec_seq (
    .clk, .rst_n, .start_i(dec_start), .two_lists_i(1'b1), .list1_i(j_sorted), .list2_i(e_list),
    .ovf1_i(1'b0), .ovf2_i(e_ovf), .par_i(dec_par_i),
    .busy_o(seq_busy), .done_o(seq_done), .accept_o(seq_accept_o), .overflow_o(seq_overflow_o));

  serial_decision #(.N1(N_J), .N2(N_E), .NPAR(2)) u_dec_semi (
    .clk, .rst_n, .start_i(dec_start), .two_lists_i(1'b1), .list1_i(j_sorted), .list2_i(e_list),
    .ovf1_i(1'b0), .ovf2_i(e_ovf), .par_i(dec_par_i),
    .busy_o(semi_busy), .done_o(semi_done), .accept_o(semi_accept_o), .overflow_o(semi_overflow_o));

  serial_decision #(.N1(N_J), .N2(N_E), .NPAR(1)) u_dec_gen (
    .clk, .rst_n, .start_i(dec_start), .two_lists_i(gen_two_lists_i), .list1_i(j_sorted),
    .list2_i(e_list), .ovf1_i(1'b0), .ovf2_i(e_ovf), .par_i(gen_par_i),
    .busy_o(gen_busy), .done_o(gen_done), .accept_o(gen_accept_o), .overflow_o(gen_overflow_o));

  // ---------------------------------------------------------------- parallel form
  reduced_tob_t p1_e_list [N_E];
  reduced_tob_t p1_j_list [N_J];
  logic         p1_e_ovf;

  parallel_select #(.N_IN(P1_N_E), .K(N_E)) u_p1_select (
    .clk(clk_bc), .rst_n, .tobs_i(p1_e_tobs_i), .par_i(e_sel_par_i),
    .list_o(p1_e_list), .overflow_o(p1_e_ovf));

  parallel_sort #(.N_IN(P1_N_J), .K(N_J)) u_p1_sort (
    .clk(clk_bc), .rst_n, .tobs_i(p1_j_tobs_i), .par_i(j_sel_par_i), .list_o(p1_j_list));

  parallel_decision #(.N1(N_J), .N2(N_E)) u_p1_dec (
    .clk(clk_bc), .rst_n, .two_lists_i(1'b1), .list1_i(p1_j_list), .list2_i(p1_e_list),
    .ovf1_i(1'b0), .ovf2_i(p1_e_ovf), .par_i(dec_par_i),
    .accept_o(p1_accept_o), .overflow_o(p1_overflow_o));

  parallel_multiplicity #(.N_IN(P1_N_E), .CNT_W(CNT_W)) u_p1_mult (
    .clk(clk_bc), .rst_n, .tobs_i(p1_e_tobs_i), .par_i(mult_par_i), .count_o(p1_mult_o));

  parallel_multiplicity #(.N_IN(P1_N_J), .CNT_W(CNT_W)) u_p1_j_mult (
    .clk(clk_bc), .rst_n, .tobs_i(p1_j_tobs_i), .par_i(jmult_par_i), .count_o(p1_j_mult_o));

  parallel_multiplicity #(.N_IN(P1_N_TAU), .CNT_W(CNT_W)) u_p1_tau_mult (
    .clk(clk_bc), .rst_n, .tobs_i(p1_tau_tobs_i), .par_i(tmult_par_i), .count_o(p1_tau_mult_o));

  energy_thresholds #(.NTHR(NTHR), .MET_W(MET_W)) u_p1_met (
    .clk(clk_bc), .rst_n, .met_i(p1_met_i), .thr_i(p1_met_thr_i), .bits_o(p1_met_bits_o));

  // ---------------------------------------------------------------- checks
  // A decision is only started when it is idle.
  assert property (@(posedge clk) disable iff (!rst_n) dec_start |-> !seq_busy && !semi_busy && !gen_busy);
endmodule
