// l1topo_top_tb: end-to-end test of the whole design at its default sizes.
//
// Each event gets random electron TOBs (up to 144) and jet TOBs (up to 192, distinct ETs
// so the leading-jet list is unambiguous) and random cut sets. The same event is
// streamed through the sequential form (with random gaps in both streams) and presented
// at once to the parallel form. Both are compared with an independent reference:
// selected electron list (first 10 passing), leading 6 passing jets, trigger bit = OR of
// the pair cuts over all combinations, overflow = more than 10 electrons selected,
// electron, jet and tau multiplicities (saturating), missing-ET threshold bits. Also checked: decision latencies
// (61 clocks sequential, 31 semi-sequential), the sorted jets piped out lowest first,
// and the parallel form's latencies (decision 3, multiplicity 2, thresholds 1 clock).
// Every mechanism must occur at least once: selection rejects, list overflow, accept and
// reject, one-list and two-list generic decisions, multiplicity saturation, sort
// pipe-out, missing-ET bits both set and clear.
module l1topo_top_tb;
  import topo_pkg::*;
  import tb_ref_pkg::*;
  localparam int N_E = 10, N_J = 6, P1_N_E = 144, P1_N_J = 192, P1_N_TAU = 144, CNT_W = 3, NTHR = 4, MET_W = 16;
  localparam int N_EVENTS = 200;

  logic clk = 0, clk_bc = 0, rst_n = 0;
  sel_param_t e_sel_par_i, j_sel_par_i, mult_par_i, jmult_par_i, tmult_par_i;
  dec_param_t dec_par_i, gen_par_i;
  logic gen_two_lists_i;
  logic ev_start_i, ready_o;
  generic_tob_t e_tob_i, j_tob_i;
  logic e_valid_i, e_last_i, j_valid_i, j_last_i;
  logic ev_done_o;
  logic [CNT_W-1:0] mult_o, j_mult_o;
  reduced_tob_t sort_out_tob_o;
  logic sort_out_valid_o;
  logic seq_accept_o, seq_overflow_o, semi_accept_o, semi_overflow_o, gen_accept_o, gen_overflow_o;
  logic [15:0] seq_cycles_o, semi_cycles_o;
  generic_tob_t p1_e_tobs_i [P1_N_E];
  generic_tob_t p1_j_tobs_i [P1_N_J];
  generic_tob_t p1_tau_tobs_i [P1_N_TAU];
  logic [MET_W-1:0] p1_met_i;
  logic [MET_W-1:0] p1_met_thr_i [NTHR];
  logic p1_accept_o, p1_overflow_o;
  logic [CNT_W-1:0] p1_mult_o, p1_j_mult_o, p1_tau_mult_o;
  logic [NTHR-1:0] p1_met_bits_o;

  l1topo_top dut (.*);

  always #2 clk = ~clk;          // sub-tick clock
  always #16 clk_bc = ~clk_bc;   // bunch-crossing clock, 8 sub-ticks

  int checks = 0, failures = 0;
  int m_reject = 0, m_ovf = 0, m_noovf = 0, m_acc = 0, m_rej = 0, m_one = 0, m_two = 0,
      m_sat = 0, m_pipe = 0, m_met_set = 0, m_met_clr = 0, m_gen_acc = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  generic_tob_t ev_e [$];
  generic_tob_t ev_j [$];
  reduced_tob_t piped [$];

  // collect the sort chain's pipe-out
  always @(posedge clk) if (sort_out_valid_o) piped.push_back(sort_out_tob_o);

  task automatic stream_e();
    foreach (ev_e[i]) begin
      while ($urandom_range(0, 3) == 0) @(posedge clk);
      #1; e_tob_i = ev_e[i]; e_valid_i = 1; e_last_i = (i == ev_e.size() - 1);
      @(posedge clk); #1; e_valid_i = 0; e_last_i = 0;
    end
  endtask

  task automatic stream_j();
    foreach (ev_j[i]) begin
      while ($urandom_range(0, 3) == 0) @(posedge clk);
      #1; j_tob_i = ev_j[i]; j_valid_i = 1; j_last_i = (i == ev_j.size() - 1);
      @(posedge clk); #1; j_valid_i = 0; j_last_i = 0;
    end
  endtask

  initial begin
    e_sel_par_i = '0; j_sel_par_i = '0; mult_par_i = '0; jmult_par_i = '0; tmult_par_i = '0; dec_par_i = '0; gen_par_i = '0;
    gen_two_lists_i = 1; ev_start_i = 0;
    e_tob_i = '0; j_tob_i = '0; e_valid_i = 0; e_last_i = 0; j_valid_i = 0; j_last_i = 0;
    for (int i = 0; i < P1_N_E; i++) p1_e_tobs_i[i] = '0;
    for (int i = 0; i < P1_N_J; i++) p1_j_tobs_i[i] = '0;
    for (int i = 0; i < P1_N_TAU; i++) p1_tau_tobs_i[i] = '0;
    p1_met_i = '0;
    for (int k = 0; k < NTHR; k++) p1_met_thr_i[k] = '0;
    repeat (4) @(posedge clk_bc);
    rst_n <= 1;
    repeat (2) @(posedge clk_bc);

    for (int ev = 0; ev < N_EVENTS; ev++) begin
      reduced_tob_t exp_e [N_E];
      reduced_tob_t exp_j [N_J];
      bit used [P1_N_J];
      int ne, nj, n_esel, n_mult, n_jmult, n_tmult, perm [P1_N_J];
      generic_tob_t taus [P1_N_TAU];
      bit exp_acc, exp_gen, exp_ovf, two;
      logic [NTHR-1:0] exp_met;

      // ---------------- event and configuration
      e_sel_par_i = rand_sel();
      j_sel_par_i = rand_sel();
      mult_par_i  = rand_sel();
      mult_par_i.et_min = 13'($urandom_range(0, 1500));
      jmult_par_i = rand_sel();
      jmult_par_i.et_min = 13'($urandom_range(0, 1400));
      tmult_par_i = rand_sel();
      tmult_par_i.et_min = 13'($urandom_range(0, 1500));
      for (int i = 0; i < P1_N_TAU; i++) taus[i] = rand_tob(1500);
      dec_par_i   = rand_dec();
      gen_par_i   = rand_dec();
      two = (ev % 2 == 0);
      gen_two_lists_i = two;
      ne = (ev % 5 == 1) ? $urandom_range(0, 12) : $urandom_range(0, P1_N_E);
      nj = $urandom_range(0, P1_N_J);
      for (int i = 0; i < P1_N_J; i++) perm[i] = i;
      perm.shuffle();
      ev_e.delete(); ev_j.delete(); piped.delete();
      for (int i = 0; i < ne; i++) ev_e.push_back(rand_tob(1500));
      for (int i = 0; i < nj; i++) begin
        generic_tob_t t;
        t = rand_tob(1500);
        t.et = 13'(1 + 7 * perm[i]);
        ev_j.push_back(t);
      end

      // ---------------- reference
      n_esel = 0; n_mult = 0;
      for (int k = 0; k < N_E; k++) exp_e[k] = '0;
      foreach (ev_e[i]) begin
        if (ref_sel(ev_e[i], e_sel_par_i)) begin
          if (n_esel < N_E) exp_e[n_esel] = ref_reduce(ev_e[i]);
          n_esel++;
        end
        if (ref_sel(ev_e[i], mult_par_i)) n_mult++;
      end
      if (n_esel < ne) m_reject++;
      exp_ovf = (n_esel > N_E);
      for (int i = 0; i < P1_N_J; i++) used[i] = 0;
      for (int k = 0; k < N_J; k++) begin
        int best;
        best = -1;
        foreach (ev_j[i])
          if (!used[i] && ref_sel(ev_j[i], j_sel_par_i) && (best < 0 || ev_j[i].et > ev_j[best].et)) best = i;
        if (best >= 0) begin exp_j[k] = ref_reduce(ev_j[best]); used[best] = 1; end
        else exp_j[k] = '0;
      end
      exp_acc = 0; exp_gen = 0;
      for (int a = 0; a < N_J; a++) begin
        for (int b = 0; b < N_E; b++) begin
          if (ref_pair(exp_j[a], exp_e[b], dec_par_i)) exp_acc = 1;
          if (two && ref_pair(exp_j[a], exp_e[b], gen_par_i)) exp_gen = 1;
        end
        for (int b = a + 1; b < N_J; b++)
          if (!two && ref_pair(exp_j[a], exp_j[b], gen_par_i)) exp_gen = 1;
      end
      if (n_mult > 7) begin n_mult = 7; m_sat++; end
      n_jmult = 0; n_tmult = 0;
      foreach (ev_j[i]) if (ref_sel(ev_j[i], jmult_par_i)) n_jmult++;
      for (int i = 0; i < P1_N_TAU; i++) if (ref_sel(taus[i], tmult_par_i)) n_tmult++;
      if (n_jmult > 7) n_jmult = 7;
      if (n_tmult > 7) n_tmult = 7;

      // ---------------- parallel form
      @(posedge clk_bc); #1;
      for (int i = 0; i < P1_N_E; i++) p1_e_tobs_i[i] = (i < ne) ? ev_e[i] : '0;
      for (int i = 0; i < P1_N_J; i++) p1_j_tobs_i[i] = (i < nj) ? ev_j[i] : '0;
      for (int i = 0; i < P1_N_TAU; i++) p1_tau_tobs_i[i] = taus[i];
      p1_met_i = 16'($urandom_range(0, 4000));
      for (int k = 0; k < NTHR; k++) begin
        p1_met_thr_i[k] = 16'(1000 * k + $urandom_range(0, 500));
        exp_met[k] = (p1_met_i >= p1_met_thr_i[k]);
      end
      @(posedge clk_bc); #1;      // edge 1: inputs taken
      check(p1_met_bits_o == exp_met, $sformatf("ev %0d p1 met bits %b exp %b", ev, p1_met_bits_o, exp_met));
      if (|exp_met) m_met_set++;
      if (!(&exp_met)) m_met_clr++;
      for (int i = 0; i < P1_N_E; i++) p1_e_tobs_i[i] = rand_tob(1500);   // later inputs must not matter
      for (int i = 0; i < P1_N_J; i++) p1_j_tobs_i[i] = rand_tob(1500);
      for (int i = 0; i < P1_N_TAU; i++) p1_tau_tobs_i[i] = rand_tob(1500);
      @(posedge clk_bc); #1;      // edge 2
      check(int'(p1_mult_o) == n_mult, $sformatf("ev %0d p1 mult %0d exp %0d", ev, p1_mult_o, n_mult));
      check(int'(p1_j_mult_o) == n_jmult, $sformatf("ev %0d p1 jet mult %0d exp %0d", ev, p1_j_mult_o, n_jmult));
      check(int'(p1_tau_mult_o) == n_tmult, $sformatf("ev %0d p1 tau mult %0d exp %0d", ev, p1_tau_mult_o, n_tmult));
      @(posedge clk_bc); #1;      // edge 3
      check(p1_accept_o == exp_acc, $sformatf("ev %0d p1 accept %0b exp %0b", ev, p1_accept_o, exp_acc));
      check(p1_overflow_o == exp_ovf, $sformatf("ev %0d p1 overflow %0b exp %0b", ev, p1_overflow_o, exp_ovf));

      // ---------------- sequential form
      @(posedge clk); #1;
      ev_start_i = 1;
      @(posedge clk); #1;
      ev_start_i = 0;
      check(ready_o == 1, "ready after start");
      if (ne == 0) ev_e.push_back('0);   // an all-empty event still needs a last beat
      if (nj == 0) ev_j.push_back('0);
      fork
        stream_e();
        stream_j();
      join
      begin
        int w;
        w = 0;
        while (!ev_done_o && w < 5000) begin @(posedge clk); #1; w++; end
        check(ev_done_o == 1, $sformatf("ev %0d event done", ev));
      end
      check(seq_accept_o == exp_acc,  $sformatf("ev %0d seq accept %0b exp %0b", ev, seq_accept_o, exp_acc));
      check(semi_accept_o == exp_acc, $sformatf("ev %0d semi accept %0b exp %0b", ev, semi_accept_o, exp_acc));
      check(gen_accept_o == exp_gen,  $sformatf("ev %0d gen accept %0b exp %0b (two=%0b)", ev, gen_accept_o, exp_gen, two));
      check(seq_overflow_o == exp_ovf && semi_overflow_o == exp_ovf, $sformatf("ev %0d overflow", ev));
      check(gen_overflow_o == (two && exp_ovf), $sformatf("ev %0d gen overflow", ev));
      check(int'(mult_o) == n_mult, $sformatf("ev %0d mult %0d exp %0d", ev, mult_o, n_mult));
      check(int'(j_mult_o) == n_jmult, $sformatf("ev %0d jet mult %0d exp %0d", ev, j_mult_o, n_jmult));
      check(seq_cycles_o == 16'(N_J * N_E + 1), $sformatf("ev %0d seq latency %0d", ev, seq_cycles_o));
      check(semi_cycles_o == 16'(N_J * N_E / 2 + 1), $sformatf("ev %0d semi latency %0d", ev, semi_cycles_o));
      check(piped.size() == N_J, $sformatf("ev %0d piped %0d TOBs", ev, piped.size()));
      for (int k = 0; k < N_J && k < piped.size(); k++)
        check(piped[k] == exp_j[N_J-1-k], $sformatf("ev %0d piped jet %0d et %0d exp %0d", ev, k, piped[k].et, exp_j[N_J-1-k].et));
      if (piped.size() == N_J) m_pipe++;
      if (exp_ovf) m_ovf++; else m_noovf++;
      if (exp_acc) m_acc++; else m_rej++;
      if (exp_gen) m_gen_acc++;
      if (two) m_two++; else m_one++;
    end

    $display("mechanisms: select-reject %0d overflow %0d no-overflow %0d accept %0d reject %0d generic-accept %0d one-list %0d two-list %0d mult-saturated %0d pipe-out %0d met-set %0d met-clear %0d",
             m_reject, m_ovf, m_noovf, m_acc, m_rej, m_gen_acc, m_one, m_two, m_sat, m_pipe, m_met_set, m_met_clr);
    check(m_reject > 0, "select reject never happened");
    check(m_ovf > 0, "list overflow never happened");
    check(m_noovf > 0, "no event without overflow");
    check(m_acc > 0, "no accepted event");
    check(m_rej > 0, "no rejected event");
    check(m_gen_acc > 0, "generic decision never accepted");
    check(m_one > 0 && m_two > 0, "generic one/two-list modes not both used");
    check(m_sat > 0, "multiplicity never saturated");
    check(m_pipe > 0, "sort pipe-out never happened");
    check(m_met_set > 0 && m_met_clr > 0, "missing-ET bits not both set and clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
