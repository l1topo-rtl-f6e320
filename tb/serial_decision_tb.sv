// serial_decision_tb: the sequential (NPAR = 1) and semi-sequential (NPAR = 2) decision
// algorithm on the same random lists, in two-list and one-list mode. Each result is
// compared with the reference OR over all combinations, and the latency from start to
// done is checked: N1*N2/NPAR + 1 clock edges (N1*N1/NPAR + 1 in one-list mode), so 61
// for the fully sequential 6 x 10 example and 31 with doubled logic.
module serial_decision_tb;
  import topo_pkg::*;
  import tb_ref_pkg::*;
  localparam int N1 = 6, N2 = 10;
  logic clk = 0, rst_n = 0, start_i = 0, two_lists_i = 1, ovf1_i = 0, ovf2_i = 0;
  reduced_tob_t list1_i [N1];
  reduced_tob_t list2_i [N2];
  dec_param_t   par_i;
  logic busy1, done1, acc1, ovf1;
  logic busy2, done2, acc2, ovf2;
  int checks = 0, failures = 0, n_acc = 0, n_rej = 0, n_one = 0, n_ovf = 0;

  serial_decision #(.N1(N1), .N2(N2), .NPAR(1)) dut1 (
    .clk, .rst_n, .start_i, .two_lists_i, .list1_i, .list2_i, .ovf1_i, .ovf2_i, .par_i,
    .busy_o(busy1), .done_o(done1), .accept_o(acc1), .overflow_o(ovf1));
  serial_decision #(.N1(N1), .N2(N2), .NPAR(2)) dut2 (
    .clk, .rst_n, .start_i, .two_lists_i, .list1_i, .list2_i, .ovf1_i, .ovf2_i, .par_i,
    .busy_o(busy2), .done_o(done2), .accept_o(acc2), .overflow_o(ovf2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N1; i++) list1_i[i] = '0;
    for (int i = 0; i < N2; i++) list2_i[i] = '0;
    par_i = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int ev = 0; ev < 400; ev++) begin
      bit exp_acc, two, eo1, eo2;
      int ncomb, t1, t2, t;
      two = (ev % 4 != 3);
      eo1 = ($urandom_range(0, 9) == 0);
      eo2 = ($urandom_range(0, 9) == 0);
      par_i = rand_dec();
      for (int i = 0; i < N1; i++) list1_i[i] = rand_rtob(1500);
      for (int i = 0; i < N2; i++) list2_i[i] = rand_rtob(1500);
      exp_acc = 0;
      if (two) begin
        for (int i = 0; i < N1; i++) for (int j = 0; j < N2; j++)
          if (ref_pair(list1_i[i], list2_i[j], par_i)) exp_acc = 1;
        ncomb = N1 * N2;
      end else begin
        for (int i = 0; i < N1; i++) for (int j = i + 1; j < N1; j++)
          if (ref_pair(list1_i[i], list1_i[j], par_i)) exp_acc = 1;
        ncomb = N1 * N1;
      end
      two_lists_i <= two; ovf1_i <= eo1; ovf2_i <= eo2;
      start_i <= 1;
      @(posedge clk);
      start_i <= 0;
      // the lists are latched: scramble the inputs to prove it
      #1;
      for (int i = 0; i < N1; i++) list1_i[i] = rand_rtob(1500);
      t = 0; t1 = -1; t2 = -1;
      while (t1 < 0 || t2 < 0) begin
        @(posedge clk); #1;
        t++;
        if (done1) t1 = t;
        if (done2) t2 = t;
        if (t > 1000) break;
      end
      checks += 4;
      if (t1 != ncomb + 1) begin failures++; $display("FAIL ev %0d NPAR=1 latency %0d exp %0d", ev, t1, ncomb + 1); end
      if (t2 != ncomb / 2 + 1) begin failures++; $display("FAIL ev %0d NPAR=2 latency %0d exp %0d", ev, t2, ncomb / 2 + 1); end
      if (acc1 !== exp_acc || acc2 !== exp_acc) begin
        failures++; $display("FAIL ev %0d two=%0b accept %0b/%0b exp %0b", ev, two, acc1, acc2, exp_acc);
      end
      if (ovf1 !== (eo1 || (two && eo2)) || ovf2 !== (eo1 || (two && eo2))) begin
        failures++; $display("FAIL ev %0d overflow", ev);
      end
      if (exp_acc) n_acc++; else n_rej++;
      if (!two) n_one++;
      if (ovf1) n_ovf++;
      @(posedge clk);
    end
    checks++;
    if (n_acc < 10 || n_rej < 10 || n_one == 0 || n_ovf == 0) begin
      failures++; $display("FAIL coverage acc=%0d rej=%0d one=%0d ovf=%0d", n_acc, n_rej, n_one, n_ovf);
    end
    $display("accept %0d reject %0d one-list %0d overflow %0d", n_acc, n_rej, n_one, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
