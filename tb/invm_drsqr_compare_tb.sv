// invm_drsqr_compare_tb: a two-list invariant-mass plus dR^2 decision run in both forms.
//
// The same random events (6 leading jets x 10 selected electrons) and one fixed cut set
// go to the sequential decision (one logic block, 60 clocks) and to the parallel
// decision (60 logic blocks, one clock). The cut set enables only the ET thresholds, the
// invariant-mass window and the dR^2 window. For every event both trigger bits must
// agree with each other and with the reference, and the sequential result must arrive
// 61 clocks after start. The test also needs some events to fire and some not to.
module invm_drsqr_compare_tb;
  import topo_pkg::*;
  import tb_ref_pkg::*;
  localparam int N1 = 6, N2 = 10, N_EVENTS = 64;
  logic clk = 0, rst_n = 0, start = 0;
  reduced_tob_t l1 [N1];
  reduced_tob_t l2 [N2];
  dec_param_t   par;
  logic s_busy, s_done, s_acc, s_ovf, p_acc, p_ovf;
  int checks = 0, failures = 0, n_fire = 0;

  serial_decision #(.N1(N1), .N2(N2), .NPAR(1)) u_serial (
    .clk, .rst_n, .start_i(start), .two_lists_i(1'b1), .list1_i(l1), .list2_i(l2),
    .ovf1_i(1'b0), .ovf2_i(1'b0), .par_i(par),
    .busy_o(s_busy), .done_o(s_done), .accept_o(s_acc), .overflow_o(s_ovf));

  parallel_decision #(.N1(N1), .N2(N2)) u_parallel (
    .clk, .rst_n, .two_lists_i(1'b1), .list1_i(l1), .list2_i(l2),
    .ovf1_i(1'b0), .ovf2_i(1'b0), .par_i(par), .accept_o(p_acc), .overflow_o(p_ovf));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string fired;
    fired = "";
    par = '0;
    par.et1_min   = 13'd100;
    par.et2_min   = 13'd50;
    par.invm_en   = 1'b1;
    par.invm2_min = 48'd250000;     // (50 GeV)^2 in (100 MeV)^2 counts
    par.invm2_max = 48'd1000000;    // (100 GeV)^2
    par.dr2_en    = 1'b1;
    par.dr2_min   = 15'd0;
    par.dr2_max   = 15'd144;         // dR < about 1.2
    for (int i = 0; i < N1; i++) l1[i] = '0;
    for (int i = 0; i < N2; i++) l2[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int ev = 1; ev <= N_EVENTS; ev++) begin
      bit exp_acc;
      int t;
      #1;
      for (int i = 0; i < N1; i++) l1[i] = rand_rtob(1000);
      for (int i = 0; i < N2; i++) l2[i] = rand_rtob(600);
      exp_acc = 0;
      for (int i = 0; i < N1; i++) for (int j = 0; j < N2; j++)
        if (ref_pair(l1[i], l2[j], par)) exp_acc = 1;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      checks++;
      if (p_acc !== exp_acc) begin failures++; $display("FAIL event %0d parallel %0b exp %0b", ev, p_acc, exp_acc); end
      t = 0;
      while (!s_done && t < 200) begin @(posedge clk); #1; t++; end
      checks += 2;
      if (t != N1 * N2 + 1) begin failures++; $display("FAIL event %0d serial latency %0d", ev, t); end
      if (s_acc !== exp_acc || s_acc !== p_acc) begin
        failures++; $display("FAIL event %0d serial %0b parallel %0b exp %0b", ev, s_acc, p_acc, exp_acc);
      end
      if (exp_acc) begin n_fire++; fired = {fired, $sformatf(" %0d", ev)}; end
    end
    $display("events that fired in both forms:%s", fired);
    checks++;
    if (n_fire == 0 || n_fire == N_EVENTS) begin failures++; $display("FAIL all events gave the same decision"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
