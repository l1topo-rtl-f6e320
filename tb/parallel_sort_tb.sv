// parallel_sort_tb: events of N_IN random TOBs (distinct ET values among passing TOBs
// in most events, repeated ETs in some); two clocks later the list must hold the K
// highest-ET passing TOBs in descending order (ties: lower input index first).
module parallel_sort_tb;
  import topo_pkg::*;
  import tb_ref_pkg::*;
  localparam int N_IN = 192, K = 6;
  logic clk = 0, rst_n = 0;
  generic_tob_t tobs_i [N_IN];
  sel_param_t   par_i;
  reduced_tob_t list_o [K];
  int checks = 0, failures = 0, n_short = 0;

  parallel_sort #(.N_IN(N_IN), .K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N_IN; i++) tobs_i[i] = '0;
    par_i = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int ev = 0; ev < 100; ev++) begin
      reduced_tob_t exp_l [K];
      bit used [N_IN];
      #1;
      par_i = rand_sel();
      if (ev % 5 == 0) par_i.et_min = 13'd1400;   // few pass: short lists
      for (int i = 0; i < N_IN; i++) begin
        tobs_i[i] = rand_tob((ev % 7 == 0) ? 30 : 1500);
        used[i] = 0;
      end
      for (int k = 0; k < K; k++) begin
        int best;
        best = -1;
        for (int i = 0; i < N_IN; i++)
          if (!used[i] && ref_sel(tobs_i[i], par_i) && (best < 0 || tobs_i[i].et > tobs_i[best].et)) best = i;
        if (best >= 0) begin exp_l[k] = ref_reduce(tobs_i[best]); used[best] = 1; end
        else exp_l[k] = '0;
      end
      if (!exp_l[K-1].valid) n_short++;
      @(posedge clk);
      #1;
      for (int i = 0; i < N_IN; i++) tobs_i[i] = rand_tob(1500);   // next inputs must not matter
      @(posedge clk); #1;
      for (int k = 0; k < K; k++) begin
        checks++;
        if (list_o[k] !== exp_l[k]) begin
          failures++; $display("FAIL ev %0d slot %0d et %0d exp %0d", ev, k, list_o[k].et, exp_l[k].et);
        end
      end
    end
    checks++;
    if (n_short == 0) begin failures++; $display("FAIL no short list"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
