// parallel_select_tb: events of N_IN random TOBs; two clocks later the list must hold the
// first K passing TOBs in input order and overflow must say whether more than K passed.
module parallel_select_tb;
  import topo_pkg::*;
  import tb_ref_pkg::*;
  localparam int N_IN = 144, K = 10;
  logic clk = 0, rst_n = 0;
  generic_tob_t tobs_i [N_IN];
  sel_param_t   par_i;
  reduced_tob_t list_o [K];
  logic         overflow_o;
  int checks = 0, failures = 0, n_ovf = 0, n_noovf = 0;

  parallel_select #(.N_IN(N_IN), .K(K)) dut (.*);
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
    for (int ev = 0; ev < 200; ev++) begin
      reduced_tob_t exp_l [K];
      int n;
      #1;
      par_i = rand_sel();
      par_i.et_min = 13'((ev % 2) ? 1450 : $urandom_range(0, 1500));
      for (int i = 0; i < N_IN; i++) tobs_i[i] = rand_tob(1500);
      n = 0;
      for (int k = 0; k < K; k++) exp_l[k] = '0;
      for (int i = 0; i < N_IN; i++)
        if (ref_sel(tobs_i[i], par_i)) begin
          if (n < K) exp_l[n] = ref_reduce(tobs_i[i]);
          n++;
        end
      @(posedge clk); #1;
      for (int i = 0; i < N_IN; i++) tobs_i[i] = '0;
      @(posedge clk); #1;
      for (int k = 0; k < K; k++) begin
        checks++;
        if (list_o[k] !== exp_l[k]) begin failures++; $display("FAIL ev %0d slot %0d", ev, k); end
      end
      checks++;
      if (overflow_o !== (n > K)) begin failures++; $display("FAIL ev %0d overflow %0b n=%0d", ev, overflow_o, n); end
      if (n > K) n_ovf++; else n_noovf++;
    end
    checks++;
    if (n_ovf == 0 || n_noovf == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
