// parallel_multiplicity_tb: random events; two clocks later the count must equal the
// number of TOBs passing the reference cuts, saturated at 2^CNT_W - 1.
module parallel_multiplicity_tb;
  import topo_pkg::*;
  import tb_ref_pkg::*;
  localparam int N_IN = 144, CNT_W = 3;
  logic clk = 0, rst_n = 0;
  generic_tob_t tobs_i [N_IN];
  sel_param_t   par_i;
  logic [CNT_W-1:0] count_o;
  int checks = 0, failures = 0, n_sat = 0, n_unsat = 0;

  parallel_multiplicity #(.N_IN(N_IN), .CNT_W(CNT_W)) dut (.*);
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
    for (int ev = 0; ev < 300; ev++) begin
      int n;
      #1;
      par_i = rand_sel();
      par_i.et_min = 13'($urandom_range(1380, 1500));
      for (int i = 0; i < N_IN; i++) tobs_i[i] = rand_tob(1500);
      n = 0;
      for (int i = 0; i < N_IN; i++) if (ref_sel(tobs_i[i], par_i)) n++;
      @(posedge clk); #1;
      for (int i = 0; i < N_IN; i++) tobs_i[i] = '0;
      @(posedge clk); #1;
      if (n >= 7) n_sat++; else n_unsat++;
      if (n > 7) n = 7;
      checks++;
      if (int'(count_o) != n) begin failures++; $display("FAIL ev %0d count %0d exp %0d", ev, count_o, n); end
    end
    checks++;
    if (n_sat == 0 || n_unsat == 0) begin failures++; $display("FAIL coverage sat=%0d unsat=%0d", n_sat, n_unsat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
