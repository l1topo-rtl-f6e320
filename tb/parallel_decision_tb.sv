// parallel_decision_tb: random lists and cut sets; the registered trigger bit must equal
// the reference OR over all combinations one clock after the lists are applied.
module parallel_decision_tb;
  import topo_pkg::*;
  import tb_ref_pkg::*;
  localparam int N1 = 6, N2 = 10;
  logic clk = 0, rst_n = 0, two_lists_i = 1, ovf1_i = 0, ovf2_i = 0;
  reduced_tob_t list1_i [N1];
  reduced_tob_t list2_i [N2];
  dec_param_t   par_i;
  logic accept_o, overflow_o;
  int checks = 0, failures = 0, n_acc = 0, n_rej = 0;

  parallel_decision #(.N1(N1), .N2(N2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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
    for (int ev = 0; ev < 1000; ev++) begin
      bit exp_acc, two, e1, e2;
      #1;
      two = (ev % 4 != 3);
      e1 = ($urandom_range(0, 9) == 0);
      e2 = ($urandom_range(0, 9) == 0);
      par_i = rand_dec();
      for (int i = 0; i < N1; i++) list1_i[i] = rand_rtob(1500);
      for (int i = 0; i < N2; i++) list2_i[i] = rand_rtob(1500);
      two_lists_i = two; ovf1_i = e1; ovf2_i = e2;
      exp_acc = 0;
      for (int i = 0; i < N1; i++) begin
        if (two) begin
          for (int j = 0; j < N2; j++) if (ref_pair(list1_i[i], list2_i[j], par_i)) exp_acc = 1;
        end else begin
          for (int j = i + 1; j < N1; j++) if (ref_pair(list1_i[i], list1_i[j], par_i)) exp_acc = 1;
        end
      end
      @(posedge clk); #1;
      checks++;
      if (accept_o !== exp_acc || overflow_o !== (e1 || (two && e2))) begin
        failures++; $display("FAIL ev %0d accept %0b exp %0b", ev, accept_o, exp_acc);
      end
      if (exp_acc) n_acc++; else n_rej++;
    end
    checks++;
    if (n_acc < 10 || n_rej < 10) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
