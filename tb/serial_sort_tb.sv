// serial_sort_tb: random events through the sorting chain. After the drain the stored
// list must hold the NSTAGE highest ETs of the event in descending order (EmptyTOBs
// after the valid TOBs), each stored TOB must be one of the event's TOBs, and piping out
// must deliver the stored TOBs lowest first on tob_o, one per clock. Which of several
// TOBs of equal ET is kept is not checked: the chain does not promise arrival order.
module serial_sort_tb;
  import topo_pkg::*;
  import tb_ref_pkg::*;
  localparam int NSTAGE = 6;
  logic clk = 0, rst_n = 0, clr_i = 0, mux_ctrl_i = 0;
  reduced_tob_t tob_i, tob_o;
  reduced_tob_t sorted_o [NSTAGE];
  int checks = 0, failures = 0, n_short = 0;

  serial_sort #(.NSTAGE(NSTAGE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tob_i = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int ev = 0; ev < 300; ev++) begin
      reduced_tob_t in_q [$];
      reduced_tob_t all_q [$];
      reduced_tob_t got_l [NSTAGE];
      reduced_tob_t exp_l [NSTAGE];
      int n;
      in_q.delete();
      clr_i <= 1; @(posedge clk); clr_i <= 0;
      n = $urandom_range(0, 40);
      for (int i = 0; i < n; i++) begin
        reduced_tob_t t;
        t = rand_rtob((ev % 3 == 0) ? 20 : 1000);   // small ET range forces ties
        if ($urandom_range(0, 3) == 0) t = '0;
        in_q.push_back(t);
        tob_i <= t;
        @(posedge clk);
      end
      tob_i <= '0;
      all_q = in_q;
      // reference: selection of the NSTAGE best, stable on ties
      for (int k = 0; k < NSTAGE; k++) begin
        int best;
        best = -1;
        for (int i = 0; i < in_q.size(); i++)
          if (in_q[i].valid && (best < 0 || in_q[i].et > in_q[best].et)) best = i;
        if (best >= 0) begin exp_l[k] = in_q[best]; in_q[best].valid = 0; end
        else exp_l[k] = '0;
      end
      if (!exp_l[NSTAGE-1].valid) n_short++;
      repeat (NSTAGE) @(posedge clk);
      #1;
      for (int k = 0; k < NSTAGE; k++) begin
        bit found;
        got_l[k] = sorted_o[k];
        checks++;
        if (sorted_o[k].valid !== exp_l[k].valid || sorted_o[k].et !== exp_l[k].et) begin
          failures++; $display("FAIL ev %0d stage %0d et %0d exp %0d", ev, k, sorted_o[k].et, exp_l[k].et);
        end
        found = !sorted_o[k].valid && (sorted_o[k] == '0);
        foreach (all_q[i]) if (all_q[i] == sorted_o[k]) found = 1;
        checks++;
        if (!found) begin failures++; $display("FAIL ev %0d stage %0d holds a TOB not in the event", ev, k); end
      end
      mux_ctrl_i <= 1;
      for (int k = NSTAGE - 1; k >= 0; k--) begin
        @(posedge clk); #1;
        checks++;
        if (tob_o !== got_l[k]) begin failures++; $display("FAIL ev %0d pipe-out %0d", ev, k); end
      end
      mux_ctrl_i <= 0;
    end
    checks++;
    if (n_short == 0) begin failures++; $display("FAIL no event with fewer TOBs than stages"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
