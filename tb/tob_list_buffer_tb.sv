// tob_list_buffer_tb: streams of ReducedTOBs and EmptyTOBs; the list must hold the first
// DEPTH non-empty TOBs in order, the rest EmptyTOBs, and overflow must flag extra TOBs.
module tob_list_buffer_tb;
  import topo_pkg::*;
  import tb_ref_pkg::*;
  localparam int DEPTH = 10;
  logic clk = 0, rst_n = 0, clr_i = 0;
  reduced_tob_t tob_i;
  logic         tob_valid_i = 0;
  reduced_tob_t list_o [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] count_o;
  logic         overflow_o;
  int checks = 0, failures = 0, n_ovf = 0;

  tob_list_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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
      reduced_tob_t exp_l [DEPTH];
      int n, k;
      bit ovf;
      clr_i <= 1; @(posedge clk); clr_i <= 0;
      for (int i = 0; i < DEPTH; i++) exp_l[i] = '0;
      n = $urandom_range(0, 30); k = 0; ovf = 0;
      for (int i = 0; i < n; i++) begin
        reduced_tob_t t;
        bit v;
        t = rand_rtob(800);
        if ($urandom_range(0, 2) == 0) t = '0;
        v = ($urandom_range(0, 4) != 0);
        tob_i <= t; tob_valid_i <= v;
        @(posedge clk);
        if (v && t.valid) begin
          if (k < DEPTH) begin exp_l[k] = t; k++; end
          else ovf = 1;
        end
      end
      tob_valid_i <= 0;
      @(posedge clk); #1;
      checks++;
      if (int'(count_o) != k || overflow_o !== ovf) begin
        failures++; $display("FAIL ev %0d count %0d/%0d ovf %0b/%0b", ev, count_o, k, overflow_o, ovf);
      end
      for (int i = 0; i < DEPTH; i++) begin
        checks++;
        if (list_o[i] !== exp_l[i]) begin failures++; $display("FAIL ev %0d slot %0d", ev, i); end
      end
      if (ovf) n_ovf++;
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL overflow never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
