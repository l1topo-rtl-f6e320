// serial_multiplicity_tb: events of random length; the count after each event must equal
// the number of TOBs passing the reference cuts, saturated at 2^CNT_W - 1.
module serial_multiplicity_tb;
  import topo_pkg::*;
  import tb_ref_pkg::*;
  localparam int CNT_W = 3;
  logic clk = 0, rst_n = 0, clr_i = 0;
  generic_tob_t tob_i;
  logic         tob_valid_i = 0;
  sel_param_t   par_i;
  logic [CNT_W-1:0] count_o;
  int checks = 0, failures = 0, n_sat = 0;

  serial_multiplicity #(.CNT_W(CNT_W)) dut (.*);
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
      int n, exp_c;
      par_i = rand_sel();
      clr_i <= 1; @(posedge clk); clr_i <= 0;
      n = $urandom_range(0, 40);
      exp_c = 0;
      for (int i = 0; i < n; i++) begin
        generic_tob_t t;
        bit v;
        t = rand_tob(500);
        v = ($urandom_range(0, 3) != 0);
        tob_i <= t; tob_valid_i <= v;
        @(posedge clk);
        if (v && ref_sel(t, par_i)) exp_c++;
      end
      tob_valid_i <= 0;
      @(posedge clk); #1;
      if (exp_c > 7) begin exp_c = 7; n_sat++; end
      checks++;
      if (int'(count_o) != exp_c) begin
        failures++; $display("FAIL ev %0d count %0d exp %0d", ev, count_o, exp_c);
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
