// serial_select_tb: streams random TOBs (with gaps) through the select algorithm and
// checks each output slot one clock later: the ReducedTOB when the reference selection
// passes, the EmptyTOB otherwise.
module serial_select_tb;
  import topo_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  generic_tob_t tob_i;
  logic         tob_valid_i;
  sel_param_t   par_i;
  reduced_tob_t tob_o;
  logic         tob_valid_o, pass_o;
  int checks = 0, failures = 0, n_pass = 0, n_empty = 0;

  serial_select dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tob_i = '0; tob_valid_i = 0; par_i = rand_sel();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      reduced_tob_t exp_t;
      bit p;
      #1;
      tob_i       = rand_tob(600);
      tob_valid_i = ($urandom_range(0, 4) != 0);
      if (i % 500 == 0) par_i = rand_sel();
      p     = tob_valid_i && ref_sel(tob_i, par_i);
      exp_t = p ? ref_reduce(tob_i) : '0;
      @(posedge clk);
      #1;
      checks++;
      if (tob_valid_o !== tob_valid_i || pass_o !== p || tob_o !== exp_t) begin
        failures++;
        $display("FAIL at %0d: v=%0b pass=%0b tob=%h exp %h", i, tob_valid_o, pass_o, tob_o, exp_t);
      end
      if (tob_valid_i && p)  n_pass++;
      if (tob_valid_i && !p) n_empty++;
      tob_valid_i = 0;
    end
    checks++;
    if (n_pass == 0 || n_empty == 0) begin
      failures++; $display("FAIL pass/empty not both seen");
    end
    $display("selected %0d, empty %0d", n_pass, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
