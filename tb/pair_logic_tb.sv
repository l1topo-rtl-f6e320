// pair_logic_tb: random TOB pairs and random cut sets against the reference pair cuts
// (invariant mass from real-valued cosh/cos). Also probes the invariant-mass window at
// its exact edges for a known pair.
module pair_logic_tb;
  import topo_pkg::*;
  import tb_ref_pkg::*;
  reduced_tob_t a_i, b_i;
  dec_param_t   par_i;
  logic         pass_o;
  int checks = 0, failures = 0, n_pass = 0;

  pair_logic dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    #1;
    checks++;
    if (pass_o !== ref_pair(a_i, b_i, par_i)) begin
      failures++;
      $display("FAIL a(et%0d eta%0d phi%0d) b(et%0d eta%0d phi%0d) m2=%0d -> %0b",
               a_i.et, a_i.eta, a_i.phi, b_i.et, b_i.eta, b_i.phi, ref_invm2(a_i, b_i), pass_o);
    end
    if (pass_o) n_pass++;
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      a_i = rand_rtob(1500);
      b_i = rand_rtob(1500);
      par_i = rand_dec();
      check_one();
    end
    // invariant-mass window edges for a fixed pair
    a_i = '{valid: 1'b1, flags: 2'b00, et: 13'd400, eta: 8'sd10, phi: 6'd3};
    b_i = '{valid: 1'b1, flags: 2'b00, et: 13'd250, eta: -8'sd12, phi: 6'd40};
    par_i = '0;
    par_i.invm_en = 1'b1;
    par_i.invm2_min = 48'(ref_invm2(a_i, b_i));
    par_i.invm2_max = 48'(ref_invm2(a_i, b_i));
    check_one();
    checks++;
    if (!pass_o) begin failures++; $display("FAIL mass window at exact value"); end
    par_i.invm2_min = 48'(ref_invm2(a_i, b_i) + 1);
    par_i.invm2_max = 48'(ref_invm2(a_i, b_i) + 100);
    check_one();
    checks++;
    if (n_pass < 200) begin failures++; $display("FAIL too few passing pairs (%0d)", n_pass); end
    $display("passing pairs %0d", n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
