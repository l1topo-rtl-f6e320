// tob_selector_tb: random and corner TOBs against the reference selection cuts.
module tob_selector_tb;
  import topo_pkg::*;
  import tb_ref_pkg::*;
  generic_tob_t tob;
  sel_param_t   par;
  logic         pass;
  int checks = 0, failures = 0;

  tob_selector dut (.tob, .par, .pass);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    #1;
    checks++;
    if (pass !== ref_sel(tob, par)) begin
      failures++;
      $display("FAIL et=%0d eta=%0d flags=%h -> %0b", tob.et, tob.eta, tob.flags, pass);
    end
  endtask

  initial begin
    int npass = 0;
    for (int i = 0; i < 2000; i++) begin
      tob = rand_tob(600);
      par = rand_sel();
      check_one();
      if (pass) npass++;
    end
    // boundaries: ET exactly at threshold, eta exactly at window edges
    par = '{et_min: 13'd100, eta_min: -8'sd20, eta_max: 8'sd20, flag_mask: 8'h01, flag_req: 8'h01};
    tob = '0; tob.valid = 1; tob.flags = 8'h01; tob.et = 13'd100; tob.eta = -8'sd20; check_one();
    tob.eta = 8'sd20; check_one();
    tob.eta = 8'sd21; check_one();
    tob.et = 13'd99; tob.eta = 0; check_one();
    tob.et = 13'd500; tob.flags = 8'h00; check_one();
    tob.valid = 0; tob.flags = 8'h01; check_one();
    checks++;
    if (npass < 100 || npass > 1900) begin
      failures++; $display("FAIL stimulus did not exercise both outcomes (%0d)", npass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
