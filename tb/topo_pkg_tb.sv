// topo_pkg_tb: checks the package's cosh/cos tables against real-valued $cosh/$cos and
// the TOB reduction and sort-key helpers.
module topo_pkg_tb;
  import topo_pkg::*;
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1;
    for (int d = 0; d <= DETA_MAX; d++) begin
      longint exp_v, got;
      exp_v = longint'($floor($cosh(0.1 * d) * 1024.0 + 0.5));
      got   = longint'(COSH_TABLE[d*TRIG_W +: TRIG_W]);
      checks++;
      // allow one count plus a relative error of 1e-5 (integer series arithmetic)
      if (got - exp_v > 1 + exp_v / 100000 || exp_v - got > 1 + exp_v / 100000) begin
        failures++; $display("FAIL cosh[%0d] got %0d exp %0d", d, got, exp_v);
      end
    end
    for (int k = 0; k <= 32; k++) begin
      longint exp_v, got;
      exp_v = longint'($floor($cos(2.0 * 3.14159265358979 * k / 64.0) * 1024.0 + 0.5));
      got   = longint'(signed'(COS_TABLE[k*TRIG_W +: TRIG_W]));
      checks++;
      if (got - exp_v > 1 || exp_v - got > 1) begin
        failures++; $display("FAIL cos[%0d] got %0d exp %0d", k, got, exp_v);
      end
    end
    begin
      generic_tob_t g;
      reduced_tob_t r;
      g = '0; g.valid = 1; g.flags = 8'hA6; g.et = 13'd1234; g.eta = -8'sd17; g.phi = 6'd45; g.reserved = 24'hFFFFFF;
      r = reduce_tob(g);
      checks++;
      if (!(r.valid && r.flags == 2'b10 && r.et == 13'd1234 && r.eta == -8'sd17 && r.phi == 6'd45)) begin
        failures++; $display("FAIL reduce_tob");
      end
      checks++;
      if (sort_key(EMPTY_TOB) >= sort_key(r) || sort_key('{valid:1'b1, flags:2'b0, et:13'd0, eta:8'sd0, phi:6'd0}) <= sort_key(EMPTY_TOB)) begin
        failures++; $display("FAIL sort_key");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
