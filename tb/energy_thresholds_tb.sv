// energy_thresholds_tb: random missing-ET values and thresholds, including values equal
// to a threshold; each bit must be (met >= threshold) one clock later.
module energy_thresholds_tb;
  localparam int NTHR = 4, MET_W = 16;
  logic clk = 0, rst_n = 0;
  logic [MET_W-1:0] met_i;
  logic [MET_W-1:0] thr_i [NTHR];
  logic [NTHR-1:0]  bits_o;
  int checks = 0, failures = 0;

  energy_thresholds #(.NTHR(NTHR), .MET_W(MET_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    met_i = '0;
    for (int k = 0; k < NTHR; k++) thr_i[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) begin
      logic [NTHR-1:0] exp_b;
      #1;
      for (int k = 0; k < NTHR; k++) thr_i[k] = 16'($urandom_range(0, 5000));
      met_i = (i % 5 == 0) ? thr_i[i % NTHR] : 16'($urandom_range(0, 5000));
      for (int k = 0; k < NTHR; k++) exp_b[k] = (int'(met_i) >= int'(thr_i[k]));
      @(posedge clk); #1;
      checks++;
      if (bits_o !== exp_b) begin failures++; $display("FAIL met %0d bits %b exp %b", met_i, bits_o, exp_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
