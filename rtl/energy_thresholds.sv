// energy_thresholds: missing-ET thresholding of the multiplicity firmware.
//
// Compares the event's missing transverse energy with NTHR thresholds and gives one bit
// per threshold (bit k = met_i >= thr_i[k]). Thresholding the missing ET alongside the
// object multiplicities follows the published structure; the plain comparison, the
// 16-bit value and the four thresholds are this design's choices.
//
// Timing: bits_o is registered (one clock of latency).
module energy_thresholds #(
  parameter int unsigned NTHR  = 4,
  parameter int unsigned MET_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [MET_W-1:0] met_i,
  input  logic [MET_W-1:0] thr_i [NTHR],
  output logic [NTHR-1:0]  bits_o
);
  always_ff @(posedge clk) begin
    if (!rst_n) bits_o <= '0;
    else for (int k = 0; k < NTHR; k++) bits_o[k] <= (met_i >= thr_i[k]);
  end
endmodule
