// serial_sort: sequential sort algorithm, a systolic chain of NSTAGE sorting stages.
//
// Sort mode (mux_ctrl_i = 0): one ReducedTOB per clock enters stage 0. Each stage
// compares the TOB arriving from its left with the TOB it stores; if the arriving TOB has
// the higher ET it is stored and the previously stored one moves on to the next stage,
// otherwise the arriving TOB moves on. After the last TOB has passed the last stage
// (NSTAGE clocks after it entered; feed EmptyTOBs or nothing meanwhile) stage k holds the
// (k+1)-th highest ET of the event, ties keeping arrival order. This compare-and-forward
// structure follows the published description.
//
// Pipe-out mode (mux_ctrl_i = 1): the stored TOBs shift one stage to the right per clock
// and leave on tob_o, lowest first (stage NSTAGE-1, then NSTAGE-2, ... stage 0), the
// chain refilling with EmptyTOBs. The pipe-out order is this design's choice. sorted_o
// shows the stored TOBs directly (stage 0 leading) for a reader that wants the whole
// list at once.
//
// The comparison key is {valid, ET}, so a real TOB always displaces an EmptyTOB.
// clr_i (the per-event reset) empties every stage. tob_o is registered.
module serial_sort
  import topo_pkg::*;
#(
  parameter int unsigned NSTAGE = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr_i,
  input  logic         mux_ctrl_i,
  input  reduced_tob_t tob_i,
  output reduced_tob_t tob_o,
  output reduced_tob_t sorted_o [NSTAGE]
);
  reduced_tob_t stored [NSTAGE];
  reduced_tob_t fwd    [NSTAGE];
  reduced_tob_t arrive [NSTAGE];

  always_comb begin
    arrive[0] = tob_i;
    for (int k = 1; k < NSTAGE; k++) arrive[k] = fwd[k-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr_i) begin
      for (int k = 0; k < NSTAGE; k++) begin
        stored[k] <= EMPTY_TOB;
        fwd[k]    <= EMPTY_TOB;
      end
    end else if (mux_ctrl_i) begin
      stored[0] <= EMPTY_TOB;
      fwd[0]    <= EMPTY_TOB;
      for (int k = 1; k < NSTAGE; k++) begin
        stored[k] <= stored[k-1];
        fwd[k]    <= EMPTY_TOB;
      end
      fwd[NSTAGE-1] <= stored[NSTAGE-1];
    end else begin
      for (int k = 0; k < NSTAGE; k++) begin
        if (sort_key(arrive[k]) > sort_key(stored[k])) begin
          stored[k] <= arrive[k];
          fwd[k]    <= stored[k];
        end else begin
          fwd[k]    <= arrive[k];
        end
      end
    end
  end

  assign tob_o    = fwd[NSTAGE-1];
  assign sorted_o = stored;
endmodule
