// tob_list_buffer: collects the selected TOBs of one event into a fixed-length list.
//
// Decision algorithms read a bounded list of TOBs per type (for example the 10 selected
// electron TOBs of the example algorithm). This buffer takes the stream of ReducedTOBs
// and EmptyTOBs from a select algorithm, stores the non-empty ones in arrival order,
// and raises overflow_o when more than DEPTH arrive in one event; later TOBs are
// dropped. clr_i starts a new event. Keeping the first DEPTH TOBs is this design's
// choice; the overflow flag corresponds to the overflow bits sent with the decisions.
//
// Timing: list_o, count_o and overflow_o are registers updated one clock after a TOB.
module tob_list_buffer
  import topo_pkg::*;
#(
  parameter int unsigned DEPTH = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr_i,
  input  reduced_tob_t               tob_i,
  input  logic                       tob_valid_i,
  output reduced_tob_t               list_o [DEPTH],
  output logic [$clog2(DEPTH+1)-1:0] count_o,
  output logic                       overflow_o
);
  always_ff @(posedge clk) begin
    if (!rst_n || clr_i) begin
      for (int i = 0; i < DEPTH; i++) list_o[i] <= EMPTY_TOB;
      count_o    <= '0;
      overflow_o <= 1'b0;
    end else if (tob_valid_i && tob_i.valid) begin
      if (count_o < ($clog2(DEPTH+1))'(DEPTH)) begin
        list_o[count_o] <= tob_i;
        count_o         <= count_o + 1'b1;
      end else begin
        overflow_o <= 1'b1;
      end
    end
  end
endmodule
