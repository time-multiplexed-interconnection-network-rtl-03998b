// mc_counter: circular microcycle counter.
//
// Counts 0, 1, ..., K-1, 0, ... on every rising edge of the fast clock
// clk_f, whose frequency is K times the user clock. Value k means the fabric
// is in microcycle k+1 of the current user cycle, and it is the select input
// of every TM pass transistor's K:1 context multiplexer. One counter is shared
// by all TM switches of a switch block and its neighbouring connection block.
//
// Interface: clk_f, rst (synchronous, active high, returns to 0);
// cnt (log2 K bits); last is high during the final microcycle, so the rising
// edge of clk_f that ends it is also the user clock edge.
//
// The counting sequence follows the architecture; the reset and the `last`
// output are this design's own choices.
module mc_counter #(
  parameter int unsigned K  = 4,
  parameter int unsigned CW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk_f,
  input  logic          rst,
  output logic [CW-1:0] cnt,
  output logic          last
);

  always_ff @(posedge clk_f) begin
    if (rst || cnt == CW'(K - 1)) cnt <= '0;
    else                          cnt <= cnt + 1'b1;
  end

  assign last = (cnt == CW'(K - 1));

endmodule
