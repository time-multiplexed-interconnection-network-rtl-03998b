// tm_pass_transistor: a routing pass transistor with one memory cell per
// microcycle.
//
// K configuration cells MC_1..MC_K back the transistor; a K:1 multiplexer
// driven by the shared microcycle counter picks the cell that controls the
// gate in the current microcycle (cell k when the counter reads k-1). The
// transistor itself is a switch, so this module outputs its gate value
// (1 = on); the parent switch decides what the gate connects.
//
// Interface: clk_f and rst clock and clear the cells (all off after reset);
// cfg_we/cfg_ctx/cfg_d write one cell; sel is the counter value; gate is
// combinational from sel and the cells.
//
// The cell/mux/counter structure follows the architecture. The synchronous
// write port and clearing the cells at reset are this design's choices.
module tm_pass_transistor #(
  parameter int unsigned K  = 4,
  parameter int unsigned CW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk_f,
  input  logic          rst,
  input  logic          cfg_we,
  input  logic [CW-1:0] cfg_ctx,
  input  logic          cfg_d,
  input  logic [CW-1:0] sel,
  output logic          gate
);

  logic [K-1:0] mc;

  always_ff @(posedge clk_f) begin
    if (rst) mc <= '0;
    else if (cfg_we && 32'(cfg_ctx) < K) mc[cfg_ctx] <= cfg_d;
  end

  assign gate = (32'(sel) < K) ? mc[sel] : 1'b0;

endmodule
