// dd_mux_switch: conventional direct-drive multiplexer switch.
//
// Same two-level hybrid multiplexer as tm_switch, but each pass transistor
// has a single memory cell, so its selection is fixed for the whole user
// cycle. It is used for connections whose source and destination wires are
// both conventional (not time-multiplexed) in a partially populated fabric.
//
// Configuration word: bits [NC-1:0] = column transistors, bits
// [NC+NR-1:NC] = row transistors, written with cfg_we (no context number).
// in[r*NC+c] is connected when column c and row r are on. driven/conflict as
// in tm_switch; with nothing connected out is 0 and driven is 0.
//
// The structure follows the architecture; clearing the cells at reset is this
// design's choice.
module dd_mux_switch #(
  parameter int unsigned NC = 2,
  parameter int unsigned NR = 2
) (
  input  logic                 clk_f,
  input  logic                 rst,
  input  logic                 cfg_we,
  input  logic [NC+NR-1:0]     cfg_word,
  input  logic [NC*NR-1:0]     in,
  output logic                 out,
  output logic                 driven,
  output logic                 conflict
);

  logic [NC+NR-1:0] mc;
  logic [NC*NR-1:0] conn;

  always_ff @(posedge clk_f) begin
    if (rst)         mc <= '0;
    else if (cfg_we) mc <= cfg_word;
  end

  always_comb begin
    for (int r = 0; r < int'(NR); r++)
      for (int c = 0; c < int'(NC); c++)
        conn[r*NC+c] = mc[NC+r] & mc[c];
  end

  logic multi;   // more than one bit of conn set
  assign multi    = (conn & (conn - 1'b1)) != '0;
  assign driven   = (conn != '0) && !multi;
  assign conflict = multi;
  assign out      = driven ? |(in & conn) : 1'b0;

endmodule
