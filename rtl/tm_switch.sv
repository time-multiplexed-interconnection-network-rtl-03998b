// tm_switch: direct-drive multiplexer switch with K configuration contexts.
//
// A two-level hybrid pass-transistor multiplexer selects one of NC*NR input
// lines and a buffer drives the output wire. Input in[r*NC+c] reaches the
// buffer when column transistor c and row transistor r are both on. Column
// transistor c is shared by all rows (in the 4-input case s0/s2 and s1/s3
// share their cells); row transistors are s4 (row 0) and s5 (row 1). Every
// transistor is a tm_pass_transistor, so the selected input can change from
// one microcycle to the next.
//
// Configuration word per context: bits [NC-1:0] = column transistors,
// bits [NC+NR-1:NC] = row transistors. Written with cfg_we/cfg_ctx/cfg_word.
//
// Outputs: out is the buffered wire value; driven is high when exactly one
// input is connected; conflict is high when more than one input is connected
// (a short between two drivers, a configuration error). With no input
// connected the buffer input floats: this two-state model then drives 0 and
// reports driven=0. The switch cannot hold a value (see tm_latch_switch).
//
// The transistor arrangement and the shared cells follow the architecture;
// modelling a floating node as 0 with a flag is this design's choice.
module tm_switch #(
  parameter int unsigned K  = 4,
  parameter int unsigned NC = 2,
  parameter int unsigned NR = 2,
  parameter int unsigned CW = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk_f,
  input  logic                 rst,
  input  logic [CW-1:0]        sel,
  input  logic                 cfg_we,
  input  logic [CW-1:0]        cfg_ctx,
  input  logic [NC+NR-1:0]     cfg_word,
  input  logic [NC*NR-1:0]     in,
  output logic                 out,
  output logic                 driven,
  output logic                 conflict
);

  logic [NC-1:0] col_on;
  logic [NR-1:0] row_on;

  for (genvar c = 0; c < NC; c++) begin : g_col
    tm_pass_transistor #(.K(K), .CW(CW)) u_pt (
      .clk_f, .rst, .cfg_we, .cfg_ctx, .cfg_d(cfg_word[c]), .sel, .gate(col_on[c])
    );
  end
  for (genvar r = 0; r < NR; r++) begin : g_row
    tm_pass_transistor #(.K(K), .CW(CW)) u_pt (
      .clk_f, .rst, .cfg_we, .cfg_ctx, .cfg_d(cfg_word[NC+r]), .sel, .gate(row_on[r])
    );
  end

  logic [NC*NR-1:0] conn;
  always_comb begin
    for (int r = 0; r < int'(NR); r++)
      for (int c = 0; c < int'(NC); c++)
        conn[r*NC+c] = row_on[r] & col_on[c];
  end

  logic multi;   // more than one bit of conn set
  assign multi    = (conn & (conn - 1'b1)) != '0;
  assign driven   = (conn != '0) && !multi;
  assign conflict = multi;
  assign out      = driven ? |(in & conn) : 1'b0;

endmodule
