// route_switch: one routing multiplexer of the fabric, either a latching TM
// switch or a conventional switch.
//
// In a fabric where only some tracks are time-multiplexed, a connection needs
// a TM switch unless both the wire it drives and every wire it can select are
// conventional; IS_TM carries that decision, made by the enclosing block.
// IS_TM=1 builds tm_latch_switch (K contexts, feedback latch, configuration
// word NC+NR+1 bits); IS_TM=0 builds dd_mux_switch (one context, word NC+NR
// bits, cfg_ctx ignored, top word bit ignored).
//
// Outputs: out, and err = the switch reports a short (conflict). A floating
// buffer input is not an error in the fabric: unused switches float.
module route_switch #(
  parameter int unsigned K     = 4,
  parameter int unsigned NC    = 2,
  parameter int unsigned NR    = 2,
  parameter bit          IS_TM = 1'b1,
  parameter int unsigned CW    = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk_f,
  input  logic                 rst,
  input  logic [CW-1:0]        sel,
  input  logic                 cfg_we,
  input  logic [CW-1:0]        cfg_ctx,
  input  logic [NC+NR:0]       cfg_word,
  input  logic [NC*NR-1:0]     in,
  output logic                 out,
  output logic                 err
);

  if (IS_TM) begin : g_tm
    logic floating;
    tm_latch_switch #(.K(K), .NC(NC), .NR(NR), .CW(CW)) u_sw (
      .clk_f, .rst, .sel, .cfg_we, .cfg_ctx, .cfg_word, .in,
      .out, .floating, .conflict(err)
    );
  end else begin : g_conv
    logic driven;
    dd_mux_switch #(.NC(NC), .NR(NR)) u_sw (
      .clk_f, .rst, .cfg_we, .cfg_word(cfg_word[NC+NR-1:0]), .in,
      .out, .driven, .conflict(err)
    );
  end

endmodule
