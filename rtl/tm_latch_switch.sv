// tm_latch_switch: direct-drive multiplexer TM switch that can latch.
//
// It is tm_switch plus one more TM pass transistor, s6, that closes a
// feedback path from the buffer output back to the buffer input. In a
// microcycle where s6 is on and no input is selected, the buffer keeps
// driving the value it had at the end of the previous microcycle; so when the
// switch turns from on to off it goes on driving the wire with the last value
// it passed, and the wire never floats.
//
// Configuration word per context: bits [NC+NR-1:0] as in tm_switch, bit
// [NC+NR] = s6 (feedback enable).
//
// Timing: out follows the selected input combinationally. The feedback loop
// is modelled as a register, fb_q, that samples out on every rising edge of
// clk_f, i.e. at each microcycle boundary. A microcycle with s6 on and no
// input connected drives fb_q. driven/conflict/floating report the state of
// the buffer input: conflict if two inputs or an input and s6 are on at once,
// floating if neither an input nor s6 is on (out is then 0).
//
// The s6 arrangement follows the architecture. Modelling the loop as a
// register sampled at microcycle boundaries is this design's choice, valid
// because contexts only change at those boundaries.
module tm_latch_switch #(
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
  input  logic [NC+NR:0]       cfg_word,
  input  logic [NC*NR-1:0]     in,
  output logic                 out,
  output logic                 floating,
  output logic                 conflict
);

  logic mux_out, mux_driven, mux_conflict, fb_on, fb_q;

  tm_switch #(.K(K), .NC(NC), .NR(NR), .CW(CW)) u_mux (
    .clk_f, .rst, .sel, .cfg_we, .cfg_ctx,
    .cfg_word(cfg_word[NC+NR-1:0]), .in,
    .out(mux_out), .driven(mux_driven), .conflict(mux_conflict)
  );

  tm_pass_transistor #(.K(K), .CW(CW)) u_s6 (
    .clk_f, .rst, .cfg_we, .cfg_ctx, .cfg_d(cfg_word[NC+NR]), .sel, .gate(fb_on)
  );

  always_comb begin
    if (mux_driven)  out = mux_out;
    else if (fb_on)  out = fb_q;
    else             out = 1'b0;
  end

  always_ff @(posedge clk_f) begin
    if (rst) fb_q <= 1'b0;
    else     fb_q <= out;
  end

  assign floating = !mux_driven && !fb_on && !mux_conflict;
  assign conflict = mux_conflict || (mux_driven && fb_on);

endmodule
