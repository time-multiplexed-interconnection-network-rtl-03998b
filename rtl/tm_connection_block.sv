// tm_connection_block: connects the input pins of one logic block to the
// routing channel below it and the channel to its left.
//
// The first N_LB_IN/2 pins take their signal from the horizontal channel,
// the rest from the vertical channel. Each pin has a direct-drive multiplexer
// switch with CB_NC*CB_NR inputs (two-level hybrid): pin q of a channel can
// select tracks (q + m*W/(CB_NC*CB_NR)) mod W, m = 0..CB_NC*CB_NR-1, so with
// W=48 and 8 inputs each pin reaches 8/48 = 0.17 of the channel (the
// architecture's pin flexibility is 0.15). Channel bit c < W/2 is track c of
// the eastbound/northbound wires, bit c >= W/2 is track c-W/2 of the
// westbound/southbound wires.
//
// The switches are latching TM switches, so a pin can take a net that uses a
// shared wire in one microcycle and keep presenting it to the logic block for
// the rest of the user cycle. A pin whose tracks are all conventional gets a
// one-context switch. The select comes from the counter of the switch block at
// the same corner.
//
// Ports: chan_h, chan_v (W bits each), sel (counter), cfg; lb_in (pins).
// Configuration item = pin number; word = {s_latch, rows, columns}.
// Combinational from channel to pin except for the switch latches.
//
// What follows the architecture: TM switches in connection blocks, full
// internal population, 22 pins. The track pattern, the pin split between the
// two channels and the 8-input multiplexer size are this design's choices.
module tm_connection_block
  import tm_pkg::*;
#(
  parameter int unsigned K         = DEF_K,
  parameter int unsigned W         = DEF_W,
  parameter int unsigned N_LB_IN   = DEF_N_LB_IN,
  parameter int unsigned CB_NC     = 4,
  parameter int unsigned CB_NR     = 2,
  parameter int unsigned TM_TRACKS = W / 2,
  parameter int unsigned XPOS      = 0,
  parameter int unsigned YPOS      = 0,
  parameter int unsigned CW        = (K > 1) ? $clog2(K) : 1
) (
  input  logic                clk_f,
  input  logic                rst,
  input  logic [CW-1:0]       sel,
  input  cfg_t                cfg,
  input  logic [W-1:0]        chan_h,
  input  logic [W-1:0]        chan_v,
  output logic [N_LB_IN-1:0]  lb_in,
  output logic                err
);

  localparam int unsigned T      = W / 2;
  localparam int unsigned NIN    = CB_NC * CB_NR;
  localparam int unsigned STRIDE = (W / NIN > 0) ? W / NIN : 1;
  localparam int unsigned NH     = N_LB_IN / 2;

  function automatic int unsigned track_of(int unsigned q, int unsigned m);
    return (q + m * STRIDE) % W;
  endfunction

  function automatic bit pin_is_tm(int unsigned q);
    bit any;
    any = 1'b0;
    for (int unsigned m = 0; m < NIN; m++)
      if ((track_of(q, m) % T) < TM_TRACKS) any = 1'b1;
    return any;
  endfunction

  wire cfg_hit = cfg.we && cfg.target == CFG_CB &&
                 cfg.x == CFG_XY_W'(XPOS) && cfg.y == CFG_XY_W'(YPOS);

  logic [N_LB_IN-1:0] pin_err;

  for (genvar p = 0; p < N_LB_IN; p++) begin : g_pin
    localparam int unsigned Q = (p < NH) ? p : p - NH;
    logic [W-1:0]   chan;
    logic [NIN-1:0] taps;
    assign chan = (p < NH) ? chan_h : chan_v;
    for (genvar m = 0; m < NIN; m++) begin : g_tap
      assign taps[m] = chan[track_of(Q, m)];
    end
    route_switch #(.K(K), .NC(CB_NC), .NR(CB_NR), .IS_TM(pin_is_tm(Q)), .CW(CW)) u_sw (
      .clk_f, .rst, .sel,
      .cfg_we(cfg_hit && cfg.idx == CFG_IDX_W'(p)),
      .cfg_ctx(cfg.ctx[CW-1:0]),
      .cfg_word(cfg.data[CB_NC+CB_NR:0]),
      .in(taps),
      .out(lb_in[p]),
      .err(pin_err[p])
    );
  end

  assign err = |pin_err;

endmodule
