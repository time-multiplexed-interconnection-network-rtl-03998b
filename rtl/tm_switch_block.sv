// tm_switch_block: switch block at one intersection of a horizontal and a
// vertical routing channel.
//
// Wires are uni-directional and single-driver, L logic blocks long, and
// staggered: on track t of each direction a new wire starts at this switch
// block when (position + t) mod L == 0, and at the array edge every track
// starts. A starting wire is driven by a 4-input direct-drive multiplexer
// switch (2x2 two-level hybrid) whose inputs are:
//   in0  the same track arriving straight through this switch block,
//   in1  track t+1 of one perpendicular incoming direction,
//   in2  track t-1 of the other perpendicular incoming direction,
//   in3  logic block output pin t mod N_BLE.
// A track on which no wire starts here passes straight through.
// Every multiplexer is a latching TM switch with K contexts, except where the
// driven track and all tracks it can select are conventional (tracks
// TM_TRACKS..T-1 of each direction), which get a one-context switch.
// The block holds the microcycle counter that all its TM switches, and those
// of the neighbouring connection block, share.
//
// Ports: from_<side> are the wires arriving from that side (from_w carries
// eastbound wires); drive_<dir> are the wires leaving in that direction.
// T = W/2 tracks per direction. Multiplexer for direction d, track t is
// configuration item d*T+t (d: E=0, W=1, N=2, S=3). All paths are
// combinational except the latches inside the switches.
//
// What follows the architecture: uni-directional length-4 wires, direct-drive
// TM switches, 100% populated switch block, one counter per switch block, the
// choice of TM versus conventional switch. This design's own choices: the
// exact turn pattern (a +/-1 track rotation in place of the unspecified
// Wilton permutation), the stagger formula, and the logic block input to each
// multiplexer.
//
// Connected into the array, switch blocks form structural combinational
// loops (a signal can be routed around a logic block); they are closed only
// if the configuration routes a net in a ring.
module tm_switch_block
  import tm_pkg::*;
#(
  parameter int unsigned K         = DEF_K,
  parameter int unsigned W         = DEF_W,
  parameter int unsigned L         = DEF_L_SEG,
  parameter int unsigned N_BLE     = DEF_N_BLE,
  parameter int unsigned TM_TRACKS = W / 2,
  parameter int unsigned NX        = 4,
  parameter int unsigned NY        = 4,
  parameter int unsigned XPOS      = 0,
  parameter int unsigned YPOS      = 0,
  parameter int unsigned CW        = (K > 1) ? $clog2(K) : 1
) (
  input  logic              clk_f,
  input  logic              rst,
  input  cfg_t              cfg,
  input  logic [W/2-1:0]    from_w,
  input  logic [W/2-1:0]    from_e,
  input  logic [W/2-1:0]    from_s,
  input  logic [W/2-1:0]    from_n,
  input  logic [N_BLE-1:0]  lb_pins,
  output logic [W/2-1:0]    drive_e,
  output logic [W/2-1:0]    drive_w,
  output logic [W/2-1:0]    drive_n,
  output logic [W/2-1:0]    drive_s,
  output logic [CW-1:0]     cnt,
  output logic              last,
  output logic              err
);

  localparam int unsigned T = W / 2;

  function automatic bit exists(int unsigned d);
    case (d)
      0: return XPOS < NX;
      1: return XPOS > 0;
      2: return YPOS < NY;
      default: return YPOS > 0;
    endcase
  endfunction

  function automatic bit starts(int unsigned d, int unsigned t);
    int unsigned p;
    bit edge_pos;
    p = (d < 2) ? XPOS : YPOS;
    case (d)
      0: edge_pos = (XPOS == 0);
      1: edge_pos = (XPOS == NX);
      2: edge_pos = (YPOS == 0);
      default: edge_pos = (YPOS == NY);
    endcase
    return exists(d) && (edge_pos || ((p + t) % L == 0));
  endfunction

  function automatic bit is_tm(int unsigned t);
    return t < TM_TRACKS;
  endfunction

  mc_counter #(.K(K), .CW(CW)) u_cnt (.clk_f, .rst, .cnt, .last);

  logic [T-1:0] from_dir [4];   // straight source for each output direction
  logic [T-1:0] turn_a   [4];   // source of in1 (track t+1)
  logic [T-1:0] turn_b   [4];   // source of in2 (track t-1)
  logic [T-1:0] drive    [4];
  logic [4*T-1:0] sw_err;

  assign from_dir[0] = from_w;  assign turn_a[0] = from_s;  assign turn_b[0] = from_n;
  assign from_dir[1] = from_e;  assign turn_a[1] = from_n;  assign turn_b[1] = from_s;
  assign from_dir[2] = from_s;  assign turn_a[2] = from_e;  assign turn_b[2] = from_w;
  assign from_dir[3] = from_n;  assign turn_a[3] = from_w;  assign turn_b[3] = from_e;

  wire cfg_hit = cfg.we && cfg.target == CFG_SB &&
                 cfg.x == CFG_XY_W'(XPOS) && cfg.y == CFG_XY_W'(YPOS);

  for (genvar d = 0; d < 4; d++) begin : g_dir
    for (genvar t = 0; t < T; t++) begin : g_trk
      localparam int unsigned TA = (t + 1) % T;
      localparam int unsigned TB = (t + T - 1) % T;
      if (starts(d, t)) begin : g_mux
        localparam bit TM = is_tm(t) || is_tm(TA) || is_tm(TB);
        route_switch #(.K(K), .NC(2), .NR(2), .IS_TM(TM), .CW(CW)) u_sw (
          .clk_f, .rst, .sel(cnt),
          .cfg_we(cfg_hit && cfg.idx == CFG_IDX_W'(d * T + t)),
          .cfg_ctx(cfg.ctx[CW-1:0]),
          .cfg_word(cfg.data[4:0]),
          .in({lb_pins[t % N_BLE], turn_b[d][TB], turn_a[d][TA], from_dir[d][t]}),
          .out(drive[d][t]),
          .err(sw_err[d*T+t])
        );
      end else if (exists(d)) begin : g_pass
        assign drive[d][t]    = from_dir[d][t];
        assign sw_err[d*T+t]  = 1'b0;
      end else begin : g_none
        assign drive[d][t]    = 1'b0;
        assign sw_err[d*T+t]  = 1'b0;
      end
    end
  end

  assign drive_e = drive[0];
  assign drive_w = drive[1];
  assign drive_n = drive[2];
  assign drive_s = drive[3];
  assign err     = |sw_err;

endmodule
