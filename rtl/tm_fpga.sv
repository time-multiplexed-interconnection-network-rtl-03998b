// tm_fpga: island-style FPGA whose routing wires are time-multiplexed.
//
// An NX x NY array of logic blocks sits between horizontal and vertical
// routing channels of W uni-directional tracks (W/2 per direction). One user
// clock cycle is divided into K microcycles, counted on the fast clock clk_f
// (K times the user clock). Every routing switch is a TM switch with one
// configuration context per microcycle, so a wire can carry different nets in
// different microcycles of the same user cycle; a TM switch that turns off
// keeps driving the last value it passed, so a net's value stays on the wires
// and pins it has reached until the user clock edge. Logic blocks are not
// time-multiplexed: their flip-flops load once per user cycle, on the clk_f
// edge that ends the last microcycle.
//
// Layout: switch block SB(i,j), i in 0..NX, j in 0..NY, sits at the lower
// left corner of logic block LB(i,j). Horizontal segment (i,j) runs from
// SB(i,j) to SB(i+1,j) below LB(i,j); vertical segment (i,j) runs from SB(i,j)
// to SB(i,j+1) left of LB(i,j). LB(i,j) reads its pins from those two
// segments through its connection block and drives the multiplexers of
// SB(i,j). Tracks TM_TRACKS..W/2-1 of each direction are conventional tracks
// (partially populated fabric); the default makes every track
// time-multiplexed.
//
// Edges: a wire that would arrive at an edge switch block from outside the
// array is an input pad (pad_in_<side>), and every wire that leaves the array
// at an edge is an output pad (pad_out_<side>); pad_in_w[j] feeds the
// eastbound tracks at SB(0,j), pad_out_e[j] shows the eastbound tracks that
// end at SB(NX,j), and so on. This perimeter I/O is this design's own choice.
//
// Configuration: cfg (tm_pkg::cfg_t) writes one configuration word per clock;
// see tm_switch_block, tm_connection_block and logic_block for item numbers.
// Everything clears on rst (all switches off, all LUTs 0).
// Status: mcycle is the microcycle counter (0..K-1), ucyc_end is high in the
// last microcycle, err is high while any switch shorts two drivers.
//
// The routing fabric contains structural combinational loops (routes around
// a logic block, logic block feedback); the lint tools report them. A loop
// closes only if the configuration programs a net in a ring.
module tm_fpga
  import tm_pkg::*;
#(
  parameter int unsigned K         = DEF_K,
  parameter int unsigned W         = DEF_W,
  parameter int unsigned L         = DEF_L_SEG,
  parameter int unsigned LUT_K     = DEF_LUT_K,
  parameter int unsigned N_BLE     = DEF_N_BLE,
  parameter int unsigned N_LB_IN   = DEF_N_LB_IN,
  parameter int unsigned NX        = 4,
  parameter int unsigned NY        = 4,
  parameter int unsigned TM_TRACKS = W / 2,
  parameter int unsigned CW        = (K > 1) ? $clog2(K) : 1
) (
  input  logic              clk_f,
  input  logic              rst,
  input  cfg_t              cfg,
  input  logic [W/2-1:0]    pad_in_w  [NY+1],
  input  logic [W/2-1:0]    pad_in_e  [NY+1],
  input  logic [W/2-1:0]    pad_in_s  [NX+1],
  input  logic [W/2-1:0]    pad_in_n  [NX+1],
  output logic [W/2-1:0]    pad_out_w [NY+1],
  output logic [W/2-1:0]    pad_out_e [NY+1],
  output logic [W/2-1:0]    pad_out_s [NX+1],
  output logic [W/2-1:0]    pad_out_n [NX+1],
  output logic [CW-1:0]     mcycle,
  output logic              ucyc_end,
  output logic              err
);

  localparam int unsigned T = W / 2;

  // Routing segments.
  logic [T-1:0] h_e [NX][NY+1];
  logic [T-1:0] h_w [NX][NY+1];
  logic [T-1:0] v_n [NX+1][NY];
  logic [T-1:0] v_s [NX+1][NY];

  logic [CW-1:0]      sb_cnt  [NX+1][NY+1];
  logic               sb_last [NX+1][NY+1];
  logic               sb_err  [NX+1][NY+1];
  logic [N_BLE-1:0]   lb_out  [NX][NY];
  logic               cb_err  [NX][NY];

  for (genvar i = 0; i <= NX; i++) begin : g_sbx
    for (genvar j = 0; j <= NY; j++) begin : g_sby
      logic [T-1:0] fw, fe, fs, fn, de, dw, dn, ds;

      if (i > 0)  begin : g_fw assign fw = h_e[i-1][j]; end
      else        begin : g_pw assign fw = pad_in_w[j]; end
      if (i < NX) begin : g_fe assign fe = h_w[i][j];   end
      else        begin : g_pe assign fe = pad_in_e[j]; end
      if (j > 0)  begin : g_fs assign fs = v_n[i][j-1]; end
      else        begin : g_ps assign fs = pad_in_s[i]; end
      if (j < NY) begin : g_fn assign fn = v_s[i][j];   end
      else        begin : g_pn assign fn = pad_in_n[i]; end

      tm_switch_block #(
        .K(K), .W(W), .L(L), .N_BLE(N_BLE), .TM_TRACKS(TM_TRACKS),
        .NX(NX), .NY(NY), .XPOS(i), .YPOS(j), .CW(CW)
      ) u_sb (
        .clk_f, .rst, .cfg,
        .from_w(fw), .from_e(fe), .from_s(fs), .from_n(fn),
        .lb_pins(lb_out[(i < NX) ? i : NX-1][(j < NY) ? j : NY-1]),
        .drive_e(de), .drive_w(dw), .drive_n(dn), .drive_s(ds),
        .cnt(sb_cnt[i][j]), .last(sb_last[i][j]), .err(sb_err[i][j])
      );

      if (i < NX) begin : g_de assign h_e[i][j]   = de; end
      if (i > 0)  begin : g_dw assign h_w[i-1][j] = dw; end
      if (j < NY) begin : g_dn assign v_n[i][j]   = dn; end
      if (j > 0)  begin : g_ds assign v_s[i][j-1] = ds; end
    end
  end

  for (genvar i = 0; i < NX; i++) begin : g_lbx
    for (genvar j = 0; j < NY; j++) begin : g_lby
      logic [N_LB_IN-1:0] pins;

      tm_connection_block #(
        .K(K), .W(W), .N_LB_IN(N_LB_IN), .TM_TRACKS(TM_TRACKS),
        .XPOS(i), .YPOS(j), .CW(CW)
      ) u_cb (
        .clk_f, .rst, .sel(sb_cnt[i][j]), .cfg,
        .chan_h({h_w[i][j], h_e[i][j]}),
        .chan_v({v_s[i][j], v_n[i][j]}),
        .lb_in(pins), .err(cb_err[i][j])
      );

      logic_block #(
        .LUT_K(LUT_K), .N_BLE(N_BLE), .N_LB_IN(N_LB_IN), .XPOS(i), .YPOS(j)
      ) u_lb (
        .clk_f, .rst, .ucyc_en(sb_last[i][j]), .cfg, .in(pins), .out(lb_out[i][j])
      );
    end
  end

  for (genvar j = 0; j <= NY; j++) begin : g_pad_h
    assign pad_out_e[j] = h_e[NX-1][j];
    assign pad_out_w[j] = h_w[0][j];
  end
  for (genvar i = 0; i <= NX; i++) begin : g_pad_v
    assign pad_out_n[i] = v_n[i][NY-1];
    assign pad_out_s[i] = v_s[i][0];
  end

  assign mcycle   = sb_cnt[0][0];
  assign ucyc_end = sb_last[0][0];

  always_comb begin
    err = 1'b0;
    for (int i = 0; i <= int'(NX); i++)
      for (int j = 0; j <= int'(NY); j++)
        err |= sb_err[i][j];
    for (int i = 0; i < int'(NX); i++)
      for (int j = 0; j < int'(NY); j++)
        err |= cb_err[i][j];
  end

endmodule
