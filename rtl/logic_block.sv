// logic_block: cluster of N_BLE basic logic elements with a full local
// crossbar.
//
// Each BLE input picks one of the N_LB_IN logic block inputs or one of the
// N_BLE BLE outputs (feedback), N_LB_IN+N_BLE sources in all; the BLE
// outputs are the logic block outputs. Logic blocks are not time-multiplexed:
// they see the routing only through the latching connection-block switches,
// and their flip-flops advance once per user cycle (ucyc_en).
//
// Configuration (target CFG_LB): item 2b = LUT mask of BLE b (low 2**LUT_K
// data bits); item 2b+1 = BLE control word: bits [SW*LUT_K-1:0] hold the
// LUT_K source numbers (SW bits each, input 0 lowest; number s < N_LB_IN is
// input s, otherwise BLE output s-N_LB_IN), bit SW*LUT_K is ff_sel. All
// configuration clears on rst (mask 0: constant-0 LUTs); the outputs are
// forced to 0 while rst is high.
//
// Sizes (4-LUTs, 10 BLEs, 22 inputs) follow the baseline architecture; the
// crossbar, the item layout and the feedback path are this design's choices.
// A configuration that feeds a combinational BLE output back to its own
// input closes a combinational loop; none is closed after reset.
module logic_block
  import tm_pkg::*;
#(
  parameter int unsigned LUT_K   = DEF_LUT_K,
  parameter int unsigned N_BLE   = DEF_N_BLE,
  parameter int unsigned N_LB_IN = DEF_N_LB_IN,
  parameter int unsigned XPOS    = 0,
  parameter int unsigned YPOS    = 0
) (
  input  logic                clk_f,
  input  logic                rst,
  input  logic                ucyc_en,
  input  cfg_t                cfg,
  input  logic [N_LB_IN-1:0]  in,
  output logic [N_BLE-1:0]    out
);

  localparam int unsigned NSRC = N_LB_IN + N_BLE;
  localparam int unsigned SW   = $clog2(NSRC);

  logic [N_BLE-1:0] ble_out;
  logic [NSRC-1:0]  src;

  // Outputs are held low during reset, so no loop through a LUT can
  // oscillate while the configuration memory still holds power-up values.
  assign out = rst ? '0 : ble_out;
  assign src = {out, in};

  wire cfg_hit = cfg.we && cfg.target == CFG_LB &&
                 cfg.x == CFG_XY_W'(XPOS) && cfg.y == CFG_XY_W'(YPOS);

  for (genvar b = 0; b < N_BLE; b++) begin : g_ble
    logic [2**LUT_K-1:0] mask;
    logic [SW*LUT_K-1:0] xsel;
    logic                ff_sel;
    logic [LUT_K-1:0]    bin;

    always_ff @(posedge clk_f) begin
      if (rst) begin
        mask   <= '0;
        xsel   <= '0;
        ff_sel <= 1'b0;
      end else if (cfg_hit && cfg.idx == CFG_IDX_W'(2*b)) begin
        mask   <= cfg.data[2**LUT_K-1:0];
      end else if (cfg_hit && cfg.idx == CFG_IDX_W'(2*b+1)) begin
        xsel   <= cfg.data[SW*LUT_K-1:0];
        ff_sel <= cfg.data[SW*LUT_K];
      end
    end

    for (genvar i = 0; i < LUT_K; i++) begin : g_in
      logic [SW-1:0] s;
      assign s      = xsel[i*SW +: SW];
      assign bin[i] = (32'(s) < NSRC) ? src[s] : 1'b0;
    end

    ble #(.LUT_K(LUT_K)) u_ble (
      .clk_f, .rst, .ucyc_en, .mask, .ff_sel, .in(bin), .out(ble_out[b])
    );
  end

endmodule
