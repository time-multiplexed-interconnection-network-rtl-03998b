// tm_pkg: types and constants shared by the time-multiplexed FPGA fabric.
//
// The fabric is an island-style FPGA whose routing wires can be shared by
// several nets inside one user clock cycle. A user cycle is split into K
// microcycles; every routing switch holds one configuration context per
// microcycle and steps through them with a circular counter.
//
// Configuration memory is written through one word-wide write port (cfg_t)
// that reaches every switch block, connection block and logic block. A write
// selects a site (x, y), a target kind, an item index inside the site and a
// context (microcycle) number. The write port itself is this design's own
// choice: the architecture only requires that every memory cell can be set.
package tm_pkg;

  // Architecture defaults (baseline architecture with time-multiplexed wires).
  localparam int unsigned DEF_K        = 4;   // microcycles per user cycle
  localparam int unsigned DEF_LUT_K    = 4;   // LUT size
  localparam int unsigned DEF_N_BLE    = 10;  // BLEs per logic block
  localparam int unsigned DEF_N_LB_IN  = 22;  // logic block inputs
  localparam int unsigned DEF_L_SEG    = 4;   // wire segment length (logic blocks)
  localparam int unsigned DEF_W        = 48;  // channel width (tracks, both directions)

  // Configuration write port.
  localparam int unsigned CFG_XY_W  = 8;
  localparam int unsigned CFG_IDX_W = 8;
  localparam int unsigned CFG_CTX_W = 4;
  localparam int unsigned CFG_DW    = 24;

  typedef enum logic [1:0] {
    CFG_SB  = 2'd0,   // switch block routing mux
    CFG_CB  = 2'd1,   // connection block input-pin mux
    CFG_LB  = 2'd2    // logic block (LUT mask or BLE control word)
  } cfg_target_e;

  typedef struct packed {
    logic                  we;
    cfg_target_e           target;
    logic [CFG_XY_W-1:0]   x;
    logic [CFG_XY_W-1:0]   y;
    logic [CFG_IDX_W-1:0]  idx;
    logic [CFG_CTX_W-1:0]  ctx;
    logic [CFG_DW-1:0]     data;
  } cfg_t;

  // Wire directions at a switch block; also the SB item index is dir*T + track.
  typedef enum logic [1:0] {
    DIR_E = 2'd0,
    DIR_W = 2'd1,
    DIR_N = 2'd2,
    DIR_S = 2'd3
  } dir_e;

endpackage
