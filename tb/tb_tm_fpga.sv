// tb_tm_fpga: end-to-end test of the time-multiplexed FPGA at its default
// size (4x4 logic blocks, W=48, K=4 microcycles, length-4 wires).
//
// It programs the fabric through the configuration port so that two nets
// share one routing wire in different microcycles, as in the classic example
// of two nets N1 and N2 time-multiplexing wire w1:
//   N1: input pad A (west edge, row 0, track 0) -> eastbound wire w1 in
//       microcycle 1 -> pin 0 of logic block (0,0), latched for the rest of
//       the user cycle.
//   N2: input pad B (south edge, column 0, track 1) turns onto the same wire
//       w1 in microcycle 2 -> pin 0 of logic block (1,0).
//   In microcycles 3-4 the switch at the start of w1 latches and keeps
//   driving the wire.
// Logic block (0,0) passes pin 0 straight to an output (BLE0) and registers
// its inverse (BLE1); logic block (1,0) passes its pin 0 out. The outputs
// leave on northbound wires to the north edge, BLE1's through a second
// switch block where its length-4 wire ends.
//
// Each microcycle it checks the shared wire (seen at the east edge), the two
// pins (seen through the pass-through BLEs), the registered output (it must
// change only at user clock edges, one user cycle late) and that no switch
// reports a short. It counts how often each mechanism happened: wire shared by
// two different values in one user cycle, pin latch holding while the wire
// carries the other net, switch-block latch driving the wire, user-cycle
// register load, microcycle counter wrap, and short detection (a
// deliberately shorted switch at the end). A mechanism that never happened
// counts as a failure.
module tb_tm_fpga;
  import tm_pkg::*;
  localparam int T = 24;
  localparam int NX = 4, NY = 4;
  logic clk_f = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk_f = ~clk_f;

  cfg_t cfg;
  logic [T-1:0] pin_w [NY+1], pin_e [NY+1], pin_s [NX+1], pin_n [NX+1];
  logic [T-1:0] pout_w [NY+1], pout_e [NY+1], pout_s [NX+1], pout_n [NX+1];
  logic [1:0]   mcycle;
  logic         ucyc_end, err;

  tm_fpga dut (
    .clk_f, .rst, .cfg,
    .pad_in_w(pin_w), .pad_in_e(pin_e), .pad_in_s(pin_s), .pad_in_n(pin_n),
    .pad_out_w(pout_w), .pad_out_e(pout_e), .pad_out_s(pout_s), .pad_out_n(pout_n),
    .mcycle, .ucyc_end, .err);

  initial begin
    repeat (20000) @(posedge clk_f);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(cfg_target_e tgt, int x, int y, int idx, int ctx, logic [23:0] d);
    cfg = '0;
    cfg.we = 1'b1; cfg.target = tgt; cfg.x = 8'(x); cfg.y = 8'(y);
    cfg.idx = 8'(idx); cfg.ctx = 4'(ctx); cfg.data = d;
    @(negedge clk_f);
    cfg = '0;
  endtask

  // Switch-block word selecting input m (0 straight, 1 turn t+1, 2 turn t-1,
  // 3 logic block pin); 4 = latch.
  function automatic logic [23:0] sb_word(int m);
    if (m == 4) return 24'b10000;
    return 24'((1 << (m % 2)) | (1 << (2 + m / 2)));
  endfunction
  // Connection-block word selecting tap m (0..7); 8 = latch.
  function automatic logic [23:0] cb_word(int m);
    if (m == 8) return 24'b1000000;
    return 24'((1 << (m % 4)) | (1 << (4 + m / 4)));
  endfunction

  logic a, b;   // sources of nets N1 (pin_w[0][0]) and N2 (pin_s[0][1])

  initial begin
    int n_share, n_pin_latch, n_sb_latch, n_reg_load, n_wrap, n_short;
    logic a_prev, b_prev, reg_exp, reg_prev;
    bit   primed;
    cfg = '0; a = 0; b = 0;
    for (int j = 0; j <= NY; j++) begin pin_e[j] = '0; pin_w[j] = '0; end
    for (int i = 0; i <= NX; i++) begin pin_n[i] = '0; pin_s[i] = '0; end
    repeat (2) @(negedge clk_f);
    rst = 0;

    // Wire w1 = eastbound track 0 starting at SB(0,0): A in mc1, B in mc2, latch after.
    write(CFG_SB, 0, 0, 0 * T + 0, 0, sb_word(0));
    write(CFG_SB, 0, 0, 0 * T + 0, 1, sb_word(1));
    write(CFG_SB, 0, 0, 0 * T + 0, 2, sb_word(4));
    write(CFG_SB, 0, 0, 0 * T + 0, 3, sb_word(4));
    // LB(0,0) pin 0 takes w1 in mc1 and latches; LB(1,0) pin 0 takes it in mc2.
    for (int k = 0; k < 4; k++) begin
      write(CFG_CB, 0, 0, 0, k, cb_word(k == 0 ? 0 : 8));
      write(CFG_CB, 1, 0, 0, k, cb_word(k == 1 ? 0 : 8));
    end
    // LB(0,0): BLE0 = pin0 (combinational), BLE1 = NOT pin0 (registered).
    write(CFG_LB, 0, 0, 0, 0, 24'hAAAA);
    write(CFG_LB, 0, 0, 1, 0, 24'h0);
    write(CFG_LB, 0, 0, 2, 0, 24'h5555);
    write(CFG_LB, 0, 0, 3, 0, 24'h100000);
    // LB(1,0): BLE0 = pin0.
    write(CFG_LB, 1, 0, 0, 0, 24'hAAAA);
    write(CFG_LB, 1, 0, 1, 0, 24'h0);
    // Outputs north: track 0 from SB(0,0) and SB(1,0), track 1 from SB(0,0)
    // continued straight at SB(0,3) where its wire ends.
    for (int k = 0; k < 4; k++) begin
      write(CFG_SB, 0, 0, 2 * T + 0, k, sb_word(3));
      write(CFG_SB, 1, 0, 2 * T + 0, k, sb_word(3));
      write(CFG_SB, 0, 0, 2 * T + 1, k, sb_word(3));
      write(CFG_SB, 0, 3, 2 * T + 1, k, sb_word(0));
    end

    n_share = 0; n_pin_latch = 0; n_sb_latch = 0; n_reg_load = 0; n_wrap = 0; n_short = 0;
    primed = 0; a_prev = 0; b_prev = 0; reg_prev = 0;
    while (mcycle != 0) @(negedge clk_f);
    for (int c = 0; c < 40; c++) begin
      // New user cycle: new values on both nets.
      a = 1'($urandom); b = (c % 3 == 0) ? ~a : 1'($urandom);
      pin_w[0][0] = a; pin_s[0][1] = b;
      for (int k = 0; k < 4; k++) begin
        #1;
        checks++;
        if (mcycle != 2'(k)) begin failures++; $display("microcycle %0d, expected %0d", mcycle, k); end
        checks++;
        if (ucyc_end != (k == 3)) begin failures++; $display("ucyc_end wrong"); end
        // Shared wire at the east edge.
        checks++;
        if (pout_e[0][0] != ((k == 0) ? a : b)) begin
          failures++; $display("cycle %0d mc%0d: wire w1=%0b", c, k + 1, pout_e[0][0]);
        end
        if (k >= 2) n_sb_latch++;
        // Pin of LB(0,0): A in every microcycle.
        checks++;
        if (pout_n[0][0] != a) begin
          failures++; $display("cycle %0d mc%0d: LB(0,0) pin=%0b expected %0b", c, k + 1, pout_n[0][0], a);
        end
        if (k > 0 && a != b) n_pin_latch++;
        // Pin of LB(1,0): previous B in mc1, B afterwards.
        if (k > 0 || primed) begin
          checks++;
          if (pout_n[1][0] != ((k == 0) ? b_prev : b)) begin
            failures++; $display("cycle %0d mc%0d: LB(1,0) pin=%0b", c, k + 1, pout_n[1][0]);
          end
          if (k == 0 && b_prev != b) n_pin_latch++;
        end
        // Registered output: NOT of the previous cycle's A, stable all cycle.
        if (primed) begin
          reg_exp = ~a_prev;
          checks++;
          if (pout_n[0][1] != reg_exp) begin
            failures++; $display("cycle %0d mc%0d: register=%0b expected %0b", c, k + 1, pout_n[0][1], reg_exp);
          end
          if (k == 0 && reg_exp != reg_prev) n_reg_load++;
          reg_prev = reg_exp;
        end
        checks++;
        if (err) begin failures++; $display("short reported"); end
        @(negedge clk_f);
      end
      n_wrap++;
      if (a != b) n_share++;
      a_prev = a; b_prev = b; primed = 1;
    end

    // Deliberate short: two inputs of one switch on together.
    write(CFG_SB, 2, 2, 0 * T + 2, 0, 24'b00111);
    while (mcycle != 0) @(negedge clk_f);
    #1; checks++;
    if (!err) begin failures++; $display("short not reported"); end
    else n_short++;

    $display("mechanisms: wire shared=%0d pin latch holds=%0d switch-block latch drives=%0d register loads=%0d user cycles=%0d short detected=%0d",
             n_share, n_pin_latch, n_sb_latch, n_reg_load, n_wrap, n_short);
    if (n_share == 0)     begin failures++; $display("wire sharing never happened"); end
    if (n_pin_latch == 0) begin failures++; $display("pin latch never held"); end
    if (n_sb_latch == 0)  begin failures++; $display("switch-block latch never drove"); end
    if (n_reg_load == 0)  begin failures++; $display("register never changed"); end
    if (n_wrap == 0)      begin failures++; $display("no user cycle"); end
    if (n_short == 0)     begin failures++; $display("short never detected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
