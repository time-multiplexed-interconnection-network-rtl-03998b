// tm_fpga_k_env: self-running test environment for a 2x2 time-multiplexed
// FPGA with K microcycles per user cycle (K >= 2), used by tb_tm_fpga_k.
//
// Up to three nets share one eastbound wire w1 (track 0 from SB(0,0)):
//   microcycle 1: net A from input pad pad_in_w[0][0];
//   microcycle 2: net B from input pad pad_in_s[0][1] (a turn);
//   microcycle 3 (K >= 3): net C = NOT A, computed by logic block (0,0) from
//   its pin 0, which took A from w1 in microcycle 1 and latched it.
// After its last net the wire's switch latches. Logic block (1,0) takes B on
// pin 0 in microcycle 2 and C on pin 6 in microcycle 3, and passes both to
// north-edge pads; logic block (0,0) passes its pin 0 to a north pad too.
// Every microcycle the wire and the three pins are compared with the values
// the nets must have. done rises when the run is over; checks/failures count
// the comparisons; nets_shared counts user cycles in which the wire carried
// min(K,3) nets with at least two different values.
module tm_fpga_k_env
  import tm_pkg::*;
#(
  parameter int unsigned K = 2
) (
  input  logic clk_f,
  output logic done,
  output int   checks,
  output int   failures,
  output int   nets_shared
);
  localparam int T = 24;
  localparam int NX = 2, NY = 2;
  localparam int CW = $clog2(K);

  logic rst;
  cfg_t cfg;
  logic [T-1:0] pin_w [NY+1], pin_e [NY+1], pin_s [NX+1], pin_n [NX+1];
  logic [T-1:0] pout_w [NY+1], pout_e [NY+1], pout_s [NX+1], pout_n [NX+1];
  logic [CW-1:0] mcycle;
  logic          ucyc_end, err;

  tm_fpga #(.K(K), .NX(NX), .NY(NY)) dut (
    .clk_f, .rst, .cfg,
    .pad_in_w(pin_w), .pad_in_e(pin_e), .pad_in_s(pin_s), .pad_in_n(pin_n),
    .pad_out_w(pout_w), .pad_out_e(pout_e), .pad_out_s(pout_s), .pad_out_n(pout_n),
    .mcycle, .ucyc_end, .err);

  task automatic write(cfg_target_e tgt, int x, int y, int idx, int ctx, logic [23:0] d);
    cfg = '0;
    cfg.we = 1'b1; cfg.target = tgt; cfg.x = 8'(x); cfg.y = 8'(y);
    cfg.idx = 8'(idx); cfg.ctx = 4'(ctx); cfg.data = d;
    @(negedge clk_f);
    cfg = '0;
  endtask

  function automatic logic [23:0] sb_word(int m);
    if (m == 4) return 24'b10000;
    return 24'((1 << (m % 2)) | (1 << (2 + m / 2)));
  endfunction
  function automatic logic [23:0] cb_word(int m);
    if (m == 8) return 24'b1000000;
    return 24'((1 << (m % 4)) | (1 << (4 + m / 4)));
  endfunction

  task automatic check(bit cond, string what, int c, int k);
    checks++;
    if (!cond) begin
      failures++;
      $display("K=%0d cycle %0d microcycle %0d: %s", K, c, k + 1, what);
    end
  endtask

  initial begin
    logic a, b, a_prev, b_prev, exp_wire;
    bit primed;
    done = 0; checks = 0; failures = 0; nets_shared = 0;
    rst = 1; cfg = '0;
    for (int j = 0; j <= NY; j++) begin pin_e[j] = '0; pin_w[j] = '0; end
    for (int i = 0; i <= NX; i++) begin pin_n[i] = '0; pin_s[i] = '0; end
    repeat (2) @(negedge clk_f);
    rst = 0;
    // Wire w1 contexts.
    for (int k = 0; k < int'(K); k++)
      write(CFG_SB, 0, 0, 0, k, sb_word(k == 0 ? 0 : k == 1 ? 1 : k == 2 ? 3 : 4));
    // Pins.
    for (int k = 0; k < int'(K); k++) begin
      write(CFG_CB, 0, 0, 0, k, cb_word(k == 0 ? 0 : 8));
      write(CFG_CB, 1, 0, 0, k, cb_word(k == 1 ? 0 : 8));
      write(CFG_CB, 1, 0, 6, k, cb_word(k == 2 ? 7 : 8));
    end
    // LB(0,0): BLE0 = NOT pin0 (net C), BLE2 = pin0.
    write(CFG_LB, 0, 0, 0, 0, 24'h5555);
    write(CFG_LB, 0, 0, 1, 0, 24'h0);
    write(CFG_LB, 0, 0, 4, 0, 24'hAAAA);
    write(CFG_LB, 0, 0, 5, 0, 24'h0);
    // LB(1,0): BLE0 = pin0, BLE1 = pin6.
    write(CFG_LB, 1, 0, 0, 0, 24'hAAAA);
    write(CFG_LB, 1, 0, 1, 0, 24'h0);
    write(CFG_LB, 1, 0, 2, 0, 24'hAAAA);
    write(CFG_LB, 1, 0, 3, 0, {3'b0, 1'b0, 5'd6, 5'd6, 5'd6, 5'd6});
    // Outputs north: SB(0,0) track 2 (BLE2), SB(1,0) tracks 0 and 1.
    for (int k = 0; k < int'(K); k++) begin
      write(CFG_SB, 0, 0, 2 * T + 2, k, sb_word(3));
      write(CFG_SB, 1, 0, 2 * T + 0, k, sb_word(3));
      write(CFG_SB, 1, 0, 2 * T + 1, k, sb_word(3));
    end

    primed = 0; a_prev = 0; b_prev = 0;
    while (mcycle != 0) @(negedge clk_f);
    for (int c = 0; c < 24; c++) begin
      a = 1'($urandom); b = (c % 2 == 0) ? a : ~a;
      pin_w[0][0] = a; pin_s[0][1] = b;
      for (int k = 0; k < int'(K); k++) begin
        #1;
        check(mcycle == CW'(k), "counter", c, k);
        exp_wire = (k == 0) ? a : (k == 1 || K == 2) ? b : ~a;
        check(pout_e[0][0] == exp_wire, "shared wire", c, k);
        check(pout_n[0][2] == a, "LB(0,0) pin 0", c, k);
        if (primed || k >= 1)
          check(pout_n[1][0] == ((k >= 1) ? b : b_prev), "LB(1,0) pin 0", c, k);
        if (K >= 3 && (primed || k >= 2))
          check(pout_n[1][1] == ((k >= 2) ? ~a : ~a_prev), "LB(1,0) pin 6", c, k);
        check(!err, "short", c, k);
        @(negedge clk_f);
      end
      if (a != b || K >= 3) nets_shared++;
      a_prev = a; b_prev = b; primed = 1;
    end
    done = 1;
  end
endmodule
