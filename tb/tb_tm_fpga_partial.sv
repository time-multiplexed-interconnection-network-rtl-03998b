// tb_tm_fpga_partial: the partially populated fabric, where only tracks
// 0..11 of the 24 per direction are time-multiplexed (population 0.5), on a
// 2x2 array. It checks the rule for choosing switches:
//  - track 18 (conventional, and its turn sources 17/19 conventional) gets a
//    one-context switch: whatever context is written, it keeps one selection
//    in every microcycle (the last written);
//  - track 5 (multiplex-able) changes its selection per microcycle;
//  - track 12 is conventional but can select track 11, which is
//    multiplex-able, so it must get a TM switch and change per microcycle.
// Each case is counted; a case that never showed its behaviour fails.
module tb_tm_fpga_partial;
  import tm_pkg::*;
  localparam int T = 24;
  localparam int NX = 2, NY = 2;
  logic clk_f = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk_f = ~clk_f;

  cfg_t cfg;
  logic [T-1:0] pin_w [NY+1], pin_e [NY+1], pin_s [NX+1], pin_n [NX+1];
  logic [T-1:0] pout_w [NY+1], pout_e [NY+1], pout_s [NX+1], pout_n [NX+1];
  logic [1:0]   mcycle;
  logic         ucyc_end, err;

  tm_fpga #(.NX(NX), .NY(NY), .TM_TRACKS(12)) dut (
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

  function automatic logic [23:0] sb_word(int m);
    return 24'((1 << (m % 2)) | (1 << (2 + m / 2)));
  endfunction

  initial begin
    int n_conv, n_tm, n_mixed;
    cfg = '0;
    for (int j = 0; j <= NY; j++) begin pin_e[j] = '0; pin_w[j] = '0; end
    for (int i = 0; i <= NX; i++) begin pin_n[i] = '0; pin_s[i] = '0; end
    repeat (2) @(negedge clk_f);
    rst = 0;
    // LB(0,0) BLE2 = constant 1 (drives logic-block input of tracks 2, 12, 22).
    write(CFG_LB, 0, 0, 4, 0, 24'hFFFF);
    // Track 18: straight in context 0, then logic block (BLE8 = 0) in context 1.
    write(CFG_SB, 0, 0, 18, 0, sb_word(0));
    write(CFG_SB, 0, 0, 18, 1, sb_word(3));
    // Track 5: straight in context 0, turn (pad_in_s[0][6]) in contexts 1..3.
    write(CFG_SB, 0, 0, 5, 0, sb_word(0));
    for (int k = 1; k < 4; k++) write(CFG_SB, 0, 0, 5, k, sb_word(1));
    // Track 12: straight in context 0, logic block (constant 1) afterwards.
    write(CFG_SB, 0, 0, 12, 0, sb_word(0));
    for (int k = 1; k < 4; k++) write(CFG_SB, 0, 0, 12, k, sb_word(3));

    n_conv = 0; n_tm = 0; n_mixed = 0;
    while (mcycle != 0) @(negedge clk_f);
    for (int c = 0; c < 12; c++) begin
      for (int k = 0; k < 4; k++) begin
        pin_w[0] = T'($urandom); pin_s[0] = T'($urandom);
        #1;
        checks++;
        if (pout_e[0][18] != 1'b0) begin
          failures++; $display("track 18 mc%0d: %0b, expected the one stored selection (0)", k + 1, pout_e[0][18]);
        end else if (pin_w[0][18]) n_conv++;   // a context-0 TM switch would have passed 1
        checks++;
        if (pout_e[0][5] != ((k == 0) ? pin_w[0][5] : pin_s[0][6])) begin
          failures++; $display("track 5 mc%0d wrong", k + 1);
        end else if (pin_w[0][5] != pin_s[0][6]) n_tm++;
        checks++;
        if (pout_e[0][12] != ((k == 0) ? pin_w[0][12] : 1'b1)) begin
          failures++; $display("track 12 mc%0d wrong", k + 1);
        end else if (k == 0 && !pin_w[0][12]) n_mixed++;
        checks++;
        if (err) begin failures++; $display("short reported"); end
        @(negedge clk_f);
      end
    end
    $display("cases: conventional fixed=%0d multiplex-able switching=%0d mixed TM=%0d", n_conv, n_tm, n_mixed);
    if (n_conv == 0)  begin failures++; $display("conventional case not seen"); end
    if (n_tm == 0)    begin failures++; $display("TM case not seen"); end
    if (n_mixed == 0) begin failures++; $display("mixed case not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
