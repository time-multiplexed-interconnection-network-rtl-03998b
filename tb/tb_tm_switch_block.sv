// tb_tm_switch_block: checks the switch block at an interior position (1,1)
// of a 4x4 array with every track time-multiplexed, and at the corner (0,0)
// with only tracks 0..11 of each direction time-multiplexed.
//  - After reset every multiplexer is off: with all incoming wires at 1 the
//    tracks that start here read 0. An interior block must start W/2/L = 6
//    tracks per direction; the corner block starts all 24 eastbound and
//    northbound tracks and drives nothing west or south.
//  - Random multiplexers get a different input (or the latch) in each of the
//    K=4 contexts; with random inputs every microcycle the driven wire must
//    match a model of the straight/turn/logic-block input pattern.
//  - Non-starting tracks pass the incoming wire straight through.
//  - A conventional track's switch keeps one selection for all microcycles.
//  - Two inputs selected at once raise err.
module tb_tm_switch_block;
  import tm_pkg::*;
  localparam int T = 24;
  logic clk_f = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk_f = ~clk_f;

  cfg_t cfg;
  logic [T-1:0] fw, fe, fs, fn;
  logic [9:0]   pins;
  logic [T-1:0] a_e, a_w, a_n, a_s, b_e, b_w, b_n, b_s;
  logic [1:0]   a_cnt, b_cnt;
  logic         a_last, b_last, a_err, b_err;

  tm_switch_block #(.XPOS(1), .YPOS(1)) dut_a (
    .clk_f, .rst, .cfg, .from_w(fw), .from_e(fe), .from_s(fs), .from_n(fn), .lb_pins(pins),
    .drive_e(a_e), .drive_w(a_w), .drive_n(a_n), .drive_s(a_s),
    .cnt(a_cnt), .last(a_last), .err(a_err));
  tm_switch_block #(.XPOS(0), .YPOS(0), .TM_TRACKS(12)) dut_b (
    .clk_f, .rst, .cfg, .from_w(fw), .from_e(fe), .from_s(fs), .from_n(fn), .lb_pins(pins),
    .drive_e(b_e), .drive_w(b_w), .drive_n(b_n), .drive_s(b_s),
    .cnt(b_cnt), .last(b_last), .err(b_err));

  initial begin
    repeat (50000) @(posedge clk_f);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [T-1:0] drv(bit b, int d);
    case (d)
      0: return b ? b_e : a_e;
      1: return b ? b_w : a_w;
      2: return b ? b_n : a_n;
      default: return b ? b_s : a_s;
    endcase
  endfunction

  // Value of mux input m for direction d, track t.
  function automatic logic src(int d, int t, int m);
    logic [T-1:0] st, ta, tb;
    case (d)
      0: begin st = fw; ta = fs; tb = fn; end
      1: begin st = fe; ta = fn; tb = fs; end
      2: begin st = fs; ta = fe; tb = fw; end
      default: begin st = fn; ta = fw; tb = fe; end
    endcase
    case (m)
      0: return st[t];
      1: return ta[(t + 1) % T];
      2: return tb[(t + T - 1) % T];
      default: return pins[t % 10];
    endcase
  endfunction

  function automatic logic [4:0] sel_word(int m);
    if (m == 4) return 5'b10000;                         // latch
    return 5'((1 << (m % 2)) | (1 << (2 + m / 2)));       // column m%2, row m/2
  endfunction

  task automatic write(int x, int y, int idx, int ctx, logic [4:0] w);
    cfg = '0;
    cfg.we = 1'b1; cfg.target = CFG_SB; cfg.x = 8'(x); cfg.y = 8'(y);
    cfg.idx = 8'(idx); cfg.ctx = 4'(ctx); cfg.data = 24'(w);
    @(negedge clk_f);
    cfg = '0;
  endtask

  task automatic randomize_inputs();
    fw = T'($urandom); fe = T'($urandom); fs = T'($urandom); fn = T'($urandom);
    pins = 10'($urandom);
  endtask

  initial begin
    int nstart, d, t, m [4], held, exp_v, tested_tm, tested_pass;
    logic [T-1:0] v;
    cfg = '0; fw = '0; fe = '0; fs = '0; fn = '0; pins = '0;
    repeat (2) @(negedge clk_f);
    rst = 0;
    // Starting tracks after reset.
    fw = '1; fe = '1; fs = '1; fn = '1; pins = '1; #1;
    for (int dd = 0; dd < 4; dd++) begin
      v = drv(0, dd); nstart = T - $countones(v);
      checks++;
      if (nstart != 6) begin failures++; $display("interior dir %0d starts %0d tracks", dd, nstart); end
      v = drv(1, dd); nstart = T - $countones(v);
      checks++;
      if (nstart != T) begin failures++; $display("corner dir %0d: %0d zero tracks", dd, nstart); end
    end
    checks++;
    if (a_err || b_err) begin failures++; $display("err after reset"); end

    tested_tm = 0; tested_pass = 0;
    for (int n = 0; n < 120; n++) begin
      d = $urandom_range(3); t = $urandom_range(T - 1);
      if (((1 + t) % 4) != 0) begin
        // Pass-through on the interior block.
        randomize_inputs(); #1;
        checks++; tested_pass++;
        if (drv(0, d)[t] != src(d, t, 0)) begin
          failures++; $display("pass-through dir %0d track %0d wrong", d, t);
        end
        @(negedge clk_f);
        continue;
      end
      m[0] = $urandom_range(3);
      for (int k = 1; k < 4; k++) m[k] = $urandom_range(4);
      for (int k = 0; k < 4; k++) write(1, 1, d * T + t, k, sel_word(m[k]));
      while (a_cnt != 0) @(negedge clk_f);
      held = 0;
      for (int u = 0; u < 8; u++) begin
        randomize_inputs(); #1;
        exp_v = (m[a_cnt] == 4) ? held : int'(src(d, t, m[a_cnt]));
        checks++; tested_tm++;
        if (drv(0, d)[t] != exp_v[0] || a_err) begin
          failures++;
          $display("dir %0d track %0d microcycle %0d input %0d: got %0b expected %0b",
                   d, t, a_cnt, m[a_cnt], drv(0, d)[t], exp_v[0]);
        end
        held = exp_v;
        @(negedge clk_f);
        checks++;
        if (a_cnt != 2'((u + 1) % 4)) begin failures++; $display("counter out of step"); end
      end
      // Switch the multiplexer off again.
      for (int k = 0; k < 4; k++) write(1, 1, d * T + t, k, 5'b0);
    end
    checks++;
    if (tested_tm < 20 || tested_pass < 20) begin failures++; $display("too few cases"); end

    // Conventional track 18 eastbound at the corner: last write wins, for all microcycles.
    write(0, 0, 18, 0, sel_word(0));
    write(0, 0, 18, 1, sel_word(3));
    // TM track 5 eastbound at the corner: straight in context 0, logic block in the others.
    write(0, 0, 5, 0, sel_word(0));
    for (int k = 1; k < 4; k++) write(0, 0, 5, k, sel_word(3));
    for (int u = 0; u < 8; u++) begin
      randomize_inputs(); #1;
      checks++;
      if (b_e[18] != pins[18 % 10]) begin failures++; $display("conventional switch changed selection"); end
      checks++;
      if (b_e[5] != ((b_cnt == 0) ? fw[5] : pins[5])) begin
        failures++; $display("TM switch at corner wrong in microcycle %0d", b_cnt);
      end
      @(negedge clk_f);
    end
    // Short two inputs.
    write(1, 1, 0 * T + 3, 0, 5'b00111);
    while (a_cnt != 0) @(negedge clk_f);
    #1; checks++;
    if (!a_err) begin failures++; $display("short not reported"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
