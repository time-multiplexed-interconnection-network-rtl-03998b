// tb_tm_connection_block: checks the connection block with default sizes
// (W=48, 22 pins, 8-input pin multiplexers, K=4).
//  - Random pins get a different track (or the latch) per microcycle; with
//    random channel values each microcycle the pin must match a model of the
//    track pattern (q + m*6) mod 48, pins 0..10 on the horizontal channel and
//    11..21 on the vertical one.
//  - The case that motivates latching: a pin takes a shared wire in
//    microcycle 1 only and must still show that value in microcycles 2..4
//    while the wire carries another net.
module tb_tm_connection_block;
  import tm_pkg::*;
  localparam int W = 48;
  logic clk_f = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk_f = ~clk_f;

  cfg_t cfg;
  logic [1:0]  sel;
  logic        last;
  logic [W-1:0] ch, cv;
  logic [21:0] pins;
  logic        err;

  mc_counter #(.K(4)) u_cnt (.clk_f, .rst, .cnt(sel), .last(last));
  tm_connection_block #(.XPOS(2), .YPOS(3)) dut (
    .clk_f, .rst, .sel, .cfg, .chan_h(ch), .chan_v(cv), .lb_in(pins), .err);

  initial begin
    repeat (50000) @(posedge clk_f);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic tap(int p, int m);
    int q;
    q = (p < 11) ? p : p - 11;
    return (p < 11) ? ch[(q + m * 6) % W] : cv[(q + m * 6) % W];
  endfunction

  function automatic logic [6:0] sel_word(int m);
    if (m == 8) return 7'b1000000;
    return 7'((1 << (m % 4)) | (1 << (4 + m / 4)));
  endfunction

  task automatic write(int x, int y, int idx, int ctx, logic [6:0] w);
    cfg = '0;
    cfg.we = 1'b1; cfg.target = CFG_CB; cfg.x = 8'(x); cfg.y = 8'(y);
    cfg.idx = 8'(idx); cfg.ctx = 4'(ctx); cfg.data = 24'(w);
    @(negedge clk_f);
    cfg = '0;
  endtask

  initial begin
    int p, m [4], held, exp_v, latched_checks;
    cfg = '0; ch = '0; cv = '0;
    repeat (2) @(negedge clk_f);
    rst = 0;
    ch = '1; cv = '1; #1;
    checks++;
    if (pins != '0 || err) begin failures++; $display("pins driven after reset"); end
    // Writes to another site must not land here.
    write(2, 2, 0, 0, sel_word(0));
    #1; checks++;
    if (pins[0]) begin failures++; $display("write to another site taken"); end
    for (int n = 0; n < 100; n++) begin
      p = $urandom_range(21);
      m[0] = $urandom_range(7);
      for (int k = 1; k < 4; k++) m[k] = $urandom_range(8);
      for (int k = 0; k < 4; k++) write(2, 3, p, k, sel_word(m[k]));
      while (sel != 0) @(negedge clk_f);
      held = 0;
      for (int u = 0; u < 8; u++) begin
        ch = {$urandom, $urandom}; cv = {$urandom, $urandom}; #1;
        exp_v = (m[sel] == 8) ? held : int'(tap(p, m[sel]));
        checks++;
        if (pins[p] != exp_v[0] || err) begin
          failures++;
          $display("pin %0d microcycle %0d tap %0d: got %0b expected %0b", p, sel, m[sel], pins[p], exp_v[0]);
        end
        held = exp_v;
        @(negedge clk_f);
      end
      for (int k = 0; k < 4; k++) write(2, 3, p, k, 7'b0);
    end
    // Pin 4 reads horizontal track 4 in microcycle 1 only, then latches.
    write(2, 3, 4, 0, sel_word(0));
    for (int k = 1; k < 4; k++) write(2, 3, 4, k, 7'b1000000);
    latched_checks = 0;
    for (int c = 0; c < 6; c++) begin
      while (sel != 0) @(negedge clk_f);
      ch[4] = 1'($urandom); held = ch[4]; #1;
      checks++;
      if (pins[4] != held) begin failures++; $display("pin 4 not passing in microcycle 1"); end
      for (int k = 1; k < 4; k++) begin
        @(negedge clk_f);
        ch[4] = ~ch[4]; #1;   // another net uses the wire now
        checks++; latched_checks++;
        if (pins[4] != held[0]) begin failures++; $display("pin 4 lost its value in microcycle %0d", k + 1); end
      end
      @(negedge clk_f);
    end
    checks++;
    if (latched_checks != 18) begin failures++; $display("latched checks %0d", latched_checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
