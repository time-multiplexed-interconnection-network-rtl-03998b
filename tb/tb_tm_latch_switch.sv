// tb_tm_latch_switch: checks the latching TM switch.
// Part 1 (K=2) is the architecture's example: the switch drives w3 from w1 on
// in3. Context 1 turns on s1/s3 and s5 (in3 passes); context 2 turns on only
// the feedback transistor s6. In microcycle 2 the output must keep the value
// in3 had at the end of microcycle 1, however in3 changes; it must never be
// reported floating. The same two contexts without s6 must float.
// Part 2 (K=4): random contexts against a model with the feedback register.
module tb_tm_latch_switch;
  logic clk_f = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk_f = ~clk_f;

  logic sel2, last2, we2, ctx2;
  logic [4:0] word2;
  logic [3:0] in2;
  logic out2, fl2, cf2;
  mc_counter #(.K(2)) u_cnt2 (.clk_f, .rst, .cnt(sel2), .last(last2));
  tm_latch_switch #(.K(2)) dut2 (.clk_f, .rst, .sel(sel2), .cfg_we(we2), .cfg_ctx(ctx2),
                                 .cfg_word(word2), .in(in2), .out(out2), .floating(fl2),
                                 .conflict(cf2));

  logic [1:0] sel4, last4, ctx4;
  logic we4, l4;
  logic [4:0] word4;
  logic [3:0] in4;
  logic out4, fl4, cf4;
  mc_counter #(.K(4)) u_cnt4 (.clk_f, .rst, .cnt(sel4), .last(l4));
  tm_latch_switch #(.K(4)) dut4 (.clk_f, .rst, .sel(sel4), .cfg_we(we4), .cfg_ctx(ctx4),
                                 .cfg_word(word4), .in(in4), .out(out4), .floating(fl4),
                                 .conflict(cf4));

  initial begin
    repeat (20000) @(posedge clk_f);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic held, model_fb;
    bit fb_known;
    logic [4:0] words [4];
    logic [3:0] conn;
    logic exp_out;
    int ncon, latched;
    we2 = 0; ctx2 = 0; word2 = 0; in2 = 0; we4 = 0; ctx4 = 0; word4 = 0; in4 = 0;
    repeat (2) @(negedge clk_f);
    rst = 0;
    // word = {s6, s5, s4, s1&s3, s0&s2}
    we2 = 1; ctx2 = 0; word2 = 5'b01010; @(negedge clk_f);
    ctx2 = 1; word2 = 5'b10000; @(negedge clk_f);
    we2 = 0;
    while (sel2 != 0) @(negedge clk_f);
    latched = 0;
    for (int n = 0; n < 40; n++) begin
      in2 = 4'($urandom);
      #1;
      checks++;
      if (sel2 == 0) begin
        if (out2 != in2[3] || fl2 || cf2) begin
          failures++; $display("microcycle 1: in3=%0b out=%0b", in2[3], out2);
        end
      end else begin
        if (out2 != held || fl2 || cf2) begin
          failures++; $display("microcycle 2: held %0b, out=%0b fl=%0b", held, out2, fl2);
        end
        if (in2[3] != held) latched++;
      end
      if (sel2 == 0) held = in2[3];   // value at the end of microcycle 1
      @(negedge clk_f);
    end
    checks++;
    if (latched == 0) begin failures++; $display("input never changed while latched"); end
    // Without s6 in context 2 the buffer input floats.
    we2 = 1; ctx2 = 1; word2 = 5'b00000; @(negedge clk_f); we2 = 0;
    while (sel2 != 1) @(negedge clk_f);
    #1; checks++;
    if (!fl2 || out2 != 1'b0) begin failures++; $display("context without s6 did not float"); end

    // Part 2, K=4.
    for (int n = 0; n < 150; n++) begin
      we4 = 1;
      for (int k = 0; k < 4; k++) begin
        words[k] = 5'($urandom); ctx4 = 2'(k); word4 = words[k]; @(negedge clk_f);
      end
      we4 = 0;
      fb_known = 1'b0;   // the latch content left by the previous contexts
      for (int k = 0; k < 8; k++) begin
        in4 = 4'($urandom); #1;
        for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++)
          conn[r*2+c] = words[sel4][2+r] & words[sel4][c];
        ncon = $countones(conn);
        if (ncon == 1)               exp_out = |(in4 & conn);
        else if (words[sel4][4])     exp_out = model_fb;
        else                         exp_out = 1'b0;
        checks++;
        if (ncon != 1 && words[sel4][4] && !fb_known) exp_out = out4;
        if (out4 != exp_out ||
            cf4 != (ncon > 1 || (ncon == 1 && words[sel4][4])) ||
            fl4 != (ncon == 0 && !words[sel4][4])) begin
          failures++;
          $display("K=4 mc=%0d word=%05b in=%04b out=%0b exp=%0b", sel4, words[sel4], in4, out4, exp_out);
        end
        model_fb = exp_out;
        fb_known = 1'b1;
        @(negedge clk_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
