// tb_tm_switch: checks the 4-input direct-drive TM switch (K=2).
// Part 1 uses the architecture's own example: the switch drives w1, with w2
// on in1 and w4 on in2; context 1 (s1/s3 and s4 on) must pass in1, context 2
// (s0/s2 and s5 on) must pass in2. Part 2 loads random contexts and compares
// out/driven/conflict with a model of the two-level multiplexer, for K=4.
module tb_tm_switch;
  logic clk_f = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk_f = ~clk_f;

  logic sel2, last2, we2, ctx2;
  logic [3:0] word2, in2;
  logic out2, drv2, cf2;
  mc_counter #(.K(2)) u_cnt2 (.clk_f, .rst, .cnt(sel2), .last(last2));
  tm_switch #(.K(2)) dut2 (.clk_f, .rst, .sel(sel2), .cfg_we(we2), .cfg_ctx(ctx2),
                           .cfg_word(word2), .in(in2), .out(out2), .driven(drv2), .conflict(cf2));

  logic [1:0] sel4, ctx4;
  logic we4;
  logic [3:0] word4, in4;
  logic out4, drv4, cf4;
  tm_switch #(.K(4)) dut4 (.clk_f, .rst, .sel(sel4), .cfg_we(we4), .cfg_ctx(ctx4),
                           .cfg_word(word4), .in(in4), .out(out4), .driven(drv4), .conflict(cf4));

  initial begin
    repeat (20000) @(posedge clk_f);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] words [4];
    logic [3:0] conn;
    int ncon;
    we2 = 0; ctx2 = 0; word2 = 0; in2 = 0; we4 = 0; ctx4 = 0; word4 = 0; in4 = 0; sel4 = 0;
    repeat (2) @(negedge clk_f);
    rst = 0;
    // word = {s5, s4, s1&s3, s0&s2}
    we2 = 1; ctx2 = 0; word2 = 4'b0110; @(negedge clk_f);
    ctx2 = 1; word2 = 4'b1001; @(negedge clk_f);
    we2 = 0;
    for (int n = 0; n < 40; n++) begin
      in2 = 4'($urandom);
      #1;
      checks++;
      if (!drv2 || cf2 || out2 != ((sel2 == 0) ? in2[1] : in2[2])) begin
        failures++;
        $display("example: microcycle %0d in=%04b out=%0b driven=%0b", sel2 + 1, in2, out2, drv2);
      end
      @(negedge clk_f);
    end
    for (int n = 0; n < 200; n++) begin
      we4 = 1;
      for (int k = 0; k < 4; k++) begin
        words[k] = 4'($urandom); ctx4 = 2'(k); word4 = words[k]; @(negedge clk_f);
      end
      we4 = 0;
      for (int k = 0; k < 4; k++) begin
        sel4 = 2'(k); in4 = 4'($urandom); #1;
        for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++)
          conn[r*2+c] = words[k][2+r] & words[k][c];
        ncon = $countones(conn);
        checks++;
        if (drv4 != (ncon == 1) || cf4 != (ncon > 1) ||
            out4 != ((ncon == 1) ? |(in4 & conn) : 1'b0)) begin
          failures++;
          $display("K=4 word=%04b in=%04b out=%0b drv=%0b cf=%0b", words[k], in4, out4, drv4, cf4);
        end
      end
      @(negedge clk_f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
