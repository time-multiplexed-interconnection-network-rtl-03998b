// tb_dd_mux_switch: checks the conventional direct-drive switch (4 inputs,
// 2x2 hybrid). Random configuration words are written and, for several
// input patterns each, out/driven/conflict are compared with a model of the
// two-level multiplexer. The selection must not change with time: the same
// word is checked over several clocks.
module tb_dd_mux_switch;
  logic clk_f = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk_f = ~clk_f;

  logic we;
  logic [3:0] word, in;
  logic out, drv, cf;
  dd_mux_switch dut (.clk_f, .rst, .cfg_we(we), .cfg_word(word), .in, .out, .driven(drv),
                     .conflict(cf));

  initial begin
    repeat (20000) @(posedge clk_f);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] w, conn;
    int ncon, selected;
    we = 0; word = 0; in = 0;
    repeat (2) @(negedge clk_f);
    rst = 0;
    #1; checks++;
    if (drv || cf || out) begin failures++; $display("not off after reset"); end
    selected = 0;
    for (int n = 0; n < 300; n++) begin
      w = (n < 4) ? ((4'b0100 << (n / 2)) | (4'b0001 << (n % 2))) : 4'($urandom);
      we = 1; word = w; @(negedge clk_f); we = 0; word = ~w;
      for (int r = 0; r < 2; r++) for (int c = 0; c < 2; c++)
        conn[r*2+c] = w[2+r] & w[c];
      ncon = $countones(conn);
      if (ncon == 1) selected++;
      for (int k = 0; k < 3; k++) begin
        in = 4'($urandom); #1;
        checks++;
        if (drv != (ncon == 1) || cf != (ncon > 1) ||
            out != ((ncon == 1) ? |(in & conn) : 1'b0)) begin
          failures++;
          $display("word=%04b in=%04b out=%0b drv=%0b cf=%0b", w, in, out, drv, cf);
        end
        @(negedge clk_f);
      end
    end
    checks++;
    if (selected < 4) begin failures++; $display("too few single selections"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
