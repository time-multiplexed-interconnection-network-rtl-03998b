// tb_mc_counter: checks the circular microcycle counter for K=4 (power of
// two) and K=6. After reset the count must run 0,1,...,K-1,0,... with `last`
// high exactly in the K-1 state, i.e. one user cycle every K fast clocks.
module tb_mc_counter;
  logic clk_f = 1'b0, rst = 1'b1;
  logic [1:0] cnt4; logic last4;
  logic [2:0] cnt6; logic last6;
  int checks = 0, failures = 0;

  always #5 clk_f = ~clk_f;

  mc_counter #(.K(4)) dut4 (.clk_f, .rst, .cnt(cnt4), .last(last4));
  mc_counter #(.K(6)) dut6 (.clk_f, .rst, .cnt(cnt6), .last(last6));

  initial begin
    repeat (2000) @(posedge clk_f);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp4, exp6, wraps4;
    repeat (3) @(negedge clk_f);
    rst = 1'b0;
    exp4 = 0; exp6 = 0; wraps4 = 0;
    for (int n = 0; n < 60; n++) begin
      checks++;
      if (cnt4 != 2'(exp4) || last4 != (exp4 == 3)) begin
        failures++; $display("K=4 step %0d: cnt=%0d last=%0b, expected %0d", n, cnt4, last4, exp4);
      end
      checks++;
      if (cnt6 != 3'(exp6) || last6 != (exp6 == 5)) begin
        failures++; $display("K=6 step %0d: cnt=%0d last=%0b, expected %0d", n, cnt6, last6, exp6);
      end
      if (exp4 == 3) wraps4++;
      @(negedge clk_f);
      exp4 = (exp4 + 1) % 4;
      exp6 = (exp6 + 1) % 6;
    end
    // 60 fast clocks at K=4 are 15 user cycles.
    checks++;
    if (wraps4 != 15) begin failures++; $display("user cycles %0d, expected 15", wraps4); end
    // Reset in mid-count returns to microcycle 0.
    rst = 1'b1; @(negedge clk_f); rst = 1'b0;
    checks++;
    if (cnt4 != 0 || cnt6 != 0) begin failures++; $display("reset did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
