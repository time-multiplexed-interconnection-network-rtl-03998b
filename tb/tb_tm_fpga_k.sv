// tb_tm_fpga_k: runs the shared-wire scenario of tm_fpga_k_env on 2x2
// arrays with K = 2, 6 and 8 microcycles per user cycle (the default array
// uses K = 4). With K = 2 two nets share the wire; with K = 6 and 8 three
// nets share it and the switch latches for the remaining microcycles.
// A K whose scenario never shared the wire counts as a failure.
module tb_tm_fpga_k;
  logic clk_f = 1'b0;
  always #5 clk_f = ~clk_f;

  logic d2, d6, d8;
  int c2, c6, c8, f2, f6, f8, s2, s6, s8;

  tm_fpga_k_env #(.K(2)) env2 (.clk_f, .done(d2), .checks(c2), .failures(f2), .nets_shared(s2));
  tm_fpga_k_env #(.K(6)) env6 (.clk_f, .done(d6), .checks(c6), .failures(f6), .nets_shared(s6));
  tm_fpga_k_env #(.K(8)) env8 (.clk_f, .done(d8), .checks(c8), .failures(f8), .nets_shared(s8));

  initial begin
    int checks, failures;
    fork
      begin
        wait (d2 && d6 && d8);
        checks = c2 + c6 + c8; failures = f2 + f6 + f8;
      end
      begin
        repeat (20000) @(posedge clk_f);
        checks = c2 + c6 + c8; failures = f2 + f6 + f8 + 1;
        $display("watchdog expired");
      end
    join_any
    $display("user cycles with a shared wire: K=2 %0d, K=6 %0d, K=8 %0d", s2, s6, s8);
    if (s2 == 0 || s6 == 0 || s8 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
