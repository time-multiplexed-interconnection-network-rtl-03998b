// tb_tm_pass_transistor: checks the K-context pass transistor.
// Part 1 (K=2): all four MC_1/MC_2 settings against the on/off table of the
// architecture (00 off/off, 01 off/on, 10 on/off, 11 on/on), with the select
// coming from a real microcycle counter.
// Part 2 (K=4): random cell contents; the gate must follow cell sel for every
// counter value.
module tb_tm_pass_transistor;
  logic clk_f = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk_f = ~clk_f;

  // K = 2
  logic       sel2, last2, we2, d2, gate2;
  logic       ctx2;
  mc_counter #(.K(2)) u_cnt2 (.clk_f, .rst, .cnt(sel2), .last(last2));
  tm_pass_transistor #(.K(2)) dut2 (.clk_f, .rst, .cfg_we(we2), .cfg_ctx(ctx2), .cfg_d(d2),
                                    .sel(sel2), .gate(gate2));
  // K = 4
  logic [1:0] sel4, ctx4; logic we4, d4, gate4;
  tm_pass_transistor #(.K(4)) dut4 (.clk_f, .rst, .cfg_we(we4), .cfg_ctx(ctx4), .cfg_d(d4),
                                    .sel(sel4), .gate(gate4));

  initial begin
    repeat (5000) @(posedge clk_f);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] cells;
    we2 = 0; d2 = 0; ctx2 = 0; we4 = 0; d4 = 0; ctx4 = 0; sel4 = 0;
    repeat (2) @(negedge clk_f);
    rst = 0;
    checks++;
    if (gate2 !== 1'b0) begin failures++; $display("cells not cleared by reset"); end
    for (int cfg = 0; cfg < 4; cfg++) begin
      // MC_1 = cfg[1], MC_2 = cfg[0]
      we2 = 1; ctx2 = 0; d2 = cfg[1]; @(negedge clk_f);
      ctx2 = 1; d2 = cfg[0]; @(negedge clk_f);
      we2 = 0;
      for (int h = 0; h < 4; h++) begin
        checks++;
        if (gate2 != ((sel2 == 0) ? cfg[1] : cfg[0])) begin
          failures++;
          $display("MC=%02b half %0d: gate=%0b", cfg[1:0], sel2 + 1, gate2);
        end
        @(negedge clk_f);
      end
    end
    for (int n = 0; n < 50; n++) begin
      cells = 4'($urandom);
      we4 = 1;
      for (int k = 0; k < 4; k++) begin
        ctx4 = 2'(k); d4 = cells[k]; @(negedge clk_f);
      end
      we4 = 0;
      for (int k = 0; k < 4; k++) begin
        sel4 = 2'(k); #1;
        checks++;
        if (gate4 != cells[k]) begin
          failures++; $display("K=4 cells=%04b sel=%0d gate=%0b", cells, k, gate4);
        end
      end
      @(negedge clk_f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
