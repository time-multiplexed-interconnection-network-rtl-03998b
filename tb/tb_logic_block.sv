// tb_logic_block: checks the 10-BLE, 22-input logic block with 4-LUTs.
// Every BLE gets a random LUT mask, random crossbar sources (logic block
// inputs only, so no loop can close) and combinational output; with random
// inputs the outputs must equal mask[inputs]. Then BLE 0 is registered and
// BLE 1 reads BLE 0's output through the feedback path: the register must
// load only when ucyc_en is high (the last microcycle of a user cycle).
module tb_logic_block;
  import tm_pkg::*;
  logic clk_f = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk_f = ~clk_f;

  cfg_t cfg;
  logic        ucyc_en;
  logic [21:0] in;
  logic [9:0]  out;

  logic_block #(.XPOS(1), .YPOS(0)) dut (.clk_f, .rst, .ucyc_en, .cfg, .in, .out);

  initial begin
    repeat (50000) @(posedge clk_f);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int idx, logic [23:0] d);
    cfg = '0;
    cfg.we = 1'b1; cfg.target = CFG_LB; cfg.x = 8'd1; cfg.y = 8'd0;
    cfg.idx = 8'(idx); cfg.data = d;
    @(negedge clk_f);
    cfg = '0;
  endtask

  initial begin
    logic [15:0] mask [10];
    int          srcs [10][4];
    logic [19:0] xs;
    logic [3:0]  a;
    logic        q_model, lut0;
    int          loads;
    cfg = '0; ucyc_en = 0; in = '0;
    repeat (2) @(negedge clk_f);
    rst = 0;
    in = '1; #1; checks++;
    if (out != '0) begin failures++; $display("outputs not 0 after reset"); end
    for (int r = 0; r < 20; r++) begin
      for (int b = 0; b < 10; b++) begin
        mask[b] = 16'($urandom);
        for (int i = 0; i < 4; i++) srcs[b][i] = $urandom_range(21);
        xs = '0;
        for (int i = 0; i < 4; i++) xs[i*5 +: 5] = 5'(srcs[b][i]);
        write(2 * b, 24'(mask[b]));
        write(2 * b + 1, {3'b0, 1'b0, xs});
      end
      for (int v = 0; v < 20; v++) begin
        in = 22'($urandom); #1;
        for (int b = 0; b < 10; b++) begin
          for (int i = 0; i < 4; i++) a[i] = in[srcs[b][i]];
          checks++;
          if (out[b] != mask[b][a]) begin
            failures++; $display("BLE %0d: got %0b expected %0b", b, out[b], mask[b][a]);
          end
        end
        @(negedge clk_f);
      end
    end
    // BLE0 = in0 XOR in1, registered; BLE1 = NOT(BLE0 output) via feedback source 22.
    write(0, 24'h6666);                                  // a0 ^ a1
    write(1, {3'b0, 1'b1, 5'd0, 5'd0, 5'd1, 5'd0});      // sources in0, in1; ff_sel=1
    write(2, 24'h5555);                                  // ~a0
    write(3, {3'b0, 1'b0, 5'd22, 5'd22, 5'd22, 5'd22});  // all from BLE0 output
    ucyc_en = 1; in[1:0] = 2'b00; @(negedge clk_f); ucyc_en = 0;
    q_model = 1'b0; loads = 0;
    for (int c = 0; c < 40; c++) begin
      in[1:0] = 2'($urandom);
      ucyc_en = (c % 4 == 3);
      lut0 = in[0] ^ in[1];
      #1;
      checks++;
      if (out[0] != q_model || out[1] != ~q_model) begin
        failures++; $display("step %0d: out0=%0b out1=%0b model=%0b", c, out[0], out[1], q_model);
      end
      @(negedge clk_f);
      if (ucyc_en) begin q_model = lut0; loads++; end
    end
    checks++;
    if (loads != 10) begin failures++; $display("loads %0d", loads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
