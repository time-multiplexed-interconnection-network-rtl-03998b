// ble: basic logic element, a LUT_K-input look-up table followed by an
// optional flip-flop.
//
// The LUT output is mask[in]. The flip-flop loads it on the user clock edge,
// which in this fabric is the rising edge of the fast clock clk_f at the end
// of the last microcycle (ucyc_en high). ff_sel chooses the registered (1) or
// the combinational (0) value as the BLE output.
//
// Configuration: mask (2**LUT_K bits) and ff_sel come from the enclosing
// logic block's memory. The flip-flop clears on rst.
// The LUT-plus-register element is the standard one of the baseline
// architecture; the enable-based user clock is this design's choice.
module ble #(
  parameter int unsigned LUT_K = 4
) (
  input  logic                  clk_f,
  input  logic                  rst,
  input  logic                  ucyc_en,
  input  logic [2**LUT_K-1:0]   mask,
  input  logic                  ff_sel,
  input  logic [LUT_K-1:0]      in,
  output logic                  out
);

  logic lut_out, q;

  assign lut_out = mask[in];

  always_ff @(posedge clk_f) begin
    if (rst)          q <= 1'b0;
    else if (ucyc_en) q <= lut_out;
  end

  assign out = ff_sel ? q : lut_out;

endmodule
