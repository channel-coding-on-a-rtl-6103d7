// enc_selector: parallel-to-serial output switch of the encoder.
//
// During the two-cycle output window (mux_ctrl high) the single output line
// carries C1 in the first cycle and inverted C2 in the second. A toggle
// flip-flop, flipped on every mux_ctrl cycle, remembers which half of the
// window is current; it returns to "C1 next" after each pair. dout_valid is
// mux_ctrl. The toggle is this design's way of realising the document's
// selector switch.
module enc_selector (
  input  logic clk,
  input  logic rst_n,
  input  logic mux_ctrl,
  input  logic c1,
  input  logic c2_n,
  output logic dout,
  output logic dout_valid
);
  logic second;  // 1: the C2 half of the window

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        second <= 1'b0;
    else if (mux_ctrl) second <= ~second;
  end

  always_comb begin
    dout       = second ? c2_n : c1;
    dout_valid = mux_ctrl;
  end
endmodule
