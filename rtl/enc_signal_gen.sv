// enc_signal_gen: timing generator of the convolutional encoder.
//
// A mod-5 counter runs freely from reset and marks the five clock cycles of
// one encoder operation. enc_ctrl is high in the second cycle, when the input
// bit is taken and the shift register advances; mux_ctrl is high in the
// fourth and fifth cycles, when the serial output carries C1 and then
// inverted C2. This is the sequence of the encoder truth table (one input bit
// per five clocks); the counter implementation and the active-low
// asynchronous reset are this design's choices.
module enc_signal_gen (
  input  logic clk,
  input  logic rst_n,
  output logic enc_ctrl,
  output logic mux_ctrl
);
  logic [2:0] cnt;  // 0..4 = cycles 1..5 of the encoder operation

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         cnt <= '0;
    else if (cnt == 3'd4) cnt <= '0;
    else                cnt <= cnt + 3'd1;
  end

  always_comb begin
    enc_ctrl = (cnt == 3'd1);
    mux_ctrl = (cnt == 3'd3) || (cnt == 3'd4);
  end
endmodule
