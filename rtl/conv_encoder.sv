// conv_encoder: CCSDS (7, 1/2) convolutional encoder.
//
// Three parts, as in the document: a signal generator that produces the
// enc_ctrl and mux_ctrl strobes of a fixed five-cycle operation, the encoder
// proper (six-cell shift register, XOR trees for G1 = 171 and G2 = 133 octal,
// C2 inversion) and a selector that serialises the two symbols.
//
// Timing, with cycles of one operation numbered 1..5 from reset: din is
// sampled in cycle 2 (din_strobe high); dout carries C1 in cycle 4 and
// inverted C2 in cycle 5 (dout_valid high), so the symbols of a bit appear two
// and three cycles after it is sampled. Input rate = clock / 5, output symbol
// rate = 2 x input rate. din_strobe and dout_valid are outputs added here so
// that a user can follow the fixed timing; the reset is asynchronous and
// active low.
module conv_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic din_strobe,
  output logic dout,
  output logic dout_valid
);
  logic enc_ctrl, mux_ctrl, c1, c2_n;

  enc_signal_gen u_sig (
    .clk, .rst_n, .enc_ctrl, .mux_ctrl
  );

  conv_encoder_core u_core (
    .clk, .rst_n, .enc_ctrl, .din, .c1, .c2_n
  );

  enc_selector u_sel (
    .clk, .rst_n, .mux_ctrl, .c1, .c2_n, .dout, .dout_valid
  );

  assign din_strobe = enc_ctrl;
endmodule
