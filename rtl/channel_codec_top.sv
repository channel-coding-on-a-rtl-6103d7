// channel_codec_top: CCSDS (7, 1/2) convolutional channel codec.
//
// The transmit side (conv_encoder) and the receive side (viterbi_decoder)
// stand side by side with their own ports, as on a satellite communication
// board where the encoder feeds the modulator and the decoder is fed by the
// demodulator. Nothing connects them inside: the channel lies between them.
//
// Encoder: one information bit every five clocks (enc_din sampled while
// enc_din_strobe is high), two serial code symbols C1, inverted C2 on
// enc_dout while enc_dout_valid is high. Decoder: received symbol pairs on
// dec_sym with a valid/ready handshake (one pair per six clocks at most),
// decoded bits on dec_out_bit, TB at a time and newest first, 6*TB+5 clocks
// after a block's first pair. Reset is asynchronous, active low.
module channel_codec_top #(
  parameter int unsigned TB = 35
) (
  input  logic       clk,
  input  logic       rst_n,
  // transmit side
  input  logic       enc_din,
  output logic       enc_din_strobe,
  output logic       enc_dout,
  output logic       enc_dout_valid,
  // receive side
  input  logic [1:0] dec_sym,
  input  logic       dec_sym_valid,
  output logic       dec_sym_ready,
  output logic       dec_out_bit,
  output logic       dec_out_valid,
  output logic       dec_out_last
);
  conv_encoder u_enc (
    .clk, .rst_n,
    .din        (enc_din),
    .din_strobe (enc_din_strobe),
    .dout       (enc_dout),
    .dout_valid (enc_dout_valid)
  );

  viterbi_decoder #(.TB(TB)) u_dec (
    .clk, .rst_n,
    .sym       (dec_sym),
    .sym_valid (dec_sym_valid),
    .sym_ready (dec_sym_ready),
    .out_bit   (dec_out_bit),
    .out_valid (dec_out_valid),
    .out_last  (dec_out_last)
  );
endmodule
