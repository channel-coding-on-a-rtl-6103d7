// conv_encoder_core: shift register and modulo-2 adders of the CCSDS
// (7, 1/2) convolutional encoder.
//
// Six register cells hold the last six input bits (sr[5] the newest). When
// enc_ctrl is high, C1 = parity(G1 & {din, sr}) and C2 = parity(G2 & {din,
// sr}) are registered, C2 inverted as CCSDS requires, and din shifts into
// sr[5] while the rest moves one place right. The registered symbols stay
// stable until the next enc_ctrl, five clocks later. Cells reset to zero so
// encoding starts from the all-zero state. Polynomials 171/133 (octal) and the
// C2 inversion follow the document; registering the outputs is this design's
// choice.
module conv_encoder_core
  import codec_pkg::*;
#(
  parameter int unsigned  KLEN = K,
  parameter logic [K-1:0] GEN1 = G1,
  parameter logic [K-1:0] GEN2 = G2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enc_ctrl,
  input  logic din,
  output logic c1,
  output logic c2_n
);
  logic [KLEN-2:0] sr;
  logic [KLEN-1:0] taps;

  assign taps = {din, sr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      c1   <= 1'b0;
      c2_n <= 1'b1;
    end else if (enc_ctrl) begin
      c1   <= ^(taps & GEN1);
      c2_n <= ~(^(taps & GEN2));
      sr   <= {din, sr[KLEN-2:1]};
    end
  end

  initial assert (KLEN == K) else $error("conv_encoder_core supports K = 7 only");
endmodule
