// bmu: hard-decision branch metric unit.
//
// For the received 2-bit branch-word bw = {x, y} it registers the Hamming
// distances to the four ideal branch-words 00, 01, 10 and 11 as BM0..BM3
// (values 0..2): each is (x XOR a) + (y XOR b) for ideal word {a, b}. The
// registers load on the rising clock edge while bmsig is high and hold
// otherwise, so the metrics are ready the cycle after bmsig. This is the
// document's hard-decision table; the reset value (all zero) is this design's.
module bmu
  import codec_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bmsig,
  input  logic [1:0] bw,
  output bm_vec_t    bm
);
  bm_vec_t bm_d;

  always_comb begin
    for (int w = 0; w < 4; w++) begin
      logic [1:0] diff;
      diff    = bw ^ 2'(w);
      bm_d[w] = bm_t'(diff[1]) + bm_t'(diff[0]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     bm <= '0;
    else if (bmsig) bm <= bm_d;
  end
endmodule
