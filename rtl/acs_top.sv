// acs_top: add-compare-select unit (ACSU) of the 64-state Viterbi decoder.
//
// 32 acs_unit instances work in parallel, one per trellis butterfly:
// butterfly k reads the path metrics of states 2k and 2k+1 and produces the
// metrics and decision bits of states k and k+32. Each butterfly's two branch
// metrics are chosen from BM0..BM3 by the branch-words that the code's
// generator polynomials give for its source state 2k (input 0 and input 1),
// computed at elaboration time from codec_pkg::branch_word.
//
// On a clock edge with acssig high the 64 new path metrics (pm_out) and the
// 64-bit decision vector (dec, bit s for state s) are registered. Path
// metrics are PM_W bits wide and normalised: when every new metric has its top
// bit set, that bit is cleared in all of them, which subtracts the same
// amount everywhere and leaves every later decision unchanged. The width and
// the normalisation are this design's choices; the document does not state
// them. norm_event pulses in a cycle where a normalisation was applied.
module acs_top
  import codec_pkg::*;
#(
  parameter int unsigned PM_W = 10
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           acssig,
  input  bm_vec_t                        bm,
  input  logic [NSTATE-1:0][PM_W-1:0]    pm_in,
  output logic [NSTATE-1:0][PM_W-1:0]    pm_out,
  output logic [NSTATE-1:0]              dec,
  output logic                           norm_event
);
  logic [NSTATE-1:0][PM_W-1:0] pm_new, pm_norm;
  logic [NSTATE-1:0]           dec_new;
  logic [NSTATE-1:0]           top_bits;

  for (genvar k = 0; k < NBFLY; k++) begin : g_bfly
    localparam logic [1:0] BW_TOP = branch_word(SW'(2 * k), 1'b0);
    localparam logic [1:0] BW_BOT = branch_word(SW'(2 * k), 1'b1);
    acs_unit #(.PM_W(PM_W)) u_acs (
      .pm_a   (pm_in[2*k]),
      .pm_b   (pm_in[2*k+1]),
      .bm_top (bm[BW_TOP]),
      .bm_bot (bm[BW_BOT]),
      .pm_c   (pm_new[k]),
      .pm_d   (pm_new[k+NBFLY]),
      .dec0   (dec_new[k]),
      .dec1   (dec_new[k+NBFLY])
    );
  end

  always_comb begin
    for (int s = 0; s < NSTATE; s++) top_bits[s] = pm_new[s][PM_W-1];
    pm_norm = pm_new;
    if (&top_bits)
      for (int s = 0; s < NSTATE; s++) pm_norm[s][PM_W-1] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pm_out     <= '0;
      dec        <= '0;
      norm_event <= 1'b0;
    end else begin
      norm_event <= acssig && (&top_bits);
      if (acssig) begin
        pm_out <= pm_norm;
        dec    <= dec_new;
      end
    end
  end
endmodule
