// viterbi_decoder: hard-decision trace-back Viterbi decoder for the CCSDS
// (7, 1/2) convolutional code (64 states, G1 = 171, G2 = 133 octal).
//
// Datapath: the control unit sequences each received 2-bit branch-word
// through the branch metric unit (Hamming distances to 00/01/10/11), the MUX
// (path metric register, loaded with 0 / 200 initial metrics at start), and
// the ACSU (32 parallel butterflies giving 64 new metrics and a 64-bit
// decision vector), whose decisions are stored in three TB-word RAM blocks.
// After every TB words the minimum-metric state is found and the block is
// traced back from it, giving TB decoded bits in reverse time order.
//
// Interface: sym = {first symbol, second symbol} as received; with INV_C2 = 1
// the second symbol is re-inverted at the input because the encoder sends C2
// inverted. A word is taken in a cycle where sym_valid and sym_ready are both
// high; sym_ready is high at most once every six cycles. out_bit is valid when
// out_valid is high; each block's bits come newest first, and out_last marks
// the oldest bit of a block. The stream must be a whole number of blocks.
// Latency: first decoded bit 6*TB+5 cycles after the first word is taken.
// Block structure, rates and latency follow the document; INV_C2, the
// handshake and the path metric width are this design's choices.
module viterbi_decoder
  import codec_pkg::*;
#(
  parameter int unsigned TB     = 35,
  parameter int unsigned PM_W   = 10,
  parameter int unsigned PM_INF = 200,
  parameter bit          INV_C2 = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] sym,
  input  logic       sym_valid,
  output logic       sym_ready,
  output logic       out_bit,
  output logic       out_valid,
  output logic       out_last
);
  dec_ctl_t                    ctl;
  bm_vec_t                     bm;
  logic [NSTATE-1:0][PM_W-1:0] pm_q, pm_acs;
  logic [NSTATE-1:0]           dec;
  logic                        norm_event;
  logic [1:0]                  bw;

  assign bw = {sym[1], sym[0] ^ INV_C2};

  dec_control #(.TB(TB)) u_ctrl (
    .clk, .rst_n,
    .in_valid (sym_valid),
    .in_ready (sym_ready),
    .ctl
  );

  bmu u_bmu (
    .clk, .rst_n,
    .bmsig (ctl.bmsig),
    .bw,
    .bm
  );

  pm_mux #(.PM_W(PM_W), .PM_INF(PM_INF)) u_mux (
    .clk, .rst_n,
    .muxsig (ctl.muxsig),
    .first  (ctl.first),
    .pm_acs,
    .pm_q
  );

  acs_top #(.PM_W(PM_W)) u_acsu (
    .clk, .rst_n,
    .acssig (ctl.acssig),
    .bm,
    .pm_in  (pm_q),
    .pm_out (pm_acs),
    .dec,
    .norm_event
  );

  dec_output_unit #(.TB(TB), .PM_W(PM_W)) u_out (
    .clk, .rst_n,
    .ctl,
    .dec,
    .pm (pm_acs),
    .out_bit,
    .out_valid,
    .out_last
  );
endmodule
