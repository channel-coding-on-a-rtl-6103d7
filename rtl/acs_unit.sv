// acs_unit: add-compare-select for one trellis butterfly.
//
// Source states A = 2k and B = 2k+1 lead to destinations C = k (input 0) and
// D = k+32 (input 1). The A->C and B->D branches share one branch metric
// (bm_top), A->D and B->C share the other (bm_bot). Four adders and two
// comparators give
//   dec0 = (pm_a + bm_top) > (pm_b + bm_bot),  pm_c = the smaller sum
//   dec1 = (pm_a + bm_bot) > (pm_b + bm_top),  pm_d = the smaller sum
// so a decision bit is the LSB of the surviving source state. Ties keep
// source A, as the strict comparison in the document's equation does.
// Purely combinational; acs_top registers the results. Sums wrap at PM_W
// bits; acs_top's normalisation keeps them far from the wrap.
module acs_unit
  import codec_pkg::*;
#(
  parameter int unsigned PM_W = 10
) (
  input  logic [PM_W-1:0] pm_a,
  input  logic [PM_W-1:0] pm_b,
  input  bm_t             bm_top,
  input  bm_t             bm_bot,
  output logic [PM_W-1:0] pm_c,
  output logic [PM_W-1:0] pm_d,
  output logic            dec0,
  output logic            dec1
);
  logic [PM_W-1:0] a_top, a_bot, b_top, b_bot;

  always_comb begin
    a_top = pm_a + PM_W'(bm_top);
    a_bot = pm_a + PM_W'(bm_bot);
    b_top = pm_b + PM_W'(bm_top);
    b_bot = pm_b + PM_W'(bm_bot);
    dec0  = a_top > b_bot;
    dec1  = a_bot > b_top;
    pm_c  = dec0 ? b_bot : a_top;
    pm_d  = dec1 ? b_top : a_bot;
  end
endmodule
