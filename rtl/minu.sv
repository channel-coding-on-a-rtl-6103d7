// minu: minimum path metric unit.
//
// Finds the state with the smallest of the 64 path metrics, which is where
// trace-back starts. The comparison tree is cut into five registered stages:
// 64 -> 16 (two comparison levels), 16 -> 8, 8 -> 4, 4 -> 2 and 2 -> 1. Each
// stage carries the metric and its state index. The metrics are sampled on
// the edge where minsig is high; min_idx is valid, with min_valid high, five
// clock cycles later (the document's five-cycle delay). The pipeline accepts
// a new search every cycle. Ties go to the lower state index, and the stage
// split is this design's choice.
module minu
  import codec_pkg::*;
#(
  parameter int unsigned PM_W = 10
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        minsig,
  input  logic [NSTATE-1:0][PM_W-1:0] pm,
  output logic [SW-1:0]               min_idx,
  output logic                        min_valid
);
  typedef struct packed {
    logic [PM_W-1:0] v;
    logic [SW-1:0]   i;
  } cand_t;

  function automatic cand_t pick(input cand_t a, input cand_t b);
    return (b.v < a.v) ? b : a;
  endfunction

  cand_t s1 [16];
  cand_t s2 [8];
  cand_t s3 [4];
  cand_t s4 [2];
  logic [SW-1:0] s5_idx;
  logic [4:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < 16; j++) s1[j] <= '0;
      for (int j = 0; j < 8; j++)  s2[j] <= '0;
      for (int j = 0; j < 4; j++)  s3[j] <= '0;
      for (int j = 0; j < 2; j++)  s4[j] <= '0;
      s5_idx <= '0;
      vld <= '0;
    end else begin
      vld <= {vld[3:0], minsig};
      if (minsig)
        for (int j = 0; j < 16; j++)
          s1[j] <= pick(pick(cand_t'{pm[4*j],   SW'(4*j)},   cand_t'{pm[4*j+1], SW'(4*j+1)}),
                        pick(cand_t'{pm[4*j+2], SW'(4*j+2)}, cand_t'{pm[4*j+3], SW'(4*j+3)}));
      for (int j = 0; j < 8; j++) s2[j] <= pick(s1[2*j], s1[2*j+1]);
      for (int j = 0; j < 4; j++) s3[j] <= pick(s2[2*j], s2[2*j+1]);
      for (int j = 0; j < 2; j++) s4[j] <= pick(s3[2*j], s3[2*j+1]);
      s5_idx <= pick(s4[0], s4[1]).i;
    end
  end

  assign min_idx   = s5_idx;
  assign min_valid = vld[4];
endmodule
