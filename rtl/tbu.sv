// tbu: trace-back unit.
//
// Walks one block of the trellis backwards, one time instance per clock.
// In a step (tbenb and tbsig high) the current state is min_idx on the first
// step (tbstart) and the state found by the previous step otherwise. The
// decision bit of that state is taken from dec_row, the decision vector of
// the current time instance. The state's MSB is the decoded bit; dropping the
// MSB and appending the decision bit as the new LSB gives the state at the
// previous time instance. The decoded bit is registered: out_bit/out_valid
// appear the cycle after the step, out_last marks the step flagged tblast.
// Bits of a block come out newest first; they are not reordered here, as in
// the document. This follows the document's trace-back steps; the register
// timing is this design's.
module tbu
  import codec_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tbenb,
  input  logic              tbstart,
  input  logic              tbsig,
  input  logic              tblast,
  input  logic [SW-1:0]     min_idx,
  input  logic [NSTATE-1:0] dec_row,
  output logic              out_bit,
  output logic              out_valid,
  output logic              out_last
);
  logic [SW-1:0] idx_q, cur;
  logic          step;

  always_comb begin
    step = tbenb && tbsig;
    cur  = tbstart ? min_idx : idx_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q     <= '0;
      out_bit   <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= step;
      out_last  <= step && tblast;
      if (step) begin
        out_bit <= cur[SW-1];
        idx_q   <= {cur[SW-2:0], dec_row[cur]};
      end
    end
  end
endmodule
