// dec_control: control unit of the Viterbi decoder.
//
// Every received branch-word passes through a fixed six-cycle sequence
// (phases 0..5):
//   phase 0  bmsig   the branch-word is taken (in_ready) and the BMU computes
//   phase 1  muxsig  the MUX loads the ACS input path metrics (first = use
//                    the initial metrics; only for the first word after reset)
//   phase 2  acssig  the ACSU registers new path metrics and decisions
//   phase 3  musig   the decision vector is written to the memory unit at the
//                    word's time index wr_addr (0..TB-1 inside the block)
//   phase 4, 5       idle
// The sequence waits in phase 0 until in_valid is high.
//
// A block is TB words. In phase 3 of its last word memwrite and memread step
// the memory unit's bank FSMs; in phase 5 minsig starts the five-cycle
// minimum search. Four cycles after minsig the control starts reading the
// block from time index TB-1 down to 0 (rd_en), and one cycle behind each
// read it issues a trace-back step (tbenb, tbsig; tbstart on the first,
// tblast on the last). The first decoded bit is thus registered 6*TB+5
// cycles after the block's first word was taken, the document's latency when
// words arrive without gaps. Trace-back of one block (TB+5 cycles) overlaps
// the reception of the next, which takes at least 6*TB cycles.
//
// The six-cycle rate, the signal names and the latency follow the document;
// the phase order, the wait in phase 0 and the trace-back schedule are this
// design's choices.
module dec_control
  import codec_pkg::*;
#(
  parameter int unsigned TB = 35
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  output dec_ctl_t ctl
);
  logic [2:0]        ph;
  logic [ADDR_W-1:0] t;         // time index of the current word in its block
  logic              first_q;   // no word processed since reset
  logic              last_word;
  logic [2:0]        min_dly;   // minsig delayed by 1..3 cycles
  logic              rd_act;    // reading the block for trace-back
  logic [ADDR_W-1:0] rd_ptr;
  logic              step_q;    // a trace-back step is due this cycle
  logic              step_first;
  logic              step_last;

  assign last_word = (t == ADDR_W'(TB - 1));
  assign in_ready  = (ph == 3'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph      <= '0;
      t       <= '0;
      first_q <= 1'b1;
    end else begin
      if (ph == 3'd0) begin
        if (in_valid) ph <= 3'd1;
      end else if (ph == 3'd5) begin
        ph <= 3'd0;
        t  <= last_word ? '0 : t + 1'b1;
      end else begin
        ph <= ph + 3'd1;
      end
      if (ph == 3'd1) first_q <= 1'b0;
    end
  end

  // Trace-back schedule.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_dly    <= '0;
      rd_act     <= 1'b0;
      rd_ptr     <= '0;
      step_q     <= 1'b0;
      step_first <= 1'b0;
      step_last  <= 1'b0;
    end else begin
      min_dly <= {min_dly[1:0], ctl.minsig};
      if (min_dly[2]) begin
        rd_act <= 1'b1;
        rd_ptr <= ADDR_W'(TB - 1);
      end else if (rd_act) begin
        if (rd_ptr == '0) rd_act <= 1'b0;
        rd_ptr <= rd_ptr - 1'b1;
      end
      step_q     <= rd_act;
      step_first <= rd_act && (rd_ptr == ADDR_W'(TB - 1));
      step_last  <= rd_act && (rd_ptr == '0);
    end
  end

  always_comb begin
    ctl          = '0;
    ctl.bmsig    = (ph == 3'd0) && in_valid;
    ctl.muxsig   = (ph == 3'd1);
    ctl.first    = first_q;
    ctl.acssig   = (ph == 3'd2);
    ctl.musig    = (ph == 3'd3);
    ctl.wr_addr  = t;
    ctl.memwrite = (ph == 3'd3) && last_word;
    ctl.memread  = (ph == 3'd3) && last_word;
    ctl.minsig   = (ph == 3'd5) && last_word;
    ctl.rd_en    = rd_act;
    ctl.rd_addr  = rd_ptr;
    ctl.tbenb    = rd_act || step_q;
    ctl.tbsig    = step_q;
    ctl.tbstart  = step_first;
    ctl.tblast   = step_last;
  end

  initial assert (TB >= 2 && TB <= (1 << ADDR_W)) else $error("TB out of range");
endmodule
