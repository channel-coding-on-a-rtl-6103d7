// dec_output_unit: decoder output selection unit.
//
// Joins the memory unit (three decision RAM blocks), the minimum path metric
// unit and the trace-back unit. The ACSU's decision vector goes into the
// memory unit; at the end of a block the path metrics go into the MINU, whose
// result is the trace-back start state; the TBU then reads the block's
// decisions backwards from the memory unit and emits the decoded bits, newest
// first. All timing comes from the control bundle (see dec_control); the
// decoded bits appear one cycle after each trace-back step.
module dec_output_unit
  import codec_pkg::*;
#(
  parameter int unsigned TB   = 35,
  parameter int unsigned PM_W = 10
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  dec_ctl_t                    ctl,
  input  logic [NSTATE-1:0]           dec,
  input  logic [NSTATE-1:0][PM_W-1:0] pm,
  output logic                        out_bit,
  output logic                        out_valid,
  output logic                        out_last
);
  logic [NSTATE-1:0] rd_data;
  logic [2:0]        wsel, rsel;
  logic [SW-1:0]     min_idx;
  logic              min_valid;

  dec_memory #(.TB(TB)) u_mu (
    .clk, .rst_n,
    .musig    (ctl.musig),
    .wr_addr  (ctl.wr_addr),
    .wr_data  (dec),
    .memwrite (ctl.memwrite),
    .memread  (ctl.memread),
    .rd_en    (ctl.rd_en),
    .rd_addr  (ctl.rd_addr),
    .rd_data,
    .wsel,
    .rsel
  );

  minu #(.PM_W(PM_W)) u_minu (
    .clk, .rst_n,
    .minsig (ctl.minsig),
    .pm,
    .min_idx,
    .min_valid
  );

  tbu u_tbu (
    .clk, .rst_n,
    .tbenb   (ctl.tbenb),
    .tbstart (ctl.tbstart),
    .tbsig   (ctl.tbsig),
    .tblast  (ctl.tblast),
    .min_idx,
    .dec_row (rd_data),
    .out_bit,
    .out_valid,
    .out_last
  );

  // The trace-back must start exactly when the minimum search completes.
  assert property (@(posedge clk) disable iff (!rst_n) ctl.tbstart |-> min_valid);
endmodule
