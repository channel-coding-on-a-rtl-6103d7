// pm_mux: temporary path metric storage in front of the ACSU.
//
// A register of 64 path metrics fed by a 2-to-1 multiplexer. On a clock edge
// with muxsig high it loads either the initial metrics (first high: 0 for
// the all-zero state, PM_INF for the other 63 states, which stands for
// "unreachable") or the metrics the ACSU computed for the previous time
// instance. Its output is the ACSU's path metric input. Reset loads the
// initial metrics too. PM_INF = 200 is the document's value.
module pm_mux
  import codec_pkg::*;
#(
  parameter int unsigned PM_W   = 10,
  parameter int unsigned PM_INF = 200
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        muxsig,
  input  logic                        first,
  input  logic [NSTATE-1:0][PM_W-1:0] pm_acs,
  output logic [NSTATE-1:0][PM_W-1:0] pm_q
);
  logic [NSTATE-1:0][PM_W-1:0] pm_init;

  always_comb begin
    for (int s = 0; s < NSTATE; s++) pm_init[s] = (s == 0) ? '0 : PM_W'(PM_INF);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pm_q <= pm_init;
    else if (muxsig) pm_q <= first ? pm_init : pm_acs;
  end

  initial assert (PM_INF < (1 << (PM_W - 1)))
    else $error("PM_INF must fit below the normalisation bit");
endmodule
