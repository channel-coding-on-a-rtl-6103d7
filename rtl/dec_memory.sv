// dec_memory: memory unit (MU) holding the ACSU decision vectors.
//
// Three RAM blocks, each TB words of 64 decision bits, one word per trellis
// time instance of a block. Two one-hot 3-bit FSMs pick the blocks: the
// write-select FSM (wsel) names the block being filled and the read-select
// FSM (rsel) the block being traced back. Both rotate 0 -> 1 -> 2 -> 0, wsel on
// memwrite and rsel on memread; from reset rsel is one block behind wsel, so
// after a block is complete and both FSMs step, rsel names the block just
// written while the next one is filled elsewhere.
//
// Timing: a word is written on the clock edge where musig is high (block
// wsel, address wr_addr). Reads are synchronous like block RAM: rd_data holds
// block rsel, address rd_addr, from the cycle after rd_en. Three blocks and
// the one-hot FSMs follow the document; the read latency is this design's.
module dec_memory
  import codec_pkg::*;
#(
  parameter int unsigned TB = 35
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              musig,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [NSTATE-1:0] wr_data,
  input  logic              memwrite,
  input  logic              memread,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [NSTATE-1:0] rd_data,
  output logic [2:0]        wsel,
  output logic [2:0]        rsel
);
  localparam int unsigned AW = (TB > 1) ? $clog2(TB) : 1;

  logic [AW-1:0]     wa, ra;
  logic [NSTATE-1:0] ram0 [TB];
  logic [NSTATE-1:0] ram1 [TB];
  logic [NSTATE-1:0] ram2 [TB];

  assign wa = wr_addr[AW-1:0];
  assign ra = rd_addr[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel <= 3'b001;
      rsel <= 3'b100;
    end else begin
      if (memwrite) wsel <= {wsel[1:0], wsel[2]};
      if (memread)  rsel <= {rsel[1:0], rsel[2]};
    end
  end

  // RAM blocks: no reset, as block RAM.
  always_ff @(posedge clk) begin
    if (musig && wsel[0]) ram0[wa] <= wr_data;
    if (musig && wsel[1]) ram1[wa] <= wr_data;
    if (musig && wsel[2]) ram2[wa] <= wr_data;
    if (rd_en) begin
      unique case (1'b1)
        rsel[0]: rd_data <= ram0[ra];
        rsel[1]: rd_data <= ram1[ra];
        default: rd_data <= ram2[ra];
      endcase
    end
  end

  initial assert (TB >= 2 && TB <= (1 << ADDR_W))
    else $error("TB out of range");
  assert property (@(posedge clk) disable iff (!rst_n) $onehot(wsel) && $onehot(rsel) && wsel != rsel);
  assert property (@(posedge clk) disable iff (!rst_n) musig |-> wr_addr < ADDR_W'(TB));
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> rd_addr < ADDR_W'(TB));
endmodule
