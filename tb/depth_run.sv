// depth_run: one decoder at trace-back depth TB, run by tb_depth_sweep.
// The 3207-symbol test stream (3200 random bits, 7 tail zeros) is padded to
// whole blocks, encoded by the reference encoder, sent with C2 inverted
// through a binary symmetric channel with error probability PERR_PPM per
// million, and decoded. Every decoded bit is compared with the reference
// block decoder, the error-free stream must come out unchanged, and the
// first-bit latency must be 6*TB+5 cycles. Results are reported on the
// outputs when done is high.
module depth_run #(
  parameter int TB       = 35,
  parameter int PERR_PPM = 5000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   errors_in
);
  import tb_ref_pkg::*;
  localparam int NSYM = ((3207 + TB - 1) / TB) * TB;
  logic rst_n = 1'b1;
  logic [1:0] sym = '0;
  logic sym_valid = 1'b0, sym_ready, out_bit, out_valid, out_last;
  int cyc = 0, first_in = -1, first_out = -1;
  bit blkbuf[$], got[$];

  viterbi_decoder #(.TB(TB)) dut (.clk, .rst_n, .sym, .sym_valid, .sym_ready, .out_bit, .out_valid, .out_last);

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (sym_valid && sym_ready && first_in < 0) first_in = cyc;
    if (out_valid) begin
      if (first_out < 0) first_out = cyc;
      blkbuf.push_front(out_bit);
      if (out_last) begin
        foreach (blkbuf[i]) got.push_back(blkbuf[i]);
        blkbuf.delete();
      end
    end
  end

  task automatic pass(int ppm, output int nerr);
    bit data[$], exp_bits[$];
    bit [1:0] bws[$], rx[$];
    for (int i = 0; i < NSYM; i++) data.push_back(i < 3200 ? 1'($urandom) : 1'b0);
    ref_encode(data, bws);
    nerr = 0;
    foreach (bws[i]) begin
      bit [1:0] w;
      w = bws[i];
      for (int b = 0; b < 2; b++)
        if ($urandom_range(0, 999999) < ppm) begin w[b] = ~w[b]; nerr++; end
      rx.push_back(w);
    end
    ref_viterbi(rx, TB, exp_bits);
    rst_n = 1'b0; #1 rst_n = 1'b1;
    @(posedge clk); #1;
    got.delete(); first_in = -1; first_out = -1;
    foreach (rx[i]) begin
      sym_valid = 1'b1;
      sym = {rx[i][1], ~rx[i][0]};
      @(negedge clk);
      while (!sym_ready) @(negedge clk);
      @(posedge clk); #1;
      sym_valid = 1'b0;
    end
    repeat (7 * TB + 20) @(posedge clk);
    checks++;
    if (got.size() != NSYM) failures++;
    for (int i = 0; i < NSYM && i < got.size(); i++) begin
      checks++;
      if (got[i] != exp_bits[i]) failures++;
    end
    checks++;
    if (first_out - first_in != 6 * TB + 5) begin
      failures++;
      $display("TB=%0d latency %0d", TB, first_out - first_in);
    end
    if (ppm == 0) begin
      checks++;
      if (got != data) failures++;
    end
  endtask

  initial begin
    int e0;
    done = 1'b0; checks = 0; failures = 0;
    #3;
    pass(0, e0);
    pass(PERR_PPM, errors_in);
    done = 1'b1;
  end
endmodule
