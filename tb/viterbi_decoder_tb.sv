// viterbi_decoder_tb: random data (ending in six zeros so the trellis
// returns to state 0) is encoded by the reference encoder, C2 inverted as
// transmitted, and passed through a binary symmetric channel; the words go
// to the decoder (TB = 12) with random gaps. Every decoded bit, after
// reversing each block, is compared bit-exactly with the reference block
// Viterbi decoder, and the error-free stream must be recovered exactly. The
// first-bit latency 6*TB+5 is checked on the error-free pass, which starts
// with words back to back.
module viterbi_decoder_tb;
  import tb_ref_pkg::*;
  localparam int TB = 12, NBLK = 40;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // reset edge for the asynchronous reset
  logic [1:0] sym = '0;
  logic sym_valid = 1'b0, sym_ready, out_bit, out_valid, out_last;
  int checks = 0, failures = 0, cyc = 0, first_in = -1, first_out = -1;
  bit blkbuf[$], got[$];

  viterbi_decoder #(.TB(TB)) dut (.clk, .rst_n, .sym, .sym_valid, .sym_ready, .out_bit, .out_valid, .out_last);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (sym_valid && sym_ready && first_in < 0) first_in = cyc;
    if (out_valid) begin
      if (first_out < 0) first_out = cyc;
      blkbuf.push_front(out_bit);          // reverse the block
      if (out_last) begin
        checks++;
        if (blkbuf.size() != TB) failures++;
        foreach (blkbuf[i]) got.push_back(blkbuf[i]);
        blkbuf.delete();
      end
    end
  end

  task automatic run(real p_err, bit gaps, output int nerr);
    bit data[$], exp_bits[$];
    bit [1:0] bws[$], rx[$];
    int n;
    n = TB * NBLK;
    for (int i = 0; i < n; i++) data.push_back(i < n - 6 ? 1'($urandom) : 1'b0);
    ref_encode(data, bws);
    nerr = 0;
    foreach (bws[i]) begin
      bit [1:0] w;
      w = bws[i];
      for (int b = 0; b < 2; b++)
        if ($urandom_range(0, 9999) < int'(p_err * 10000)) begin w[b] = ~w[b]; nerr++; end
      rx.push_back(w);
    end
    ref_viterbi(rx, TB, exp_bits);
    if (p_err == 0.0) begin
      checks++;
      if (exp_bits != data) begin failures++; $display("reference model does not decode a clean stream"); end
    end
    // reset the decoder for each run
    rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1;
    got.delete(); first_in = -1; first_out = -1;
    foreach (rx[i]) begin
      sym_valid = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
      while (!sym_valid) begin @(posedge clk); #1; sym_valid = ($urandom_range(0, 2) != 0); end
      sym = {rx[i][1], ~rx[i][0]};         // as sent: C2 inverted
      @(negedge clk);
      while (!sym_ready) @(negedge clk);
      @(posedge clk); #1;
      sym_valid = 1'b0;
    end
    repeat (6 * TB + TB + 20) @(posedge clk);
    checks++;
    if (got.size() != n) begin failures++; $display("got %0d bits of %0d", got.size(), n); end
    for (int i = 0; i < n && i < got.size(); i++) begin
      checks++;
      if (got[i] != exp_bits[i]) begin failures++; if (failures < 10) $display("bit %0d: %0b exp %0b", i, got[i], exp_bits[i]); end
    end
    if (p_err == 0.0) begin
      checks++;
      if (got != data) failures++;
      checks++;
      if (first_out - first_in != 6 * TB + 5) begin failures++; $display("latency %0d", first_out - first_in); end
    end
  endtask

  initial begin
    int e1, e2, e3;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run(0.0, 1'b0, e1);
    run(0.02, 1'b1, e2);
    run(0.06, 1'b1, e3);
    checks++;
    if (e2 == 0 || e3 == 0) failures++;
    $display("channel errors: %0d, %0d", e2, e3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * TB * NBLK * 10 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
