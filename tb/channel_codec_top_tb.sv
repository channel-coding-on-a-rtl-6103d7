// channel_codec_top_tb: end-to-end run of the codec at its default
// parameters (trace-back depth 35). A 3200-bit random message plus 7 tail
// zeros goes through the encoder; the testbench pads the stream to whole
// 35-word blocks, pairs the serial symbols into branch-words, flips single
// channel bits in the middle of some blocks, and feeds the decoder with
// random gaps after the first block. Decoded blocks are reversed back into
// time order and compared with the message and, bit-exactly, with the
// reference block decoder. Checked too: encoder symbols against the
// reference encoder, the encoder rate of one bit per five clocks, and the
// decoder's 6*TB+5 first-bit latency. A second pass sends 120 blocks of
// random words (pure noise) and compares with the reference decoder, which
// drives the path metrics through normalisation.
//
// Mechanisms counted (each must happen): encoder tail flush, decoder input
// stall, initial path metric load, path metric normalisation, use of each of
// the three decision RAM blocks, minimum search, trace-back blocks and
// corrected channel errors.
module channel_codec_top_tb;
  import tb_ref_pkg::*;
  localparam int TB = 35, NMSG = 3200, NTAIL = 7, NOISE_BLK = 120;
  localparam int NSYM = ((NMSG + NTAIL + TB - 1) / TB) * TB;   // 3220
  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // reset edge for the asynchronous reset
  logic enc_din = 1'b0, enc_din_strobe, enc_dout, enc_dout_valid;
  logic [1:0] dec_sym = '0;
  logic dec_sym_valid = 1'b0, dec_sym_ready, dec_out_bit, dec_out_valid, dec_out_last;
  int checks = 0, failures = 0, cyc = 0;
  bit data[$], got[$], blkbuf[$], exp_bits[$];
  bit [1:0] ref_bws[$], tx[$], rx[$];
  int enc_idx = 0, last_strobe = -1, half = 0;
  bit c1_hold;
  int first_in = -1, first_out = -1;
  // mechanism counters
  int n_tail = 0, n_stall = 0, n_first = 0, n_norm = 0, n_min = 0, n_blocks = 0, n_err = 0;
  bit [2:0] banks_seen = '0;
  bit msg_ok = 1'b0;

  channel_codec_top dut (
    .clk, .rst_n,
    .enc_din, .enc_din_strobe, .enc_dout, .enc_dout_valid,
    .dec_sym, .dec_sym_valid, .dec_sym_ready,
    .dec_out_bit, .dec_out_valid, .dec_out_last
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // Transmit side: feed the message, collect the serial symbols.
  always @(negedge clk) if (rst_n) begin
    if (enc_din_strobe && enc_idx < NSYM) begin
      if (last_strobe >= 0) begin
        checks++;
        if (cyc - last_strobe != 5) begin failures++; $display("encoder rate: %0d", cyc - last_strobe); end
      end
      last_strobe = cyc;
      enc_din = (enc_idx < data.size()) ? data[enc_idx] : 1'b0;
      if (enc_idx >= NMSG && enc_idx < NMSG + NTAIL) n_tail++;
      enc_idx++;
    end
    if (enc_dout_valid && tx.size() < NMSG + NTAIL) begin
      if (half == 0) c1_hold = enc_dout;
      else tx.push_back({c1_hold, enc_dout});
      half ^= 1;
    end
  end

  // Receive side monitors.
  always @(negedge clk) if (rst_n) begin
    if (dec_sym_valid && dec_sym_ready && first_in < 0) first_in = cyc;
    if (dec_sym_ready && !dec_sym_valid && first_in >= 0 && rx.size() > 0) n_stall++;
    if (dut.u_dec.ctl.muxsig && dut.u_dec.ctl.first) n_first++;
    if (dut.u_dec.u_acsu.norm_event) n_norm++;
    if (dut.u_dec.ctl.minsig) n_min++;
    if (dut.u_dec.ctl.musig) banks_seen |= dut.u_dec.u_out.u_mu.wsel;
    if (dec_out_valid) begin
      if (first_out < 0) first_out = cyc;
      blkbuf.push_front(dec_out_bit);
      if (dec_out_last) begin
        n_blocks++;
        checks++;
        if (blkbuf.size() != TB) failures++;
        foreach (blkbuf[i]) got.push_back(blkbuf[i]);
        blkbuf.delete();
      end
    end
  end

  task automatic count(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("%-28s %0d", what, n);
  endtask

  initial begin
    for (int i = 0; i < NSYM; i++) data.push_back(i < NMSG ? 1'($urandom) : 1'b0);
    ref_encode(data, ref_bws);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // Wait for the whole coded message (data plus tail).
    while (tx.size() < NMSG + NTAIL) @(posedge clk);
    #1;
    for (int i = 0; i < NMSG + NTAIL; i++) begin
      checks++;
      if (tx[i] !== {ref_bws[i][1], ~ref_bws[i][0]}) begin failures++; if (failures < 5) $display("symbol %0d", i); end
    end
    // Pad to whole blocks with the coded all-zero continuation, then the channel.
    for (int i = NMSG + NTAIL; i < NSYM; i++) tx.push_back({ref_bws[i][1], ~ref_bws[i][0]});
    foreach (tx[i]) begin
      bit [1:0] w;
      int t;
      w = tx[i];
      t = i % TB;
      if ((i / TB) % 3 == 1 && t == 12) begin w[$urandom_range(0, 1)] ^= 1'b1; n_err++; end
      rx.push_back(w);
    end
    begin
      bit [1:0] rxu[$];
      foreach (rx[i]) rxu.push_back({rx[i][1], ~rx[i][0]});
      ref_viterbi(rxu, TB, exp_bits);
    end
    // Feed the decoder: first block back to back, then random gaps.
    foreach (rx[i]) begin
      dec_sym_valid = (i < TB) ? 1'b1 : ($urandom_range(0, 3) != 0);
      while (!dec_sym_valid) begin @(posedge clk); #1; dec_sym_valid = ($urandom_range(0, 3) != 0); end
      dec_sym = rx[i];
      @(negedge clk);
      while (!dec_sym_ready) @(negedge clk);
      @(posedge clk); #1;
      dec_sym_valid = 1'b0;
    end
    repeat (6 * TB + TB + 20) @(posedge clk);
    checks++;
    if (got.size() != NSYM) begin failures++; $display("decoded %0d of %0d bits", got.size(), NSYM); end
    for (int i = 0; i < NSYM && i < got.size(); i++) begin
      checks++;
      if (got[i] != data[i] || got[i] != exp_bits[i]) begin
        failures++;
        if (failures < 10) $display("bit %0d: %0b data %0b ref %0b", i, got[i], data[i], exp_bits[i]);
      end
    end
    checks++;
    if (first_out - first_in != 6 * TB + 5) begin failures++; $display("latency %0d", first_out - first_in); end
    $display("first-bit latency            %0d cycles", first_out - first_in);
    msg_ok = (got == data);
    // Second pass: pure channel noise, long enough for the path metrics to
    // reach the normalisation point; checked bit-exactly against the
    // reference decoder, whose integer metrics never wrap.
    begin
      bit [1:0] noise[$], noiseu[$];
      bit nexp[$];
      for (int i = 0; i < NOISE_BLK * TB; i++) begin
        noise.push_back(2'($urandom));
        noiseu.push_back({noise[i][1], ~noise[i][0]});
      end
      ref_viterbi(noiseu, TB, nexp);
      rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1;
      got.delete();
      foreach (noise[i]) begin
        dec_sym_valid = 1'b1;
        dec_sym = noise[i];
        @(negedge clk);
        while (!dec_sym_ready) @(negedge clk);
        @(posedge clk); #1;
        dec_sym_valid = 1'b0;
      end
      repeat (6 * TB + TB + 20) @(posedge clk);
      $display("noise pass: %0d words, %0d decoded bits", noise.size(), got.size());
      checks++;
      if (got.size() != nexp.size()) begin failures++; $display("noise pass: %0d bits", got.size()); end
      for (int i = 0; i < nexp.size() && i < got.size(); i++) begin
        checks++;
        if (got[i] != nexp[i]) begin failures++; if (failures < 10) $display("noise bit %0d", i); end
      end
    end
    count("encoder tail bits", n_tail);
    count("decoder input stalls", n_stall);
    count("initial metric loads", n_first);
    count("normalisations", n_norm);
    count("RAM block 0 written", int'(banks_seen[0]));
    count("RAM block 1 written", int'(banks_seen[1]));
    count("RAM block 2 written", int'(banks_seen[2]));
    count("minimum searches", n_min);
    count("trace-back blocks", n_blocks);
    count("channel errors corrected", msg_ok ? n_err : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSYM * 5 + NSYM * 9 + NOISE_BLK * TB * 7 + 4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
