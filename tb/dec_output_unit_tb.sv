// dec_output_unit_tb: the output unit (memory unit, MINU, TBU) driven by the
// decoder control unit (TB = 8) with random decision vectors and path
// metrics that change every cycle. The testbench records the decision
// vector present at each musig and the metrics at each minsig, traces each
// block back itself from the lowest-metric state, and compares every
// decoded bit (newest first), out_last and the output timing (first bit
// 5 + 1 cycles after minsig).
module dec_output_unit_tb;
  import codec_pkg::*;
  localparam int TB = 8, W = 10, NBLK = 12;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // reset edge for the asynchronous reset
  logic in_valid = 1'b0, in_ready;
  dec_ctl_t ctl;
  logic [63:0] dec;
  logic [63:0][W-1:0] pm;
  logic out_bit, out_valid, out_last;
  int checks = 0, failures = 0, cyc = 0, blocks_done = 0;
  logic [63:0] blk_dec[$];
  int exp_bits[$], exp_last[$], exp_time[$];

  dec_control #(.TB(TB)) u_ctl (.clk, .rst_n, .in_valid, .in_ready, .ctl);
  dec_output_unit #(.TB(TB), .PM_W(W)) dut (.clk, .rst_n, .ctl, .dec, .pm, .out_bit, .out_valid, .out_last);

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    if (ctl.musig) blk_dec.push_back(dec);
    if (ctl.minsig) begin
      int best, cur;
      best = 0;
      for (int s = 1; s < 64; s++) if (pm[s] < pm[best]) best = s;
      cur = best;
      for (int t = TB - 1; t >= 0; t--) begin
        exp_bits.push_back(cur >> 5);
        exp_last.push_back(t == 0);
        exp_time.push_back(cyc + 6 + (TB - 1 - t));
        cur = ((cur & 31) << 1) | int'(blk_dec[t][cur]);
      end
      blk_dec.delete();
    end
    if (out_valid) begin
      checks++;
      if (exp_bits.size() == 0) begin failures++; $display("unexpected output at %0d", cyc); end
      else begin
        int eb, el, et;
        eb = exp_bits.pop_front(); el = exp_last.pop_front(); et = exp_time.pop_front();
        if (int'(out_bit) != eb || int'(out_last) != el || cyc != et) begin
          failures++;
          $display("cycle %0d: bit %0b exp %0d last %0b exp %0d time exp %0d", cyc, out_bit, eb, out_last, el, et);
        end
        if (out_last) blocks_done++;
      end
    end
  end

  // New random inputs shortly after every rising edge.
  always @(posedge clk) begin
    #1;
    dec = {$urandom, $urandom};
    for (int s = 0; s < 64; s++) pm[s] = W'($urandom_range(100, 130));
  end

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NBLK * TB * 6 * 2; n++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (blocks_done >= NBLK) break;
    end
    in_valid = 1'b0;
    repeat (6 * TB + 20) @(posedge clk);
    checks++;
    if (blocks_done < NBLK || exp_bits.size() != 0) begin failures++; $display("blocks %0d", blocks_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * TB * 12 + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
