// minu_tb: presents a new random set of 64 path metrics every cycle (small
// value range, so ties are frequent) with random minsig, and checks that
// min_valid and the lowest-index minimum appear exactly five cycles later.
module minu_tb;
  localparam int W = 10;
  logic clk = 1'b0, rst_n = 1'b1, minsig = 1'b0;
  initial #2 rst_n = 1'b0;  // reset edge for the asynchronous reset
  logic [63:0][W-1:0] pm;
  logic [5:0] min_idx;
  logic min_valid;
  int checks = 0, failures = 0, ties = 0;
  int exp_q[$];
  bit start_q[$];

  minu #(.PM_W(W)) dut (.clk, .rst_n, .minsig, .pm, .min_idx, .min_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      int best, lo, hi, cnt;
      lo = $urandom_range(0, 900); hi = lo + $urandom_range(0, 20);
      for (int s = 0; s < 64; s++) pm[s] = W'($urandom_range(lo, hi));
      best = 0; cnt = 1;
      for (int s = 1; s < 64; s++) begin
        if (pm[s] < pm[best]) begin best = s; cnt = 1; end
        else if (pm[s] == pm[best]) cnt++;
      end
      minsig = 1'($urandom);
      if (minsig && cnt > 1) ties++;
      exp_q.push_back(best); start_q.push_back(minsig);
      @(posedge clk); #1;
      if (start_q.size() == 5) begin
        int e; bit v;
        e = exp_q.pop_front(); v = start_q.pop_front();
        checks++;
        if (min_valid !== v || (v && int'(min_idx) != e)) begin
          failures++;
          $display("n=%0d valid %0b exp %0b idx %0d exp %0d", n, min_valid, v, min_idx, e);
        end
      end
    end
    checks++;
    if (ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
