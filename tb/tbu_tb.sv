// tbu_tb: traces back blocks of random decision vectors from a random start
// state and compares the emitted bits (newest first), out_valid and out_last
// with a reference trace-back; pauses between steps check that the unit
// only moves on tbenb and tbsig.
module tbu_tb;
  localparam int TB = 20;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // reset edge for the asynchronous reset
  logic tbenb = 1'b0, tbstart = 1'b0, tbsig = 1'b0, tblast = 1'b0;
  logic [5:0] min_idx = '0;
  logic [63:0] dec_row = '0;
  logic out_bit, out_valid, out_last;
  int checks = 0, failures = 0;

  tbu dut (.clk, .rst_n, .tbenb, .tbstart, .tbsig, .tblast, .min_idx, .dec_row,
           .out_bit, .out_valid, .out_last);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int blk = 0; blk < 30; blk++) begin
      logic [63:0] d[TB];
      int cur;
      foreach (d[t]) d[t] = {$urandom, $urandom};
      min_idx = 6'($urandom);
      cur = int'(min_idx);
      for (int t = TB - 1; t >= 0; t--) begin
        int eb;
        eb = cur >> 5;
        tbenb = 1'b1; tbsig = 1'b1; tbstart = (t == TB - 1); tblast = (t == 0);
        dec_row = d[t];
        @(posedge clk); #1;
        tbenb = 1'b0; tbsig = 1'b0; tbstart = 1'b0; tblast = 1'b0;
        min_idx = 6'($urandom);          // must be ignored after the first step
        checks++;
        if (!out_valid || out_bit !== 1'(eb) || out_last !== (t == 0)) begin
          failures++;
          $display("blk %0d t %0d: bit %0b exp %0d last %0b", blk, t, out_bit, eb, out_last);
        end
        cur = ((cur & 31) << 1) | int'(d[t][cur]);
        if ($urandom_range(0, 3) == 0) begin
          dec_row = {$urandom, $urandom};
          tbenb = 1'($urandom);
          @(posedge clk); #1;
          tbenb = 1'b0;
          checks++;
          if (out_valid) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
