// conv_encoder_core_tb: feeds random bits to the encoder core with a
// randomly spaced enc_ctrl strobe and compares C1 and inverted C2 with the
// reference parities; also checks that outputs hold between strobes.
module conv_encoder_core_tb;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // reset edge for the asynchronous reset
  logic enc_ctrl = 1'b0, din = 1'b0, c1, c2_n;
  int checks = 0, failures = 0;
  bit h[7];

  conv_encoder_core dut (.clk, .rst_n, .enc_ctrl, .din, .c1, .c2_n);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (h[i]) h[i] = 1'b0;
    for (int n = 0; n < 500; n++) begin
      bit b, e1, e2;
      b = 1'($urandom);
      if (n >= 50 && n < 60) b = 1'b1;   // all-ones run
      if (n >= 80 && n < 90) b = 1'b0;   // all-zeros run
      e1 = ref_c1(b, h[1], h[2], h[3], h[4], h[5], h[6]);
      e2 = ref_c2(b, h[1], h[2], h[3], h[4], h[5], h[6]);
      enc_ctrl = 1'b1; din = b;
      @(posedge clk); #1;
      enc_ctrl = 1'b0; din = 1'($urandom);
      for (int i = 6; i > 1; i--) h[i] = h[i-1];
      h[1] = b;
      checks++;
      if (c1 !== e1 || c2_n !== ~e2) begin
        failures++;
        $display("bit %0d: c1=%0b exp %0b, c2_n=%0b exp %0b", n, c1, e1, c2_n, ~e2);
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
      checks++;
      if (c1 !== e1 || c2_n !== ~e2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
