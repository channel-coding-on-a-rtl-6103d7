// enc_selector_tb: drives two-cycle mux_ctrl windows with random symbol
// pairs and checks that the output carries C1 in the first and C2bar in the
// second cycle, with dout_valid only inside the window.
module enc_selector_tb;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // reset edge for the asynchronous reset
  logic mux_ctrl = 1'b0, c1 = 1'b0, c2_n = 1'b0, dout, dout_valid;
  int checks = 0, failures = 0;

  enc_selector dut (.clk, .rst_n, .mux_ctrl, .c1, .c2_n, .dout, .dout_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      c1 = 1'($urandom); c2_n = 1'($urandom);
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1;
        checks++;
        if (dout_valid) failures++;
      end
      mux_ctrl = 1'b1; #1;
      checks++;
      if (!dout_valid || dout !== c1) begin failures++; $display("pair %0d first", n); end
      @(posedge clk); #1;
      checks++;
      if (!dout_valid || dout !== c2_n) begin failures++; $display("pair %0d second", n); end
      @(posedge clk); #1;
      mux_ctrl = 1'b0;
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
