// enc_signal_gen_tb: checks the five-cycle strobe pattern of the encoder's
// signal generator (enc_ctrl in cycle 2, mux_ctrl in cycles 4 and 5) over
// many operations and across a reset in the middle of an operation.
module enc_signal_gen_tb;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // reset edge for the asynchronous reset
  logic enc_ctrl, mux_ctrl;
  int checks = 0, failures = 0;

  enc_signal_gen dut (.clk, .rst_n, .enc_ctrl, .mux_ctrl);

  always #5 clk = ~clk;

  task automatic check_cycles(int n);
    for (int c = 0; c < n; c++) begin
      int ph = c % 5;
      checks++;
      if (enc_ctrl !== (ph == 1) || mux_ctrl !== (ph == 3 || ph == 4)) begin
        failures++;
        $display("cycle %0d: enc_ctrl=%0b mux_ctrl=%0b", c, enc_ctrl, mux_ctrl);
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check_cycles(53);
    rst_n = 1'b0; #1;
    checks++;
    if (enc_ctrl || mux_ctrl) failures++;
    @(posedge clk); #1 rst_n = 1'b1;
    check_cycles(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
