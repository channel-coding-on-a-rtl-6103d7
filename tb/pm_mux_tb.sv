// pm_mux_tb: checks the reset contents, the load of the initial metrics
// (0 for state 0, 200 for the rest) when first is high, the load of the ACSU
// metrics otherwise, and that the register holds while muxsig is low.
module pm_mux_tb;
  localparam int W = 10;
  logic clk = 1'b0, rst_n = 1'b1, muxsig = 1'b0, first = 1'b0;
  initial #2 rst_n = 1'b0;  // reset edge for the asynchronous reset
  logic [63:0][W-1:0] pm_acs, pm_q, expq;
  int checks = 0, failures = 0;

  pm_mux #(.PM_W(W), .PM_INF(200)) dut (.clk, .rst_n, .muxsig, .first, .pm_acs, .pm_q);

  always #5 clk = ~clk;

  function automatic logic [63:0][W-1:0] init_pm();
    logic [63:0][W-1:0] v;
    for (int s = 0; s < 64; s++) v[s] = (s == 0) ? W'(0) : W'(200);
    return v;
  endfunction

  initial begin
    #3;
    checks++;
    if (pm_q !== init_pm()) failures++;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    expq = init_pm();
    for (int n = 0; n < 300; n++) begin
      for (int s = 0; s < 64; s++) pm_acs[s] = W'($urandom);
      muxsig = 1'($urandom);
      first  = ($urandom_range(0, 5) == 0);
      @(posedge clk); #1;
      if (muxsig) expq = first ? init_pm() : pm_acs;
      checks++;
      if (pm_q !== expq) begin failures++; $display("step %0d mismatch", n); end
    end
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
