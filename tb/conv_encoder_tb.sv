// conv_encoder_tb: encodes 3200 random bits plus 7 tail zeros and checks the
// serial output symbol by symbol (C1, then inverted C2) against the
// reference encoder, the 5-cycle rate (one din_strobe every 5 clocks) and the
// position of the two output cycles (2 and 3 cycles after din_strobe).
module conv_encoder_tb;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // reset edge for the asynchronous reset
  logic din = 1'b0, din_strobe, dout, dout_valid;
  int checks = 0, failures = 0;
  localparam int NBITS = 3207;
  bit data[$];
  bit [1:0] bws[$];

  conv_encoder dut (.clk, .rst_n, .din, .din_strobe, .dout, .dout_valid);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < NBITS; i++) data.push_back(i < 3200 ? 1'($urandom) : 1'b0);
    ref_encode(data, bws);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < NBITS; i++) begin
      int gap;
      gap = 0;
      while (!din_strobe) begin @(posedge clk); #1; gap++; end
      if (i > 0) begin checks++; if (gap != 2) begin failures++; $display("gap %0d", gap); end end
      din = data[i];
      @(posedge clk); #1;              // sampled; cycle 3 follows
      din = 1'($urandom);
      checks++;
      if (dout_valid) failures++;
      @(posedge clk); #1;              // cycle 4: C1
      checks++;
      if (!dout_valid || dout !== bws[i][1]) begin failures++; $display("bit %0d C1", i); end
      @(posedge clk); #1;              // cycle 5: C2 inverted
      checks++;
      if (!dout_valid || dout !== ~bws[i][0]) begin failures++; $display("bit %0d C2", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBITS * 5 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
