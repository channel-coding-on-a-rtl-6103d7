// bmu_tb: applies random branch-words with random bmsig and checks the four
// registered Hamming distances against the document's reference table, and
// that the metrics hold while bmsig is low.
module bmu_tb;
  import codec_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // reset edge for the asynchronous reset
  logic bmsig = 1'b0;
  logic [1:0] bw = '0;
  bm_vec_t bm;
  int checks = 0, failures = 0;
  // Table: rows = received word 00,01,10,11; columns BM0..BM3.
  int table_bm[4][4] = '{'{0, 1, 1, 2}, '{1, 0, 2, 1}, '{1, 2, 0, 1}, '{2, 1, 1, 0}};
  logic [1:0] last_w = 2'b00;

  bmu dut (.clk, .rst_n, .bmsig, .bw, .bm);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      bmsig = (n == 0) ? 1'b1 : 1'($urandom);
      bw    = 2'($urandom);
      @(posedge clk); #1;
      if (bmsig) last_w = bw;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(bm[k]) != table_bm[last_w][k]) begin
          failures++;
          $display("word %b BM%0d=%0d exp %0d", last_w, k, bm[k], table_bm[last_w][k]);
        end
      end
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
