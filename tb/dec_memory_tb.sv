// dec_memory_tb: writes blocks of random decision vectors while the bank
// FSMs rotate, and reads back each finished block in reverse address order
// while the next one is written. Checks the one-hot bank sequence, that the
// read bank is always the block last completed, the data, and the one-cycle
// read latency.
module dec_memory_tb;
  import codec_pkg::*;
  localparam int TB = 7;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #2 rst_n = 1'b0;  // reset edge for the asynchronous reset
  logic musig = 1'b0, memwrite = 1'b0, memread = 1'b0, rd_en = 1'b0;
  logic [ADDR_W-1:0] wr_addr = '0, rd_addr = '0;
  logic [63:0] wr_data = '0, rd_data;
  logic [2:0] wsel, rsel;
  int checks = 0, failures = 0;
  logic [63:0] model[3][TB];

  dec_memory #(.TB(TB)) dut (.clk, .rst_n, .musig, .wr_addr, .wr_data, .memwrite, .memread,
                             .rd_en, .rd_addr, .rd_data, .wsel, .rsel);

  always #5 clk = ~clk;

  function automatic int bank(logic [2:0] oh);
    return oh[0] ? 0 : (oh[1] ? 1 : 2);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (wsel !== 3'b001 || rsel !== 3'b100) failures++;
    for (int blk = 0; blk < 10; blk++) begin
      int wb, rb;
      wb = bank(wsel); rb = bank(rsel);
      checks++;
      if (wb != blk % 3 || rb != (blk + 2) % 3) begin failures++; $display("block %0d banks %b %b", blk, wsel, rsel); end
      for (int t = 0; t < TB; t++) begin
        // write word t of this block
        musig = 1'b1; wr_addr = ADDR_W'(t); wr_data = {$urandom, $urandom};
        model[wb][t] = wr_data;
        memwrite = (t == TB - 1); memread = (t == TB - 1);
        // read word TB-1-t of the previous block
        rd_en = (blk > 0); rd_addr = ADDR_W'(TB - 1 - t);
        @(posedge clk); #1;
        musig = 1'b0; memwrite = 1'b0; memread = 1'b0;
        if (rd_en) begin
          checks++;
          if (rd_data !== model[rb][TB - 1 - t]) begin failures++; $display("block %0d addr %0d", blk - 1, TB - 1 - t); end
        end
        rd_en = 1'b0;
        // the data holds while rd_en is low
        @(posedge clk); #1;
        if (blk > 0 && t != TB - 1) begin
          checks++;
          if (rd_data !== model[rb][TB - 1 - t]) failures++;
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
