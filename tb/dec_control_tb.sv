// dec_control_tb: offers branch-words with random gaps to the control unit
// (TB = 5) and checks every control strobe cycle by cycle against a
// schedule derived from the accepted words: the six-phase sequence, the
// first-word flag, write addresses, block-end strobes, the read and
// trace-back schedule, and the 6*TB+5 latency of the first block when words
// arrive back to back.
module dec_control_tb;
  import codec_pkg::*;
  localparam int TB = 5;
  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0, in_ready;
  initial #2 rst_n = 1'b0;  // reset edge for the asynchronous reset
  dec_ctl_t ctl;
  int checks = 0, failures = 0;
  int cyc = 0, words = 0, last_bm = -100, first_tbsig = -1;
  // expected strobes per cycle
  bit e_mux[int], e_first[int], e_acs[int], e_mu[int], e_mw[int], e_min[int];
  bit e_rd[int], e_tb[int], e_tbs[int], e_tbl[int];
  int e_wa[int], e_ra[int];

  dec_control #(.TB(TB)) dut (.clk, .rst_n, .in_valid, .in_ready, .ctl);

  always #5 clk = ~clk;

  task automatic cmp(string name, bit got, bit exp);
    checks++;
    if (got !== exp) begin failures++; $display("cycle %0d %s=%0b exp %0b", cyc, name, got, exp); end
  endtask

  // Sample just before each rising edge.
  always @(negedge clk) if (rst_n) begin
    if (ctl.bmsig) begin
      int t;
      t = words % TB;
      checks++;
      if (!in_valid || !in_ready || cyc - last_bm < 6) begin failures++; $display("bad bmsig at %0d", cyc); end
      last_bm = cyc;
      e_mux[cyc+1] = 1; e_first[cyc+1] = (words == 0);
      e_acs[cyc+2] = 1; e_mu[cyc+3] = 1; e_wa[cyc+3] = t;
      if (t == TB - 1) begin
        e_mw[cyc+3] = 1; e_min[cyc+5] = 1;
        for (int k = 0; k < TB; k++) begin
          e_rd[cyc+9+k] = 1; e_ra[cyc+9+k] = TB - 1 - k;
          e_tb[cyc+10+k] = 1; e_tbs[cyc+10+k] = (k == 0); e_tbl[cyc+10+k] = (k == TB - 1);
        end
      end
      words++;
    end else begin
      checks++;
      if (in_valid && in_ready) begin failures++; $display("word not taken at %0d", cyc); end
    end
    cmp("muxsig", ctl.muxsig, e_mux.exists(cyc));
    if (ctl.muxsig) cmp("first", ctl.first, e_first.exists(cyc) && e_first[cyc]);
    cmp("acssig", ctl.acssig, e_acs.exists(cyc));
    cmp("musig", ctl.musig, e_mu.exists(cyc));
    if (ctl.musig) begin checks++; if (int'(ctl.wr_addr) != e_wa[cyc]) failures++; end
    cmp("memwrite", ctl.memwrite, e_mw.exists(cyc));
    cmp("memread", ctl.memread, e_mw.exists(cyc));
    cmp("minsig", ctl.minsig, e_min.exists(cyc));
    cmp("rd_en", ctl.rd_en, e_rd.exists(cyc));
    if (ctl.rd_en) begin checks++; if (int'(ctl.rd_addr) != e_ra[cyc]) failures++; end
    cmp("tbsig", ctl.tbsig, e_tb.exists(cyc));
    cmp("tbenb", ctl.tbenb, e_tb.exists(cyc) || e_rd.exists(cyc));
    cmp("tbstart", ctl.tbstart, e_tbs.exists(cyc) && e_tbs[cyc]);
    cmp("tblast", ctl.tblast, e_tbl.exists(cyc) && e_tbl[cyc]);
    if (ctl.tbsig && first_tbsig < 0) first_tbsig = cyc;
  end

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // First block back to back: the first word is taken in cycle 0.
    in_valid = 1'b1;
    repeat (6 * TB + 20) @(posedge clk);
    #1;
    checks++;
    // The decoded bit of the first step is registered one cycle later.
    if (first_tbsig + 1 != 6 * TB + 5) begin failures++; $display("latency %0d", first_tbsig + 1); end
    // Then random gaps.
    for (int n = 0; n < 400; n++) begin
      in_valid = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    repeat (80) @(posedge clk);
    checks++;
    if (words < 6 * TB) failures++;
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
