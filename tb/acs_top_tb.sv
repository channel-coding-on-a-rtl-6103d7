// acs_top_tb: random path metrics and received branch-words into the
// 64-state ACSU; the registered metrics and decision vector are compared
// with a reference trellis step built from the reference encoder. A second
// phase uses metrics high enough that normalisation must happen and checks
// that exactly the top bit is removed.
module acs_top_tb;
  import codec_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 10;
  logic clk = 1'b0, rst_n = 1'b1, acssig = 1'b0;
  initial #2 rst_n = 1'b0;  // reset edge for the asynchronous reset
  bm_vec_t bm;
  logic [63:0][W-1:0] pm_in, pm_out;
  logic [63:0] dec;
  logic norm_event;
  int checks = 0, failures = 0, norms = 0;

  acs_top #(.PM_W(W)) dut (.clk, .rst_n, .acssig, .bm, .pm_in, .pm_out, .dec, .norm_event);

  always #5 clk = ~clk;

  task automatic run(int lo, int hi, bit expect_norm);
    int pin[64], epm[64];
    bit edec[64];
    bit [1:0] w;
    bit all_hi;
    w = 2'($urandom);
    for (int k = 0; k < 4; k++) bm[k] = bm_t'(hd2(w, 2'(k)));
    for (int s = 0; s < 64; s++) begin pin[s] = $urandom_range(lo, hi); pm_in[s] = W'(pin[s]); end
    all_hi = 1'b1;
    for (int s = 0; s < 64; s++) begin
      int pa, pb, ma, mb;
      pa = (s & 31) << 1; pb = pa | 1;
      ma = pin[pa] + hd2(w, ref_bw(pa, s[5]));
      mb = pin[pb] + hd2(w, ref_bw(pb, s[5]));
      edec[s] = ma > mb;
      epm[s]  = edec[s] ? mb : ma;
      if (epm[s] < 512) all_hi = 1'b0;
    end
    if (all_hi) for (int s = 0; s < 64; s++) epm[s] -= 512;
    acssig = 1'b1;
    @(posedge clk); #1;
    acssig = 1'b0;
    checks++;
    if (norm_event !== all_hi || all_hi !== expect_norm) begin failures++; $display("norm flag %0b exp %0b", norm_event, all_hi); end
    if (norm_event) norms++;
    for (int s = 0; s < 64; s++) begin
      checks++;
      if (int'(pm_out[s]) != epm[s] || dec[s] !== edec[s]) begin
        failures++;
        $display("state %0d: pm %0d exp %0d, dec %0b exp %0b", s, pm_out[s], epm[s], dec[s], edec[s]);
      end
    end
    // Hold while acssig is low.
    pm_in = '0;
    @(posedge clk); #1;
    checks++;
    if (int'(pm_out[0]) != epm[0]) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 200; n++) run(0, 200, 1'b0);
    for (int n = 0; n < 20; n++)  run(500, 506, 1'b0);   // some stay below 512
    for (int n = 0; n < 50; n++)  run(512, 520, 1'b1);   // all cross: normalise
    checks++;
    if (norms != 50) failures++;
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
