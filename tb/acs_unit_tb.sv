// acs_unit_tb: random and corner path/branch metrics into one butterfly;
// new metrics and decision bits are compared with the add-compare-select
// rule (decision 1 only when the B path is strictly better).
module acs_unit_tb;
  import codec_pkg::*;
  localparam int W = 10;
  logic [W-1:0] pm_a, pm_b, pm_c, pm_d;
  bm_t bm_top, bm_bot;
  logic dec0, dec1;
  int checks = 0, failures = 0;

  acs_unit #(.PM_W(W)) dut (.pm_a, .pm_b, .bm_top, .bm_bot, .pm_c, .pm_d, .dec0, .dec1);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int a, b, t, u, ec, ed;
      bit e0, e1;
      a = $urandom_range(0, 520); b = (n % 4 == 0) ? a : $urandom_range(0, 520);
      t = $urandom_range(0, 2);  u = $urandom_range(0, 2);
      pm_a = W'(a); pm_b = W'(b); bm_top = bm_t'(t); bm_bot = bm_t'(u);
      #1;
      e0 = (a + t) > (b + u); ec = e0 ? b + u : a + t;
      e1 = (a + u) > (b + t); ed = e1 ? b + t : a + u;
      checks++;
      if (dec0 !== e0 || dec1 !== e1 || int'(pm_c) != ec || int'(pm_d) != ed) begin
        failures++;
        $display("a=%0d b=%0d t=%0d u=%0d -> %0d %0d %0b %0b", a, b, t, u, pm_c, pm_d, dec0, dec1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
