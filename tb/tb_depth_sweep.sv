// tb_depth_sweep: the decoder at the trace-back depths the design was
// evaluated with, TB = 21, 28, 35, 42, 49 and 70 (3 to 10 times the
// constraint length), each decoding the 3207-symbol test stream once clean
// and once through a channel with 0.5 % bit errors. Each depth is checked
// bit-exactly against the reference block decoder, and the first-bit
// latency against 6*TB+5 (215, 299 and 425 cycles for TB 35, 49 and 70).
module tb_depth_sweep;
  localparam int N = 6;
  localparam int DEPTHS[N] = '{21, 28, 35, 42, 49, 70};
  logic clk = 1'b0;
  logic [N-1:0] done;
  int c[N], f[N], e[N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_depth
    depth_run #(.TB(DEPTHS[i])) u_run (.clk, .done(done[i]), .checks(c[i]), .failures(f[i]), .errors_in(e[i]));
  end

  initial begin
    wait (&done);
    for (int i = 0; i < N; i++) begin
      $display("TB=%0d: %0d checks, %0d failures, %0d channel errors", DEPTHS[i], c[i], f[i], e[i]);
      checks += c[i]; failures += f[i];
      checks++;
      if (e[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * 3300 * 6 + 4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
