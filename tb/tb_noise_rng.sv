// tb_noise_rng: self-checking test of the noise generator. The xorshift
// sequence is recomputed here and each noise value must match amp times the
// expected sample; over 20000 draws, the uniform mode must have mean near 0
// and variance near 1/3, and the Gaussian mode mean near 0 and variance near
// 1 (scaled by amp squared). Reseeding must restart the same sequence.
module tb_noise_rng;
  import nf_tb_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic seed_load = 0, next = 0, gauss = 0;
  logic [31:0] seed = 32'h12345678, amp, noise;
  int checks = 0, failures = 0;
  localparam int LANE = 3;
  logic [31:0] s;

  noise_rng #(.LANE(LANE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] xs(input logic [31:0] x);
    x = x ^ (x << 13); x = x ^ (x >> 17); x = x ^ (x << 5);
    return x;
  endfunction

  function automatic real sample(input logic [31:0] x, input bit g);
    if (!g) return real'($signed(x[15:0])) / 32768.0;
    return real'(($signed(int'(x[7:0]) + int'(x[15:8]) + int'(x[23:16]) + int'(x[31:24]) - 510) * 887) >>> 10) / 128.0;
  endfunction

  task automatic run(input bit g, input real a, input real var_want);
    real sum = 0.0, sq = 0.0, m, v;
    int n = 20000;
    gauss = g; amp = r2f(a);
    @(negedge clk);
    seed_load = 1; @(negedge clk); seed_load = 0;
    s = seed ^ (32'h9E3779B9 * 32'(LANE + 1));
    for (int i = 0; i < n; i++) begin
      real want, got, err;
      #1;
      want = a * sample(s, g);
      got  = f2r(noise);
      err  = got - want; if (err < 0) err = -err;
      checks++;
      if (err > 1e-5 * (a < 0 ? -a : a)) begin
        failures++;
        if (failures < 10) $display("FAIL draw %0d got %g want %g", i, got, want);
      end
      sum += got; sq += got * got;
      next = 1; @(negedge clk); next = 0;
      s = xs(s);
    end
    m = sum / n; v = sq / n - m * m;
    checks++;
    if (m > 0.03 * a || m < -0.03 * a || v < 0.93 * var_want * a * a || v > 1.07 * var_want * a * a) begin
      failures++;
      $display("FAIL statistics mode %0d mean %g var %g", g, m, v);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 2.0, 1.0 / 3.0);
    run(1, 5.0, 1.0);
    run(1, 5.0, 1.0);   // reseeded: same sequence again, still checked draw by draw
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
