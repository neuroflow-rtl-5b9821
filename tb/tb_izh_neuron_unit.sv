// tb_izh_neuron_unit: self-checking test of the Izhikevich update module.
// Random neurons (regular-spiking and fast-spiking parameter sets, membrane
// potentials from -80 to +29 mV, random input currents) are fed one per
// cycle back to back. A double-precision reference of the same Euler step and
// reset rule is computed here; v and u must match within 1e-3 and the spike
// flag exactly (cases within 1e-3 of threshold are not compared). Each result
// must appear exactly 6 cycles after its input, with the tag it went in with.
module tb_izh_neuron_unit;
  import nf_tb_pkg::*;
  localparam int LAT = 6;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic in_valid = 0;
  logic [15:0] in_tag = 0;
  logic [31:0] v, u, a, b, c, d, i_syn, i_ext, i_noise;
  logic out_valid, spike;
  logic [15:0] out_tag;
  logic [31:0] v_new, u_new;
  int checks = 0, failures = 0, cycle = 0, spikes = 0;

  typedef struct { real v, u, spk, vn; int cyc; } exp_t;
  exp_t exp_q [$];

  izh_neuron_unit #(.TAG_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rrange(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  // compare outputs at each negedge
  always @(negedge clk) begin
    if (out_valid) begin
      exp_t e;
      real dv, du;
      e = exp_q.pop_front();
      checks++;
      if (cycle - e.cyc != LAT || out_tag != 16'(e.cyc)) begin
        failures++;
        $display("FAIL latency/tag: %0d cycles, tag %0d", cycle - e.cyc, out_tag);
      end
      if (e.vn - 30.0 > 1e-3 || 30.0 - e.vn > 1e-3) begin
        dv = f2r(v_new) - e.v; if (dv < 0) dv = -dv;
        du = f2r(u_new) - e.u; if (du < 0) du = -du;
        checks++;
        if (dv > 1e-3 || du > 1e-3 || spike != (e.spk > 0.5)) begin
          failures++;
          if (failures < 10) $display("FAIL v %g/%g u %g/%g spike %0d", f2r(v_new), e.v, f2r(u_new), e.u, spike);
        end
        if (spike) spikes++;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      real rv, ru, ra, rb, rc, rd, ri, re, rn, vn, un;
      exp_t e;
      @(negedge clk);
      if (i % 2 == 0) begin ra = 0.02; rb = 0.2; rc = -65.0; rd = 8.0; end
      else            begin ra = 0.1;  rb = 0.2; rc = -65.0; rd = 2.0; end
      rv = rrange(-80.0, 29.0);
      ru = rb * rv + rrange(-5.0, 5.0);
      ri = rrange(-10.0, 20.0); re = rrange(0.0, 10.0); rn = rrange(-2.0, 2.0);
      v = r2f(rv); u = r2f(ru); a = r2f(ra); b = r2f(rb); c = r2f(rc); d = r2f(rd);
      i_syn = r2f(ri); i_ext = r2f(re); i_noise = r2f(rn);
      // reference with the values as rounded to single precision
      rv = f2r(v); ru = f2r(u); ra = f2r(a); rb = f2r(b); rc = f2r(c); rd = f2r(d);
      vn = rv + (0.04 * rv * rv + 5.0 * rv + 140.0 - ru + f2r(i_syn) + f2r(i_ext) + f2r(i_noise));
      un = ru + ra * (rb * rv - ru);
      e.vn = vn;
      if (vn >= 30.0) begin e.v = rc; e.u = un + rd; e.spk = 1.0; end
      else            begin e.v = vn; e.u = un;      e.spk = 0.0; end
      e.cyc = cycle;
      in_valid = 1; in_tag = 16'(cycle);
      exp_q.push_back(e);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || spikes == 0) begin
      failures++;
      $display("FAIL %0d results missing, %0d spikes", exp_q.size(), spikes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
