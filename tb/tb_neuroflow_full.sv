// tb_neuroflow_full: the simulator at its default size, end to end.
//
// The top is instantiated with every parameter at its default: 98,304
// neurons in 8,192 memory words of 12 records, 24 synapse lanes of 4,096
// neurons, 16 delay slots. All neurons are loaded; neurons 0..4095 have
// synaptic rows of 1 to 3 words whose packets target the first 192 neurons
// (so those receive much input and back-to-back packets), the rest have
// none. Neurons 0..2047 are driven by an external current. After the lanes'
// clearing sweep the network runs 8 steps without noise and 2 with uniform
// noise, memory back-pressure starting at step 4. Each step's spike set must
// equal that of a reference that rounds every operation to single precision
// (each step starting from the state in memory); at the end every neuron's
// v and u in memory and the monitored potentials are compared, and the
// mechanisms of the end-to-end test must each have happened.
module tb_neuroflow_full;
  import nf_pkg::*;
  import nf_tb_pkg::*;

  localparam int N_PE = 12, SYN_LANES = 24, N_NEURONS = 98304, N_SRC = 16, N_MON = 4, MON_DEPTH = 1024;
  localparam int N_WORDS = N_NEURONS / N_PE;
  localparam int PER_LANE = N_NEURONS / SYN_LANES;
  localparam int SYN_WORDS = 16384;
  localparam int STEPS1 = 8, STEPS2 = 2;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic host_wr_en = 0;
  logic [15:0] host_wr_addr = 0;
  logic [31:0] host_wr_data = 0;
  logic run = 0, clear_t = 0;
  logic [31:0] n_steps = 0;
  logic [13:0] n_words = 14'(N_WORDS);
  logic [31:0] nbase = 0;
  logic busy, step_done, done, lanes_ready;
  logic [31:0] t_step;
  logic nrd_req_valid, nrd_req_ready, nrd_rsp_valid, nwr_valid;
  logic [12:0] nrd_req_addr, nwr_addr;
  logic [N_PE*REC_W-1:0] nrd_rsp_data, nwr_data;
  logic srd_req_valid, srd_req_ready, srd_rsp_valid;
  logic [31:0] srd_req_addr;
  logic [SYN_LANES*PKT_W-1:0] srd_rsp_data;
  logic spk_valid;
  logic [31:0] spk_t, spk_base;
  logic [N_PE-1:0] spk_mask;
  logic [1:0] mon_rd_slot = 0;
  logic [9:0] mon_rd_t = 0;
  logic [31:0] mon_rd_data, mon_hits, rows_done, words_done;
  int n_ready = 100, s_ready = 100;
  int n_stalls, s_stalls;

  neuroflow_top dut (.*);

  tb_mem_model #(.DW(N_PE*REC_W), .DEPTH(N_WORDS), .AW(13), .LAT(3)) nmem (
    .clk, .ready_pct(n_ready), .req_valid(nrd_req_valid), .req_ready(nrd_req_ready),
    .req_addr(nrd_req_addr), .rsp_valid(nrd_rsp_valid), .rsp_data(nrd_rsp_data),
    .wr_valid(nwr_valid), .wr_addr(nwr_addr), .wr_data(nwr_data), .stalls(n_stalls));

  tb_mem_model #(.DW(SYN_LANES*PKT_W), .DEPTH(SYN_WORDS), .AW(32), .LAT(4)) smem (
    .clk, .ready_pct(s_ready), .req_valid(srd_req_valid), .req_ready(srd_req_ready),
    .req_addr(srd_req_addr), .rsp_valid(srd_rsp_valid), .rsp_data(srd_rsp_data),
    .wr_valid(1'b0), .wr_addr(32'd0), .wr_data('0), .stalls(s_stalls));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference network ------------------------------------------------------------
  real rv [N_NEURONS], ru [N_NEURONS], ra [N_NEURONS], rb [N_NEURONS], rc [N_NEURONS], rd [N_NEURONS];
  int  row_ptr [N_NEURONS], row_len [N_NEURONS];
  longint acc [N_NEURONS][16];
  logic [31:0] rng_s [N_PE];
  real mon_ref [2][MON_DEPTH];
  int mon_n [2] = '{5, 50};
  bit ref_spk [N_NEURONS];
  bit hw_spk [N_NEURONS];
  real noise_amp_r = 0.0;
  int inj_lo [2] = '{0, 3000}, inj_hi [2] = '{2047, 3100}, inj_st [2] = '{0, 2}, inj_sp [2] = '{40, 30};
  real inj_amp [2] = '{12.0, 8.0};

  // mechanism counters
  int c_spikes = 0, c_multirow = 0, c_zerorow = 0, c_fwd = 0, c_wrap = 0, c_ext = 0, c_noise = 0;

  function automatic real fr(input real x);   // round to single precision
    return f2r(r2f(x));
  endfunction

  function automatic logic [31:0] xs(input logic [31:0] x);
    x = x ^ (x << 13); x = x ^ (x >> 17); x = x ^ (x << 5);
    return x;
  endfunction

  // start a step's reference from the state held in memory, so that one-ulp
  // differences are not amplified by the Euler step over many steps
  task automatic sync_from_mem();
    for (int n = 0; n < N_NEURONS; n++) begin
      neuron_rec_t r;
      r = nmem.mem[n / N_PE][(n % N_PE)*REC_W +: REC_W];
      rv[n] = f2r(r.v); ru[n] = f2r(r.u);
    end
  endtask

  task automatic ref_step(input int t);
    real c004;
    c004 = f2r(FP_0P04);
    for (int n = 0; n < N_NEURONS; n++) begin
      real v, u, isyn, iext, inoise, vv, v5, bv, is1, t1, t2, du0, is, t3, t4, du, dv, un, vn, ud;
      int j;
      j = n % N_PE;
      v = rv[n]; u = ru[n];
      isyn = real'(acc[n][t % 16]) / 1024.0;
      acc[n][t % 16] = 0;
      iext = 0.0;
      for (int e = 0; e < 2; e++)
        if (n >= inj_lo[e] && n <= inj_hi[e] && t >= inj_st[e] && t < inj_sp[e]) iext += inj_amp[e];
      if (iext != 0.0) c_ext++;
      inoise = fr(noise_amp_r * (real'($signed(rng_s[j][15:0])) / 32768.0));
      if (inoise != 0.0) c_noise++;
      rng_s[j] = xs(rng_s[j]);
      vv = fr(v * v); v5 = fr(5.0 * v); bv = fr(rb[n] * v); is1 = fr(isyn + iext);
      t1 = fr(c004 * vv); t2 = fr(v5 + 140.0); du0 = fr(bv - u); is = fr(is1 + inoise);
      t3 = fr(t1 + t2); t4 = fr(is - u); du = fr(ra[n] * du0);
      dv = fr(t3 + t4); un = fr(u + du);
      vn = fr(v + dv); ud = fr(un + rd[n]);
      ref_spk[n] = (vn >= 30.0);
      if (ref_spk[n]) begin rv[n] = rc[n]; ru[n] = ud; end
      else            begin rv[n] = vn;    ru[n] = un; end
      for (int m = 0; m < 2; m++) if (mon_n[m] == n) mon_ref[m][t % MON_DEPTH] = rv[n];
    end
    // synaptic accumulation of this step's spikes
    for (int n = 0; n < N_NEURONS; n++) if (ref_spk[n]) begin
      c_spikes++;
      if (row_len[n] > 1) c_multirow++;
      if (row_len[n] == 0) c_zerorow++;
      for (int w = 0; w < row_len[n]; w++) begin
        logic [SYN_LANES*PKT_W-1:0] word;
        word = smem.mem[row_ptr[n] + w];
        for (int l = 0; l < SYN_LANES; l++) begin
          syn_pkt_t p;
          int tgt, slot;
          p = word[l*PKT_W +: PKT_W];
          tgt = int'(p.nidx) * SYN_LANES + l;
          slot = (t + int'(p.delay) + 1) % 16;
          if (t + int'(p.delay) + 1 >= 16 && p.weight != 0) c_wrap++;
          acc[tgt][slot] += longint'(p.weight);
        end
      end
    end
  endtask

  // collect hardware spikes of each step
  always @(posedge clk) begin
    if (spk_valid)
      for (int j = 0; j < N_PE; j++)
        if (spk_mask[j]) hw_spk[int'(spk_base) + j] = 1'b1;
  end

  // forwarding events in lane 0..SYN_LANES-1
  for (genvar l = 0; l < SYN_LANES; l++) begin : g_fwd
    always @(posedge clk)
      if (dut.g_lane[l].u_lane.s1_valid && dut.g_lane[l].u_lane.last_wr &&
          dut.g_lane[l].u_lane.last_addr == dut.g_lane[l].u_lane.s1_addr) c_fwd++;
  end

  task automatic host_wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    host_wr_en = 1; host_wr_addr = a; host_wr_data = d;
    @(negedge clk);
    host_wr_en = 0;
  endtask

  task automatic run_steps(input int first, input int count);
    for (int s = 0; s < count; s++) begin
      int t, c0, c1;
      t = first + s;
      foreach (hw_spk[n]) hw_spk[n] = 0;
      sync_from_mem();
      @(negedge clk);
      run = 1; n_steps = 1;
      @(negedge clk);
      run = 0;
      wait (dut.u_ctrl.phase_su);
      c0 = cycle;
      wait (dut.u_ctrl.phase_sa);
      c1 = cycle;
      if (t == 0) begin
        checks++;
        if (c1 - c0 > N_WORDS + 16) begin
          failures++;
          $display("FAIL state update took %0d cycles for %0d words", c1 - c0, N_WORDS);
        end
      end
      wait (done);
      @(negedge clk);
      ref_step(t);
      checks++;
      if (hw_spk != ref_spk) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d spike sets differ", t);
      end
      if (t == 3) begin n_ready = 70; s_ready = 60; end
    end
  endtask

  initial begin
    int next_w;
    // ---- build the network ---------------------------------------------------------
    next_w = 0;
    for (int w = 0; w < SYN_WORDS; w++) smem.mem[w] = '0;
    for (int n = 0; n < N_NEURONS; n++) begin
      if (n % 2 == 0) begin ra[n] = 0.02; rb[n] = 0.2; rc[n] = -65.0; rd[n] = 8.0; end
      else            begin ra[n] = 0.1;  rb[n] = 0.2; rc[n] = -65.0; rd[n] = 2.0; end
      ra[n] = fr(ra[n]); rb[n] = fr(rb[n]);
      rv[n] = -65.0; ru[n] = fr(rb[n] * rv[n]);
      row_len[n] = (n >= 4096 || n % 11 == 3) ? 0 : 1 + ($urandom % 3);
      row_ptr[n] = next_w;
      for (int w = 0; w < row_len[n]; w++) begin
        logic [SYN_LANES*PKT_W-1:0] word;
        for (int l = 0; l < SYN_LANES; l++) begin
          syn_pkt_t p;
          p.weight = ($urandom % 4 == 0) ? 16'sd0 : 16'(($urandom % 9000) - 2000);
          p.nidx   = 12'($urandom % 8);
          p.delay  = ($urandom % 3 == 0) ? 4'd0 : 4'($urandom);
          word[l*PKT_W +: PKT_W] = p;
        end
        smem.mem[next_w] = word;
        next_w++;
      end
      for (int s = 0; s < 16; s++) acc[n][s] = 0;
    end
    for (int w = 0; w < N_WORDS; w++) begin
      logic [N_PE*REC_W-1:0] word;
      for (int j = 0; j < N_PE; j++) begin
        neuron_rec_t r;
        int n;
        n = w * N_PE + j;
        r.v = r2f(rv[n]); r.u = r2f(ru[n]); r.a = r2f(ra[n]); r.b = r2f(rb[n]);
        r.c = r2f(rc[n]); r.d = r2f(rd[n]);
        r.syn_ptr = 32'(row_ptr[n]); r.syn_len = 32'(row_len[n]);
        word[j*REC_W +: REC_W] = r;
      end
      nmem.mem[w] = word;
    end
    for (int j = 0; j < N_PE; j++) rng_s[j] = 32'h9E3779B9 * 32'(j + 1);

    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- configure ---------------------------------------------------------------------
    for (int e = 0; e < 2; e++) begin
      host_wr(REG_INJ_BASE + 16'(8 * e + 0), 32'(inj_lo[e]));
      host_wr(REG_INJ_BASE + 16'(8 * e + 1), 32'(inj_hi[e]));
      host_wr(REG_INJ_BASE + 16'(8 * e + 2), 32'(inj_st[e]));
      host_wr(REG_INJ_BASE + 16'(8 * e + 3), 32'(inj_sp[e]));
      host_wr(REG_INJ_BASE + 16'(8 * e + 4), 32'(longint'(inj_amp[e] * 65536.0)));
    end
    host_wr(REG_MON_BASE + 0, 32'h8000_0000 | 32'(mon_n[0]));
    host_wr(REG_MON_BASE + 1, 32'h8000_0000 | 32'(mon_n[1]));

    // ---- run without noise, then with noise ---------------------------------------------
    run_steps(0, STEPS1);
    host_wr(REG_SEED, 32'hC0FFEE01);
    for (int j = 0; j < N_PE; j++) begin
      rng_s[j] = 32'hC0FFEE01 ^ (32'h9E3779B9 * 32'(j + 1));
      if (rng_s[j] == 0) rng_s[j] = 1;
    end
    noise_amp_r = 1.5;
    host_wr(REG_NOISE_AMP, r2f(noise_amp_r));
    host_wr(REG_NOISE_MODE, 0);
    run_steps(STEPS1, STEPS2);

    // ---- final state in memory -----------------------------------------------------------
    for (int w = 0; w < N_WORDS; w++)
      for (int j = 0; j < N_PE; j++) begin
        neuron_rec_t r;
        int n;
        real ev, eu;
        n = w * N_PE + j;
        r = nmem.mem[w][j*REC_W +: REC_W];
        ev = f2r(r.v) - rv[n]; if (ev < 0) ev = -ev;
        eu = f2r(r.u) - ru[n]; if (eu < 0) eu = -eu;
        checks++;
        if (ev > 1e-3 || eu > 1e-3 || r.syn_len != 32'(row_len[n])) begin
          failures++;
          if (failures < 10) $display("FAIL neuron %0d v %g/%g u %g/%g", n, f2r(r.v), rv[n], f2r(r.u), ru[n]);
        end
      end
    // ---- monitor ---------------------------------------------------------------------------
    for (int m = 0; m < 2; m++)
      for (int t = 0; t < STEPS1 + STEPS2; t++) begin
        real e;
        @(negedge clk);
        mon_rd_slot = 2'(m); mon_rd_t = 10'(t);
        @(negedge clk);
        e = f2r(mon_rd_data) - mon_ref[m][t]; if (e < 0) e = -e;
        checks++;
        if (e > 1e-3) begin
          failures++;
          if (failures < 10) $display("FAIL monitor %0d t %0d: %g want %g", m, t, f2r(mon_rd_data), mon_ref[m][t]);
        end
      end
    checks++;
    if (t_step != STEPS1 + STEPS2 || mon_hits != 2 * (STEPS1 + STEPS2)) begin
      failures++;
      $display("FAIL t_step %0d mon_hits %0d", t_step, mon_hits);
    end

    // ---- mechanism coverage -------------------------------------------------------------
    $display("spikes=%0d multiword_rows=%0d zero_rows=%0d forwards=%0d slot_wraps=%0d ext=%0d noise=%0d nstalls=%0d sstalls=%0d rows=%0d words=%0d",
             c_spikes, c_multirow, c_zerorow, c_fwd, c_wrap, c_ext, c_noise, n_stalls, s_stalls, rows_done, words_done);
    checks++; if (c_spikes == 0)   begin failures++; $display("FAIL no spikes"); end
    checks++; if (c_multirow == 0) begin failures++; $display("FAIL no multi-word row"); end
    checks++; if (c_zerorow == 0)  begin failures++; $display("FAIL no empty row"); end
    checks++; if (c_fwd == 0)      begin failures++; $display("FAIL no forwarding"); end
    checks++; if (c_wrap == 0)     begin failures++; $display("FAIL no slot wrap"); end
    checks++; if (c_ext == 0)      begin failures++; $display("FAIL no external current"); end
    checks++; if (c_noise == 0)    begin failures++; $display("FAIL no noise"); end
    checks++; if (n_stalls == 0 || s_stalls == 0) begin failures++; $display("FAIL no back-pressure"); end
    checks++; if (rows_done != 32'(c_spikes)) begin failures++; $display("FAIL rows %0d vs spikes %0d", rows_done, c_spikes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
