// tb_state_update_kernel: self-checking test of the state-update phase.
// 16 neurons (2 per memory word, 4 synapse lanes) numbered from nbase = 100
// are updated over 12 time steps. The lanes are modelled here as arrays
// returning their value one cycle after a read-and-clear; the injector
// drives neurons 101..106 during steps 2..8. A reference rounds every
// operation to single precision in the update's order, starting every step
// from the state held in memory, and checks, for every
// step: each written-back record (new v and u, other fields unchanged), the
// spike mask and base index, the entries pushed into the fired buffers, that
// each lane entry is read exactly once, and with memory always ready that
// the phase takes at most n_words + 12 cycles.
module tb_state_update_kernel;
  import nf_pkg::*;
  import nf_tb_pkg::*;
  localparam int N_PE = 2, SYN_LANES = 4, N_NEURONS = 16, NB = 2, N_SRC = 2;
  localparam int N_WORDS = N_NEURONS / N_PE;
  localparam int NBASE = 100;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic start = 0;
  logic [31:0] t_step = 0;
  logic [4:0] n_words = 5'(N_WORDS);
  logic [31:0] nbase = NBASE;
  logic busy, done;
  logic inj_wr_en = 0;
  logic [0:0] inj_wr_entry = 0;
  logic [2:0] inj_wr_field = 0;
  logic [31:0] inj_wr_data = 0;
  logic [31:0] noise_amp = 0;
  logic noise_gauss = 0, seed_load = 0;
  logic [31:0] seed = 0;
  logic nrd_req_valid, nrd_req_ready, nrd_rsp_valid, nwr_valid;
  logic [2:0] nrd_req_addr, nwr_addr;
  logic [N_PE*REC_W-1:0] nrd_rsp_data, nwr_data;
  logic [SYN_LANES-1:0] rc_en;
  logic [DELAY_W-1:0] rc_slot;
  logic [NB-1:0] rc_nidx;
  logic signed [ACC_W-1:0] rc_data [SYN_LANES];
  logic [N_PE-1:0] fired_push;
  fired_t fired_data [N_PE];
  logic spk_valid;
  logic [31:0] spk_t, spk_base;
  logic [N_PE-1:0] spk_mask;
  logic [31:0] wb_idx [N_PE], wb_v [N_PE];
  int ready_pct = 100, stalls;
  int checks = 0, failures = 0, cycle = 0, spikes = 0;

  state_update_kernel #(.N_PE(N_PE), .SYN_LANES(SYN_LANES), .N_NEURONS(N_NEURONS),
                        .NIDX_BITS(NB), .N_SRC(N_SRC)) dut (.*);

  tb_mem_model #(.DW(N_PE*REC_W), .DEPTH(N_WORDS), .AW(3), .LAT(3)) nmem (
    .clk, .ready_pct, .req_valid(nrd_req_valid), .req_ready(nrd_req_ready),
    .req_addr(nrd_req_addr), .rsp_valid(nrd_rsp_valid), .rsp_data(nrd_rsp_data),
    .wr_valid(nwr_valid), .wr_addr(nwr_addr), .wr_data(nwr_data), .stalls(stalls));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // lane model
  int lane_val [SYN_LANES][16][1 << NB];
  int lane_reads [SYN_LANES][1 << NB];
  always @(posedge clk)
    for (int l = 0; l < SYN_LANES; l++)
      if (rc_en[l]) begin
        rc_data[l] <= ACC_W'(lane_val[l][rc_slot][rc_nidx]);
        lane_val[l][rc_slot][rc_nidx] = 0;
        lane_reads[l][rc_nidx]++;
      end

  real rv [N_NEURONS], ru [N_NEURONS];
  neuron_rec_t recs [N_NEURONS];
  bit ref_spk [N_NEURONS];
  int isyn_raw [N_NEURONS];
  int pushes [N_NEURONS];
  bit wb_seen [N_WORDS];
  int cur_t;

  function automatic real fr(input real x);
    return f2r(r2f(x));
  endfunction

  // check each write-back against the reference computed for this step
  always @(posedge clk) begin
    if (nwr_valid) begin
      for (int j = 0; j < N_PE; j++) begin
        neuron_rec_t r, o;
        int n;
        real ev, eu;
        n = int'(nwr_addr) * N_PE + j;
        r = nwr_data[j*REC_W +: REC_W];
        o = recs[n];
        ev = f2r(r.v) - rv[n]; if (ev < 0) ev = -ev;
        eu = f2r(r.u) - ru[n]; if (eu < 0) eu = -eu;
        checks++;
        if (ev > 1e-4 || eu > 1e-4 || r.a != o.a || r.b != o.b || r.c != o.c || r.d != o.d ||
            r.syn_ptr != o.syn_ptr || r.syn_len != o.syn_len || spk_mask[j] != ref_spk[n] ||
            spk_base != 32'(NBASE + int'(nwr_addr) * N_PE) || wb_idx[j] != 32'(NBASE + n) ||
            spk_t != 32'(cur_t)) begin
          failures++;
          if (failures < 10) $display("FAIL t %0d neuron %0d v %g/%g u %g/%g spk %0d/%0d", cur_t, n, f2r(r.v), rv[n], f2r(r.u), ru[n], spk_mask[j], ref_spk[n]);
        end
        if (fired_push[j]) begin
          pushes[n]++;
          checks++;
          if (fired_data[j].ptr != o.syn_ptr || 32'(fired_data[j].len) != o.syn_len) failures++;
        end
      end
      wb_seen[nwr_addr] = 1;
    end
  end

  task automatic ref_step(input int t);
    real c004;
    c004 = f2r(FP_0P04);
    for (int n = 0; n < N_NEURONS; n++) begin
      real v, u, a, b, c, d, isyn, iext, vv, v5, bv, is1, t1, t2, du0, is, t3, t4, du, dv, un, vn, ud;
      v = rv[n]; u = ru[n];
      a = f2r(recs[n].a); b = f2r(recs[n].b); c = f2r(recs[n].c); d = f2r(recs[n].d);
      isyn = real'(isyn_raw[n]) / 1024.0;
      iext = (NBASE + n >= 101 && NBASE + n <= 106 && t >= 2 && t < 8) ? 9.5 : 0.0;
      vv = fr(v * v); v5 = fr(5.0 * v); bv = fr(b * v); is1 = fr(isyn + iext);
      t1 = fr(c004 * vv); t2 = fr(v5 + 140.0); du0 = fr(bv - u); is = fr(is1 + 0.0);
      t3 = fr(t1 + t2); t4 = fr(is - u); du = fr(a * du0);
      dv = fr(t3 + t4); un = fr(u + du);
      vn = fr(v + dv); ud = fr(un + d);
      ref_spk[n] = (vn >= 30.0);
      if (ref_spk[n]) begin rv[n] = c; ru[n] = ud; spikes++; end
      else            begin rv[n] = vn; ru[n] = un; end
    end
  endtask

  task automatic wr_inj(input int f, input logic [31:0] d);
    @(negedge clk); inj_wr_en = 1; inj_wr_entry = 0; inj_wr_field = 3'(f); inj_wr_data = d;
    @(negedge clk); inj_wr_en = 0;
  endtask

  initial begin
    foreach (rc_data[l]) rc_data[l] = 0;
    for (int n = 0; n < N_NEURONS; n++) begin
      recs[n].v = r2f(-65.0 + 3.0 * (n % 5));
      recs[n].u = r2f(-13.0);
      recs[n].a = r2f((n % 2) ? 0.1 : 0.02);
      recs[n].b = r2f(0.2);
      recs[n].c = r2f(-65.0);
      recs[n].d = r2f((n % 2) ? 2.0 : 8.0);
      recs[n].syn_ptr = 32'h1000 + 32'(n * 8);
      recs[n].syn_len = 32'(n % 4);
      rv[n] = f2r(recs[n].v); ru[n] = f2r(recs[n].u);
    end
    for (int w = 0; w < N_WORDS; w++)
      for (int j = 0; j < N_PE; j++) nmem.mem[w][j*REC_W +: REC_W] = recs[w * N_PE + j];
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr_inj(0, 101); wr_inj(1, 106); wr_inj(2, 2); wr_inj(3, 8); wr_inj(4, 32'(int'(9.5 * 65536.0)));
    for (int t = 0; t < 12; t++) begin
      int c0;
      cur_t = t;
      foreach (lane_reads[l, i]) lane_reads[l][i] = 0;
      foreach (wb_seen[w]) wb_seen[w] = 0;
      foreach (pushes[n]) pushes[n] = 0;
      for (int n = 0; n < N_NEURONS; n++) begin
        isyn_raw[n] = ($urandom % 3 == 0) ? 0 : int'($urandom % 12000) - 2000;
        lane_val[n % SYN_LANES][t % 16][n / SYN_LANES] = isyn_raw[n];
      end
      // start each step's reference from the state held in memory
      for (int n = 0; n < N_NEURONS; n++) begin
        neuron_rec_t r;
        r = nmem.mem[n / N_PE][(n % N_PE)*REC_W +: REC_W];
        rv[n] = f2r(r.v); ru[n] = f2r(r.u);
      end
      ref_step(t);
      if (t >= 6) ready_pct = 60;
      @(negedge clk); start = 1; t_step = t; c0 = cycle;
      @(negedge clk); start = 0;
      wait (done);
      checks++;
      if (t < 6 && cycle - c0 > N_WORDS + 12) begin
        failures++; $display("FAIL phase took %0d cycles", cycle - c0);
      end
      @(negedge clk);
      foreach (wb_seen[w]) begin checks++; if (!wb_seen[w]) failures++; end
      foreach (lane_reads[l, i]) begin checks++; if (lane_reads[l][i] != 1) failures++; end
      for (int n = 0; n < N_NEURONS; n++) begin checks++; if (pushes[n] != int'(ref_spk[n])) failures++; end
      for (int n = 0; n < N_NEURONS; n++) begin recs[n].v = r2f(rv[n]); recs[n].u = r2f(ru[n]); end
    end
    checks++;
    if (spikes == 0 || stalls == 0) begin failures++; $display("FAIL spikes %0d stalls %0d", spikes, stalls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
