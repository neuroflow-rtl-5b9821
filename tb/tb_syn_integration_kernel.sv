// tb_syn_integration_kernel: self-checking test of the synaptic phase.
// Three fired-neuron buffers (modelled here as queues with a registered
// read) hold random rows of 0..4 words in a memory model with random
// back-pressure. Every packet the kernel sends to the lanes is summed here
// per (lane, slot, neuron) and compared with the sums expected from the rows,
// with the slot computed as (t + delay + 1) mod 16. Also checked: every row
// is fetched once (rows_done, words_done), done comes only after all
// buffers are empty, and with memory always ready a row of W words is
// fetched in W cycles plus the two cycles of buffer access.
module tb_syn_integration_kernel;
  import nf_pkg::*;
  localparam int N_PE = 3, SYN_LANES = 4, NB = 3, SYN_WORDS = 128;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic start = 0;
  logic [31:0] t_step = 0;
  logic busy, done;
  logic [N_PE-1:0] fired_empty, fired_pop;
  fired_t fired_data [N_PE];
  logic srd_req_valid, srd_req_ready, srd_rsp_valid;
  logic [31:0] srd_req_addr;
  logic [SYN_LANES*PKT_W-1:0] srd_rsp_data;
  logic acc_valid;
  logic [DELAY_W-1:0] acc_slot [SYN_LANES];
  logic [NB-1:0] acc_nidx [SYN_LANES];
  logic signed [WEIGHT_W-1:0] acc_weight [SYN_LANES];
  logic lanes_busy = 0;
  logic [31:0] rows_done, words_done;
  int ready_pct = 100, stalls;
  int checks = 0, failures = 0, cycle = 0;

  syn_integration_kernel #(.N_PE(N_PE), .SYN_LANES(SYN_LANES), .NIDX_BITS(NB)) dut (.*);

  tb_mem_model #(.DW(SYN_LANES*PKT_W), .DEPTH(SYN_WORDS), .AW(32), .LAT(2)) smem (
    .clk, .ready_pct, .req_valid(srd_req_valid), .req_ready(srd_req_ready),
    .req_addr(srd_req_addr), .rsp_valid(srd_rsp_valid), .rsp_data(srd_rsp_data),
    .wr_valid(1'b0), .wr_addr(32'd0), .wr_data('0), .stalls(stalls));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fired_t fq [N_PE][$];
  always_comb for (int j = 0; j < N_PE; j++) fired_empty[j] = (fq[j].size() == 0);
  always @(posedge clk)
    for (int j = 0; j < N_PE; j++)
      if (fired_pop[j]) fired_data[j] <= fq[j].pop_front();

  longint got_sum [SYN_LANES][16][1 << NB];
  longint want_sum [SYN_LANES][16][1 << NB];
  always @(posedge clk)
    if (acc_valid)
      for (int l = 0; l < SYN_LANES; l++)
        got_sum[l][acc_slot[l]][acc_nidx[l]] += longint'(acc_weight[l]);

  task automatic phase(input int t, input int nrows, output int words, output int cyc);
    int next_w, c0;
    next_w = 0; words = 0;
    t_step = t;
    foreach (got_sum[l, s, n]) begin got_sum[l][s][n] = 0; want_sum[l][s][n] = 0; end
    for (int r = 0; r < nrows; r++) begin
      fired_t e;
      int len;
      len = (r == 0) ? 4 : $urandom % 5;
      e.ptr = 32'(next_w); e.len = 16'(len);
      for (int w = 0; w < len; w++) begin
        logic [SYN_LANES*PKT_W-1:0] word;
        for (int l = 0; l < SYN_LANES; l++) begin
          syn_pkt_t p;
          p.weight = 16'($urandom);
          p.nidx = 12'($urandom % (1 << NB));
          p.delay = 4'($urandom);
          word[l*PKT_W +: PKT_W] = p;
          want_sum[l][(t + int'(p.delay) + 1) % 16][p.nidx] += longint'(p.weight);
        end
        smem.mem[next_w] = word;
        next_w++;
      end
      words += len;
      fq[$urandom % N_PE].push_back(e);
    end
    @(negedge clk); start = 1; c0 = cycle;
    @(negedge clk); start = 0;
    wait (done);
    cyc = cycle - c0;
    @(negedge clk);
    checks++;
    if (fq[0].size() + fq[1].size() + fq[2].size() != 0) failures++;
    foreach (want_sum[l, s, n]) begin
      checks++;
      if (got_sum[l][s][n] != want_sum[l][s][n]) begin
        failures++;
        if (failures < 10) $display("FAIL lane %0d slot %0d n %0d got %0d want %0d", l, s, n, got_sum[l][s][n], want_sum[l][s][n]);
      end
    end
  endtask

  initial begin
    int words, cyc, r0, w0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // one row of 4 words, memory always ready: 2 + 4 issue cycles, then drain
    r0 = rows_done; w0 = words_done;
    phase(7, 1, words, cyc);
    checks++;
    if (cyc > 2 + 4 + 2 + 6 || rows_done - r0 != 1 || words_done - w0 != 4) begin
      failures++;
      $display("FAIL single row: %0d cycles", cyc);
    end
    ready_pct = 60;
    for (int t = 8; t < 30; t++) begin
      r0 = rows_done; w0 = words_done;
      phase(t, 1 + $urandom % 12, words, cyc);
      checks++;
      if (words_done - w0 != 32'(words)) failures++;
    end
    phase(31, 0, words, cyc);   // nothing fired
    checks++; if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
