// state_update_kernel: phase (i) of a time step, the neuron state update.
//
// The kernel streams every neuron record of the FPGA from off-chip memory,
// N_PE records per memory word, and hands the N_PE neurons of a word to N_PE
// parallel neuron update modules in the same cycle (time multiplexing: each
// module handles one neuron in N_PE). For each neuron it gathers three input
// currents: the synaptic current accumulated for this time step, read (and
// cleared) from the synapse lanes' on-chip memories and converted from fixed
// to floating point; the external current of the injector table; and a
// noise current from the module's random generator. The updated record
// (new v and u, all parameters unchanged) is written back to the same memory
// word, every spike is reported on the spike port and, with the location of
// the neuron's synaptic row, pushed into its module's fired-neuron buffer for
// phase (ii).
//
// Neuron numbering: neuron n = nbase + k*N_PE + j sits in slot j of memory
// word k. Its synaptic current lives in lane n mod SYN_LANES at local index
// n / SYN_LANES (nbase excluded), so the N_PE neurons of a word read N_PE
// different lanes in one cycle; SYN_LANES must be a multiple of N_PE.
//
// Timing: one word per cycle when memory answers every cycle. A read
// response is followed one cycle later by the lane and injector results,
// then by the six-cycle update pipeline and the write-back; `done` pulses
// when the last of n_words words has been written back. Read requests use
// a valid/ready handshake, responses return in order and must be accepted,
// and writes are assumed always accepted. The two-phase, time-multiplexed,
// pipelined organisation and the use of DRAM for neuron records and BRAM for
// currents follow the design; the memory handshakes, numbering and
// record layout are this design's choices.
module state_update_kernel
  import nf_pkg::*;
#(
  parameter int N_PE      = 12,
  parameter int SYN_LANES = 24,
  parameter int N_NEURONS = 98304,
  parameter int NIDX_BITS = NIDX_W,
  parameter int N_SRC     = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // control
  input  logic                      start,
  input  logic [31:0]               t_step,
  input  logic [$clog2(N_NEURONS/N_PE+1)-1:0] n_words,
  input  logic [31:0]               nbase,
  output logic                      busy,
  output logic                      done,
  // host configuration
  input  logic                      inj_wr_en,
  input  logic [$clog2(N_SRC)-1:0]  inj_wr_entry,
  input  logic [2:0]                inj_wr_field,
  input  logic [31:0]               inj_wr_data,
  input  logic [31:0]               noise_amp,
  input  logic                      noise_gauss,
  input  logic                      seed_load,
  input  logic [31:0]               seed,
  // neuron records in off-chip memory
  output logic                      nrd_req_valid,
  input  logic                      nrd_req_ready,
  output logic [$clog2(N_NEURONS/N_PE)-1:0] nrd_req_addr,
  input  logic                      nrd_rsp_valid,
  input  logic [N_PE*REC_W-1:0]     nrd_rsp_data,
  output logic                      nwr_valid,
  output logic [$clog2(N_NEURONS/N_PE)-1:0] nwr_addr,
  output logic [N_PE*REC_W-1:0]     nwr_data,
  // synapse lanes, read-and-clear port
  output logic [SYN_LANES-1:0]      rc_en,
  output logic [DELAY_W-1:0]        rc_slot,
  output logic [NIDX_BITS-1:0]      rc_nidx,
  input  logic signed [ACC_W-1:0]   rc_data [SYN_LANES],
  // fired neurons
  output logic [N_PE-1:0]           fired_push,
  output fired_t                    fired_data [N_PE],
  // spikes and written-back potentials
  output logic                      spk_valid,
  output logic [31:0]               spk_t,
  output logic [31:0]               spk_base,   // index of slot 0 of the word
  output logic [N_PE-1:0]           spk_mask,
  output logic [31:0]               wb_idx [N_PE],
  output logic [31:0]               wb_v   [N_PE]
);
  localparam int N_WORDS = N_NEURONS / N_PE;
  localparam int WA      = $clog2(N_WORDS);
  localparam int CW      = $clog2(N_WORDS + 1);
  localparam int GROUPS  = SYN_LANES / N_PE;   // lane groups per round
  localparam int GW      = (GROUPS > 1) ? $clog2(GROUPS) : 1;
  localparam int LAT     = 6;                  // izh_neuron_unit pipeline

  // ---- control -----------------------------------------------------------------
  logic          running;
  logic [CW-1:0] issued, received, written;
  logic [31:0]   t_q, nbase_q;
  logic [CW-1:0] n_q;

  assign busy = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
      t_q     <= '0;
      nbase_q <= '0;
      n_q     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        running <= 1'b1;
        t_q     <= t_step;
        nbase_q <= nbase;
        n_q     <= n_words;
        if (n_words == '0) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end else if (running && nwr_valid && (written + 1'b1 == n_q)) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

  // ---- read requests ----------------------------------------------------------------
  assign nrd_req_valid = running && (issued < n_q);
  assign nrd_req_addr  = WA'(issued);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) issued <= '0;
    else if (start && !running) issued <= '0;
    else if (nrd_req_valid && nrd_req_ready) issued <= issued + 1'b1;
  end

  // ---- R0: response arrives, read lanes and injector ------------------------------
  logic [GW-1:0]        grp;      // k mod GROUPS
  logic [NIDX_BITS-1:0] lidx;     // k / GROUPS

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      received <= '0;
      grp      <= '0;
      lidx     <= '0;
    end else if (start && !running) begin
      received <= '0;
      grp      <= '0;
      lidx     <= '0;
    end else if (nrd_rsp_valid) begin
      received <= received + 1'b1;
      if (GROUPS == 1 || grp == GW'(GROUPS - 1)) begin
        grp  <= '0;
        lidx <= lidx + 1'b1;
      end else begin
        grp <= grp + 1'b1;
      end
    end
  end

  always_comb begin
    rc_en = '0;
    for (int g = 0; g < GROUPS; g++)
      if (nrd_rsp_valid && (GROUPS == 1 || grp == GW'(g)))
        rc_en[g*N_PE +: N_PE] = '1;
  end
  assign rc_slot = t_q[DELAY_W-1:0];
  assign rc_nidx = lidx;

  logic [31:0] q_idx [N_PE];
  always_comb begin
    for (int j = 0; j < N_PE; j++)
      q_idx[j] = nbase_q + 32'(received) * 32'(N_PE) + 32'(j);
  end

  logic [31:0] i_ext [N_PE];
  current_injector #(.N_SRC(N_SRC), .N_PE(N_PE)) u_inj (
    .clk, .rst_n,
    .wr_en(inj_wr_en), .wr_entry(inj_wr_entry), .wr_field(inj_wr_field), .wr_data(inj_wr_data),
    .t_step(t_q), .idx(q_idx), .i_ext(i_ext)
  );

  // ---- R1: currents ready, start the update modules -----------------------------
  logic                  r1_valid;
  logic [WA-1:0]         r1_k;
  logic [GW-1:0]         r1_grp;
  logic [N_PE*REC_W-1:0] r1_rec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r1_valid <= 1'b0;
    else        r1_valid <= nrd_rsp_valid;
  end
  always_ff @(posedge clk) begin
    r1_k   <= WA'(received);
    r1_grp <= grp;
    r1_rec <= nrd_rsp_data;
  end

  // delay line for records and word numbers while the modules compute
  logic                  dl_valid [LAT];
  logic [WA-1:0]         dl_k     [LAT];
  logic [N_PE*REC_W-1:0] dl_rec   [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < LAT; s++) dl_valid[s] <= 1'b0;
    end else begin
      dl_valid[0] <= r1_valid;
      for (int s = 1; s < LAT; s++) dl_valid[s] <= dl_valid[s-1];
    end
  end
  always_ff @(posedge clk) begin
    dl_k[0]   <= r1_k;
    dl_rec[0] <= r1_rec;
    for (int s = 1; s < LAT; s++) begin
      dl_k[s]   <= dl_k[s-1];
      dl_rec[s] <= dl_rec[s-1];
    end
  end

  logic [N_PE-1:0] u_valid, u_spike;
  logic [31:0]     u_v [N_PE];
  logic [31:0]     u_u [N_PE];

  for (genvar j = 0; j < N_PE; j++) begin : g_pe
    neuron_rec_t       rec;
    logic signed [ACC_W-1:0] isyn_fx;
    logic [31:0]       isyn_f, noise_f;

    assign rec = r1_rec[j*REC_W +: REC_W];

    always_comb begin
      isyn_fx = '0;
      for (int g = 0; g < GROUPS; g++)
        if (GROUPS == 1 || r1_grp == GW'(g)) isyn_fx = rc_data[g*N_PE + j];
    end

    fix2fp #(.W(ACC_W), .FRAC(WEIGHT_FRAC)) u_cvt (.x(isyn_fx), .y(isyn_f));

    noise_rng #(.LANE(j)) u_rng (
      .clk, .rst_n, .seed_load, .seed, .next(r1_valid),
      .gauss(noise_gauss), .amp(noise_amp), .noise(noise_f)
    );

    izh_neuron_unit #(.TAG_W(1)) u_nu (
      .clk, .rst_n,
      .in_valid(r1_valid), .in_tag(1'b0),
      .v(rec.v), .u(rec.u), .a(rec.a), .b(rec.b), .c(rec.c), .d(rec.d),
      .i_syn(isyn_f), .i_ext(i_ext[j]), .i_noise(noise_f),
      .out_valid(u_valid[j]), .out_tag(), .v_new(u_v[j]), .u_new(u_u[j]),
      .spike(u_spike[j])
    );
  end

  // ---- write-back, spikes, fired buffers --------------------------------------------
  logic [N_PE*REC_W-1:0] wb_word;
  always_comb begin
    wb_word = dl_rec[LAT-1];
    for (int j = 0; j < N_PE; j++) begin
      neuron_rec_t r;
      r   = wb_word[j*REC_W +: REC_W];
      r.v = u_v[j];
      r.u = u_u[j];
      wb_word[j*REC_W +: REC_W] = r;
    end
  end

  assign nwr_valid = dl_valid[LAT-1];
  assign nwr_addr  = dl_k[LAT-1];
  assign nwr_data  = wb_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) written <= '0;
    else if (start && !running) written <= '0;
    else if (nwr_valid) written <= written + 1'b1;
  end

  assign spk_valid = nwr_valid && (u_spike != '0);
  assign spk_t     = t_q;
  assign spk_base  = nbase_q + 32'(dl_k[LAT-1]) * 32'(N_PE);
  assign spk_mask  = nwr_valid ? u_spike : '0;

  for (genvar j = 0; j < N_PE; j++) begin : g_out
    neuron_rec_t r;
    assign r             = dl_rec[LAT-1][j*REC_W +: REC_W];
    assign fired_push[j] = nwr_valid && u_spike[j];
    assign fired_data[j] = '{ptr: r.syn_ptr, len: r.syn_len[SYN_LEN_W-1:0]};
    assign wb_idx[j]     = spk_base + 32'(j);
    assign wb_v[j]       = u_v[j];
  end

  // every module's result arrives together with the delayed record
  always_ff @(posedge clk) begin
    if (dl_valid[LAT-1]) assert (u_valid == '1)
      else $error("state_update_kernel: update modules out of step");
  end
  initial assert (SYN_LANES % N_PE == 0);
endmodule
