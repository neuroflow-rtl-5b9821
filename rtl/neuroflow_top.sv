// neuroflow_top: one FPGA of the NeuroFlow spiking-network simulator.
//
// The engine advances a network of up to N_NEURONS Izhikevich neurons in
// 1 ms time steps. Each step has two phases, sequenced by nf_controller:
//   (i)  state_update_kernel streams all neuron records from off-chip memory
//        (N_PE per word), updates them in N_PE parallel floating-point neuron
//        modules using the synaptic current due now, external current and
//        noise, writes them back and lists the neurons that fired;
//   (ii) syn_integration_kernel reads the synaptic rows of those neurons from
//        off-chip memory, SYN_LANES packets per word, and adds each weight
//        into one of SYN_LANES on-chip accumulator lanes (syn_accum_lane) at
//        the slot of its axonal delay, building the currents of the next 16
//        steps.
// Between the phases, one fired_fifo per neuron module holds the fired
// neurons. neuron_monitor keeps the membrane potential of chosen neurons on
// chip for read-out after the run.
//
// Off-chip memory (neuron records, synaptic rows) and the host are outside
// this module: their ports are brought out. Memory reads use a valid/ready
// request and an in-order, always-accepted response; neuron write-backs are
// assumed always accepted. The host writes configuration registers through
// host_wr_* (map in nf_pkg: noise amplitude and mode, RNG seed, injector
// table at 0x100 + 8*entry + field, monitor slots at 0x200 + slot), starts a
// run of n_steps steps with `run`, and receives every spike on spk_* (time
// step, index of the first neuron of the word, one bit per neuron module),
// from which it can compute plasticity and rewrite synaptic rows in memory
// between runs.
module neuroflow_top
  import nf_pkg::*;
#(
  parameter int N_PE      = 12,
  parameter int SYN_LANES = 24,
  parameter int N_NEURONS = 98304,
  parameter int N_SRC     = 16,
  parameter int N_MON     = 4,
  parameter int MON_DEPTH = 1024
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host control
  input  logic                      host_wr_en,
  input  logic [15:0]               host_wr_addr,
  input  logic [31:0]               host_wr_data,
  input  logic                      run,
  input  logic                      clear_t,
  input  logic [31:0]               n_steps,
  input  logic [$clog2(N_NEURONS/N_PE+1)-1:0] n_words,
  input  logic [31:0]               nbase,
  output logic                      busy,
  output logic                      step_done,
  output logic                      done,
  output logic [31:0]               t_step,
  output logic                      lanes_ready,
  // neuron records in off-chip memory
  output logic                      nrd_req_valid,
  input  logic                      nrd_req_ready,
  output logic [$clog2(N_NEURONS/N_PE)-1:0] nrd_req_addr,
  input  logic                      nrd_rsp_valid,
  input  logic [N_PE*REC_W-1:0]     nrd_rsp_data,
  output logic                      nwr_valid,
  output logic [$clog2(N_NEURONS/N_PE)-1:0] nwr_addr,
  output logic [N_PE*REC_W-1:0]     nwr_data,
  // synaptic rows in off-chip memory
  output logic                      srd_req_valid,
  input  logic                      srd_req_ready,
  output logic [SYN_ADDR_W-1:0]     srd_req_addr,
  input  logic                      srd_rsp_valid,
  input  logic [SYN_LANES*PKT_W-1:0] srd_rsp_data,
  // spike record
  output logic                      spk_valid,
  output logic [31:0]               spk_t,
  output logic [31:0]               spk_base,
  output logic [N_PE-1:0]           spk_mask,
  // membrane-potential monitor read-out
  input  logic [$clog2(N_MON)-1:0]  mon_rd_slot,
  input  logic [$clog2(MON_DEPTH)-1:0] mon_rd_t,
  output logic [31:0]               mon_rd_data,
  output logic [31:0]               mon_hits,
  // activity counters
  output logic [31:0]               rows_done,
  output logic [31:0]               words_done
);
  localparam int PER_LANE  = N_NEURONS / SYN_LANES;
  localparam int NIDX_BITS = (PER_LANE > 1) ? $clog2(PER_LANE) : 1;
  localparam int FIFO_DEPTH = N_NEURONS / N_PE;

  // ---- host registers ----------------------------------------------------------
  logic [31:0] noise_amp;
  logic        noise_gauss;
  logic        seed_load;
  logic [31:0] seed;
  logic        inj_wr_en, mon_cfg_en;

  assign inj_wr_en  = host_wr_en && (host_wr_addr[15:8] == REG_INJ_BASE[15:8]) &&
                      (32'(host_wr_addr[7:3]) < 32'(N_SRC));
  assign mon_cfg_en = host_wr_en && (host_wr_addr[15:8] == REG_MON_BASE[15:8]) &&
                      (32'(host_wr_addr[7:0]) < 32'(N_MON));
  assign seed_load  = host_wr_en && (host_wr_addr == REG_SEED);
  assign seed       = host_wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      noise_amp   <= FP_ZERO;
      noise_gauss <= 1'b0;
    end else if (host_wr_en) begin
      if (host_wr_addr == REG_NOISE_AMP)  noise_amp   <= host_wr_data;
      if (host_wr_addr == REG_NOISE_MODE) noise_gauss <= host_wr_data[0];
    end
  end

  // ---- controller --------------------------------------------------------------------
  logic su_start, su_done, sa_start, sa_done, phase_su, phase_sa;

  nf_controller u_ctrl (
    .clk, .rst_n, .run, .clear_t, .n_steps, .lanes_ready,
    .su_start, .su_done, .sa_start, .sa_done,
    .t_step, .phase_su, .phase_sa, .busy, .step_done, .done
  );

  // ---- synapse lanes --------------------------------------------------------------------
  logic [SYN_LANES-1:0]       rc_en;
  logic [DELAY_W-1:0]         rc_slot;
  logic [NIDX_BITS-1:0]       rc_nidx;
  logic signed [ACC_W-1:0]    rc_data [SYN_LANES];
  logic                       acc_valid;
  logic [DELAY_W-1:0]         acc_slot   [SYN_LANES];
  logic [NIDX_BITS-1:0]       acc_nidx   [SYN_LANES];
  logic signed [WEIGHT_W-1:0] acc_weight [SYN_LANES];
  logic [SYN_LANES-1:0]       lane_init, lane_busy;

  for (genvar l = 0; l < SYN_LANES; l++) begin : g_lane
    syn_accum_lane #(.NIDX_BITS(NIDX_BITS), .SLOT_BITS(DELAY_W), .AW(ACC_W)) u_lane (
      .clk, .rst_n,
      .init_done(lane_init[l]),
      .acc_valid, .acc_slot(acc_slot[l]), .acc_nidx(acc_nidx[l]), .acc_weight(acc_weight[l]),
      .rc_en(rc_en[l]), .rc_slot, .rc_nidx, .rc_valid(), .rc_data(rc_data[l]),
      .busy(lane_busy[l])
    );
  end
  assign lanes_ready = &lane_init;

  // ---- fired-neuron buffers ---------------------------------------------------------
  logic [N_PE-1:0] fired_push, fired_pop, fired_empty;
  fired_t          fired_wdata [N_PE];
  fired_t          fired_rdata [N_PE];

  for (genvar j = 0; j < N_PE; j++) begin : g_fifo
    logic [FIRED_W-1:0] rd;
    fired_fifo #(.DEPTH(FIFO_DEPTH), .DW(FIRED_W)) u_fifo (
      .clk, .rst_n,
      .push(fired_push[j]), .wr_data(fired_wdata[j]),
      .pop(fired_pop[j]), .rd_data(rd),
      .empty(fired_empty[j]), .full(), .count()
    );
    assign fired_rdata[j] = rd;
  end

  // ---- phase (i) -----------------------------------------------------------------------
  logic [31:0] wb_idx [N_PE];
  logic [31:0] wb_v   [N_PE];

  state_update_kernel #(
    .N_PE(N_PE), .SYN_LANES(SYN_LANES), .N_NEURONS(N_NEURONS),
    .NIDX_BITS(NIDX_BITS), .N_SRC(N_SRC)
  ) u_su (
    .clk, .rst_n,
    .start(su_start), .t_step, .n_words, .nbase, .busy(), .done(su_done),
    .inj_wr_en, .inj_wr_entry($clog2(N_SRC)'(host_wr_addr[7:3])),
    .inj_wr_field(host_wr_addr[2:0]), .inj_wr_data(host_wr_data),
    .noise_amp, .noise_gauss, .seed_load, .seed,
    .nrd_req_valid, .nrd_req_ready, .nrd_req_addr, .nrd_rsp_valid, .nrd_rsp_data,
    .nwr_valid, .nwr_addr, .nwr_data,
    .rc_en, .rc_slot, .rc_nidx, .rc_data,
    .fired_push, .fired_data(fired_wdata),
    .spk_valid, .spk_t, .spk_base, .spk_mask,
    .wb_idx, .wb_v
  );

  // ---- phase (ii) ----------------------------------------------------------------------
  syn_integration_kernel #(
    .N_PE(N_PE), .SYN_LANES(SYN_LANES), .NIDX_BITS(NIDX_BITS)
  ) u_sa (
    .clk, .rst_n,
    .start(sa_start), .t_step, .busy(), .done(sa_done),
    .fired_empty, .fired_pop, .fired_data(fired_rdata),
    .srd_req_valid, .srd_req_ready, .srd_req_addr, .srd_rsp_valid, .srd_rsp_data,
    .acc_valid, .acc_slot, .acc_nidx, .acc_weight,
    .lanes_busy(|lane_busy),
    .rows_done, .words_done
  );

  // ---- membrane-potential monitor ---------------------------------------------------
  neuron_monitor #(.N_MON(N_MON), .DEPTH(MON_DEPTH), .N_PE(N_PE)) u_mon (
    .clk, .rst_n,
    .cfg_en(mon_cfg_en), .cfg_slot($clog2(N_MON)'(host_wr_addr[7:0])), .cfg_data(host_wr_data),
    .t_step, .wb_valid(nwr_valid), .wb_idx, .wb_v,
    .rd_slot(mon_rd_slot), .rd_t(mon_rd_t), .rd_data(mon_rd_data), .hits(mon_hits)
  );

  // the two phases never run at once
  always_ff @(posedge clk) begin
    assert (!(phase_su && phase_sa)) else $error("neuroflow_top: phases overlap");
  end
endmodule
