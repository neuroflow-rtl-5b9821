// syn_integration_kernel: phase (ii) of a time step, synaptic accumulation.
//
// For every neuron that fired in phase (i), the kernel reads that neuron's
// row of synaptic data from off-chip memory. A memory word carries SYN_LANES
// packets, one per synapse lane; packet l of a word targets a neuron of lane
// l, so all packets of a word are accumulated in the same cycle by the
// SYN_LANES lanes without conflicts. Each packet holds a weight, the target's
// index inside the lane and the axonal delay; the weight is added to the
// target's accumulator for time step t + delay + 1 (delay field 0..15 means
// 1..16 ms), i.e. lane slot (t + delay + 1) mod 16. Packets that a row does
// not need are left with weight zero and change nothing.
//
// Fired neurons are taken from the N_PE fired-neuron buffers, lowest-numbered
// non-empty buffer first. Each entry costs two cycles to fetch (pop, then the
// registered read) and its row is then requested one word per cycle through
// a valid/ready handshake; responses return in order, one per cycle at most,
// and are always accepted. `done` pulses once all buffers are empty, every
// request has been answered and the lanes have finished their last write.
// Spike-triggered access and packet format follow the design; the placement
// of packets on lanes by target index, the buffer order and handshakes are
// this design's choices.
module syn_integration_kernel
  import nf_pkg::*;
#(
  parameter int N_PE      = 12,
  parameter int SYN_LANES = 24,
  parameter int NIDX_BITS = NIDX_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [31:0]              t_step,
  output logic                     busy,
  output logic                     done,
  // fired-neuron buffers
  input  logic [N_PE-1:0]          fired_empty,
  output logic [N_PE-1:0]          fired_pop,
  input  fired_t                   fired_data [N_PE],
  // synaptic rows in off-chip memory
  output logic                     srd_req_valid,
  input  logic                     srd_req_ready,
  output logic [SYN_ADDR_W-1:0]    srd_req_addr,
  input  logic                     srd_rsp_valid,
  input  logic [SYN_LANES*PKT_W-1:0] srd_rsp_data,
  // synapse lanes, accumulate port
  output logic                     acc_valid,
  output logic [DELAY_W-1:0]       acc_slot   [SYN_LANES],
  output logic [NIDX_BITS-1:0]     acc_nidx   [SYN_LANES],
  output logic signed [WEIGHT_W-1:0] acc_weight [SYN_LANES],
  input  logic                     lanes_busy,
  // activity counters
  output logic [31:0]              rows_done,
  output logic [31:0]              words_done
);
  typedef enum logic [1:0] {S_IDLE, S_PICK, S_FETCH, S_ISSUE} state_t;
  state_t state;

  localparam int PW = (N_PE > 1) ? $clog2(N_PE) : 1;

  logic [PW-1:0]         sel;
  logic                  any_fired;
  logic [SYN_ADDR_W-1:0] addr;
  logic [SYN_LEN_W-1:0]  left;
  logic [15:0]           outstanding;
  logic [31:0]           t_q;

  always_comb begin
    any_fired = 1'b0;
    sel = '0;
    for (int j = N_PE - 1; j >= 0; j--)
      if (!fired_empty[j]) begin
        any_fired = 1'b1;
        sel = PW'(j);
      end
  end

  assign busy = (state != S_IDLE);

  always_comb begin
    fired_pop = '0;
    if (state == S_PICK && any_fired) fired_pop[sel] = 1'b1;
  end

  assign srd_req_valid = (state == S_ISSUE) && (left != '0);
  assign srd_req_addr  = addr;

  logic [PW-1:0] sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      done        <= 1'b0;
      addr        <= '0;
      left        <= '0;
      sel_q       <= '0;
      t_q         <= '0;
      rows_done   <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:
          if (start) begin
            state <= S_PICK;
            t_q   <= t_step;
          end
        S_PICK:
          if (any_fired) begin
            sel_q <= sel;
            state <= S_FETCH;
          end else if (outstanding == 0 && !acc_valid && !lanes_busy && !srd_rsp_valid) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        S_FETCH: begin
          addr      <= fired_data[sel_q].ptr;
          left      <= fired_data[sel_q].len;
          rows_done <= rows_done + 1;
          state     <= S_ISSUE;
        end
        S_ISSUE:
          if (left == '0) state <= S_PICK;
          else if (srd_req_ready) begin
            addr <= addr + 1'b1;
            left <= left - 1'b1;
            if (left == SYN_LEN_W'(1)) state <= S_PICK;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) outstanding <= '0;
    else outstanding <= outstanding + 16'(srd_req_valid && srd_req_ready) - 16'(srd_rsp_valid);
  end

  // ---- unpack a response word onto the lanes (registered) -------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_valid  <= 1'b0;
      words_done <= '0;
    end else begin
      acc_valid <= srd_rsp_valid;
      if (srd_rsp_valid) words_done <= words_done + 1;
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < SYN_LANES; l++) begin
      syn_pkt_t p;
      p = srd_rsp_data[l*PKT_W +: PKT_W];
      acc_slot[l]   <= DELAY_W'(t_q) + p.delay + 1'b1;
      acc_nidx[l]   <= NIDX_BITS'(p.nidx);
      acc_weight[l] <= p.weight;
    end
  end

  always_ff @(posedge clk) begin
    if (srd_rsp_valid) assert (outstanding != 0 || (srd_req_valid && srd_req_ready))
      else $error("syn_integration_kernel: response without request");
  end
endmodule
