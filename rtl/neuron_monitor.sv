// neuron_monitor: on-chip record of the membrane potential of chosen neurons.
//
// N_MON monitor slots each name one neuron (bit 31 of the slot register
// enables it, bits 30:0 give the neuron index). Whenever the state-update
// kernel writes back a neuron, the monitor compares its index with every
// slot; a match stores the new membrane potential in that slot's buffer at
// position t_step mod DEPTH. The host reads buffer entries back after the
// run through rd_slot/rd_t; rd_data is valid one cycle later. At most one of
// the N_PE neurons of a cycle can match a slot, because they are distinct
// neurons. Keeping the potentials of specified neurons on the chip during the
// run and reading them out afterwards follows the design; the slot count,
// buffer depth and register layout are this design's choices.
module neuron_monitor
  import nf_pkg::*;
#(
  parameter int N_MON = 4,
  parameter int DEPTH = 1024,
  parameter int N_PE  = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // slot configuration
  input  logic                     cfg_en,
  input  logic [$clog2(N_MON)-1:0] cfg_slot,
  input  logic [31:0]              cfg_data,
  // neurons written back this cycle
  input  logic [31:0]              t_step,
  input  logic                     wb_valid,
  input  logic [31:0]              wb_idx [N_PE],
  input  logic [31:0]              wb_v   [N_PE],
  // read-out
  input  logic [$clog2(N_MON)-1:0] rd_slot,
  input  logic [$clog2(DEPTH)-1:0] rd_t,
  output logic [31:0]              rd_data,
  output logic [31:0]              hits
);
  localparam int TW = $clog2(DEPTH);

  logic [31:0] slot_q [N_MON];
  logic [31:0] buf_q  [N_MON][DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < N_MON; m++) slot_q[m] <= '0;
    end else if (cfg_en) begin
      slot_q[cfg_slot] <= cfg_data;
    end
  end

  logic        hit   [N_MON];
  logic [31:0] hit_v [N_MON];
  always_comb begin
    for (int m = 0; m < N_MON; m++) begin
      hit[m]   = 1'b0;
      hit_v[m] = '0;
      for (int p = 0; p < N_PE; p++) begin
        if (wb_valid && slot_q[m][31] && wb_idx[p] == {1'b0, slot_q[m][30:0]}) begin
          hit[m]   = 1'b1;
          hit_v[m] = wb_v[p];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int m = 0; m < N_MON; m++)
      if (hit[m]) buf_q[m][t_step[TW-1:0]] <= hit_v[m];
    rd_data <= buf_q[rd_slot][rd_t];
  end

  // number of samples stored since reset
  logic [31:0] n_hit;
  always_comb begin
    n_hit = '0;
    for (int m = 0; m < N_MON; m++) n_hit = n_hit + 32'(hit[m]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hits <= '0;
    else        hits <= hits + n_hit;
  end
endmodule
