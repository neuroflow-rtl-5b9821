// syn_accum_lane: one synapse module of the Synaptic Integration Kernel.
//
// The lane owns an on-chip accumulator memory holding, for each of its
// neurons, the input current that will arrive 1..MAX_DELAY time steps in the
// future (I_t+1, I_t+2, ...). The memory is a ring of MAX_DELAY slots, each
// slot holding one accumulator per neuron of the lane; address = {slot,
// neuron}. Which slot stands for "now" is decided by the caller from the time
// step, so the end-of-step copy of I_t+1 into I_t becomes a pointer move plus
// a clear-on-read, and nothing is copied.
//
// Accumulate port (synaptic phase): acc_valid with slot, neuron and a signed
// weight; one packet per cycle, fully pipelined. The read-modify-write takes
// two cycles (read, then add-and-write); a packet hitting the address written
// in the previous cycle takes the forwarded sum, so back-to-back packets to
// the same neuron are summed correctly. Sums saturate at the accumulator
// range.
// Read-and-clear port (state-update phase): rc_en with slot and neuron;
// rc_data is valid one cycle later and the entry is zeroed in the same cycle.
// The two ports must not be used in the same cycle (the phases alternate).
//
// After reset the lane clears its whole memory, one entry per cycle, and
// raises init_done when it is finished. Per-lane accumulators in on-chip
// memory, an adder per lane and the delay-indexed future currents follow the
// design; the ring addressing, clear-on-read, saturation and the 24-bit
// accumulator are this design's choices.
module syn_accum_lane
  import nf_pkg::*;
#(
  parameter int NIDX_BITS = NIDX_W,     // neurons per lane = 2**NIDX_BITS
  parameter int SLOT_BITS = DELAY_W,    // delay slots = 2**SLOT_BITS
  parameter int AW        = ACC_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  output logic                        init_done,
  // accumulate
  input  logic                        acc_valid,
  input  logic [SLOT_BITS-1:0]        acc_slot,
  input  logic [NIDX_BITS-1:0]        acc_nidx,
  input  logic signed [WEIGHT_W-1:0]  acc_weight,
  // read and clear
  input  logic                        rc_en,
  input  logic [SLOT_BITS-1:0]        rc_slot,
  input  logic [NIDX_BITS-1:0]        rc_nidx,
  output logic                        rc_valid,
  output logic signed [AW-1:0]        rc_data,
  output logic                        busy
);
  localparam int ABITS = SLOT_BITS + NIDX_BITS;
  localparam int DEPTH = 1 << ABITS;
  localparam logic signed [AW:0] MAXV = (AW+1)'((1 << (AW-1)) - 1);
  localparam logic signed [AW:0] MINV = -(AW+1)'(1 << (AW-1));

  logic signed [AW-1:0] mem [DEPTH];

  // ---- clear sweep after reset ------------------------------------------------
  logic [ABITS-1:0] init_addr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done <= 1'b0;
      init_addr <= '0;
    end else if (!init_done) begin
      init_addr <= init_addr + 1'b1;
      if (init_addr == ABITS'(DEPTH - 1)) init_done <= 1'b1;
    end
  end

  // ---- accumulate pipeline -----------------------------------------------------
  logic                   s1_valid;
  logic [ABITS-1:0]       s1_addr;
  logic signed [WEIGHT_W-1:0] s1_w;
  logic signed [AW-1:0]   rd_q;
  logic                   last_wr;
  logic [ABITS-1:0]       last_addr;
  logic signed [AW-1:0]   last_data;
  logic signed [AW-1:0]   base;
  logic signed [AW:0]     sum_w;
  logic signed [AW-1:0]   sum;
  logic [ABITS-1:0]       a_acc, a_rc;

  assign a_acc = {acc_slot, acc_nidx};
  assign a_rc  = {rc_slot, rc_nidx};

  always_comb begin
    base  = (last_wr && last_addr == s1_addr) ? last_data : rd_q;
    sum_w = (AW+1)'(base) + (AW+1)'(s1_w);
    if (sum_w > MAXV)      sum = MAXV[AW-1:0];
    else if (sum_w < MINV) sum = MINV[AW-1:0];
    else                   sum = sum_w[AW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      last_wr  <= 1'b0;
      rc_valid <= 1'b0;
    end else begin
      s1_valid <= acc_valid && init_done;
      last_wr  <= s1_valid;
      rc_valid <= rc_en && init_done;
    end
  end

  // single memory write port: clear sweep, clear-on-read or accumulate
  always_ff @(posedge clk) begin
    s1_addr   <= a_acc;
    s1_w      <= acc_weight;
    rd_q      <= mem[rc_en ? a_rc : a_acc];
    last_addr <= s1_addr;
    last_data <= sum;
    if (!init_done)    mem[init_addr] <= '0;
    else if (s1_valid) mem[s1_addr]   <= sum;
    else if (rc_en)    mem[a_rc]      <= '0;
  end

  assign rc_data = rd_q;
  assign busy    = s1_valid;

  // the two phases never overlap inside a lane
  always_ff @(posedge clk) begin
    if (init_done) assert (!(rc_en && (acc_valid || s1_valid)))
      else $error("syn_accum_lane: read-clear during accumulation");
  end
endmodule
