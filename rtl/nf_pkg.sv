// nf_pkg: types and constants shared by the NeuroFlow spiking-network engine.
//
// The synaptic data packet follows the three-field layout of the design's
// synaptic table: a 16-bit fixed-point weight, a 12-bit target neuron index
// and a 4-bit axonal delay (32 bits per packet). The field order inside the
// word (weight in the top bits) and the number formats are this design's
// choice. Neuron records are 256 bits: six single-precision values (v, u and
// the Izhikevich parameters a, b, c, d) plus a pointer to the neuron's row of
// synaptic packets and the row length. Everything that is a number in the
// neuron update is IEEE-754 single precision; synaptic weights and the
// on-chip current accumulators are signed fixed point.
package nf_pkg;

  // ---- synaptic packet ------------------------------------------------------
  localparam int WEIGHT_W  = 16;  // synaptic weight, fixed precision
  localparam int NIDX_W    = 12;  // target neuron index within a synapse lane
  localparam int DELAY_W   = 4;   // axonal delay field, encodes 1..16 ms
  localparam int PKT_W     = WEIGHT_W + NIDX_W + DELAY_W;
  localparam int WEIGHT_FRAC = 10; // weight format: signed Q5.10
  localparam int MAX_DELAY = 1 << DELAY_W;  // 16 delay slots (1..16 ms)

  typedef struct packed {
    logic signed [WEIGHT_W-1:0] weight;
    logic [NIDX_W-1:0]          nidx;
    logic [DELAY_W-1:0]         delay;  // delay in ms minus one
  } syn_pkt_t;

  // ---- on-chip accumulated current ------------------------------------------
  localparam int ACC_W = 24;  // accumulator width, same binary point as weights

  // ---- neuron record in off-chip memory -------------------------------------
  localparam int REC_W = 256;

  typedef struct packed {
    logic [31:0] v;        // membrane potential (mV), fp32
    logic [31:0] u;        // recovery variable, fp32
    logic [31:0] a;        // Izhikevich a, fp32
    logic [31:0] b;        // Izhikevich b, fp32
    logic [31:0] c;        // reset potential (mV), fp32
    logic [31:0] d;        // recovery increment, fp32
    logic [31:0] syn_ptr;  // first word of this neuron's synaptic row
    logic [31:0] syn_len;  // number of synaptic words in the row
  } neuron_rec_t;

  // ---- fired-neuron entry ---------------------------------------------------
  localparam int SYN_ADDR_W = 32;
  localparam int SYN_LEN_W  = 16;

  typedef struct packed {
    logic [SYN_ADDR_W-1:0] ptr;
    logic [SYN_LEN_W-1:0]  len;
  } fired_t;

  localparam int FIRED_W = SYN_ADDR_W + SYN_LEN_W;

  // ---- single-precision constants -------------------------------------------
  localparam logic [31:0] FP_0P04  = 32'h3D23D70A;  // 0.04
  localparam logic [31:0] FP_5     = 32'h40A00000;  // 5.0
  localparam logic [31:0] FP_140   = 32'h430C0000;  // 140.0
  localparam logic [31:0] FP_30    = 32'h41F00000;  // 30.0 (spike peak)
  localparam logic [31:0] FP_ZERO  = 32'h00000000;

  // a >= b for two finite single-precision numbers
  function automatic logic fp_ge(input logic [31:0] a, input logic [31:0] b);
    logic a_neg, b_neg;
    a_neg = a[31] && (a[30:0] != '0);
    b_neg = b[31] && (b[30:0] != '0);
    if (a_neg != b_neg) return b_neg;
    if (!a_neg) return a[30:0] >= b[30:0];
    return a[30:0] <= b[30:0];
  endfunction

  // ---- host register map (word addresses) -----------------------------------
  localparam logic [15:0] REG_NOISE_AMP  = 16'h0010;  // fp32 noise amplitude
  localparam logic [15:0] REG_NOISE_MODE = 16'h0011;  // bit0: 1 = Gaussian
  localparam logic [15:0] REG_SEED       = 16'h0012;  // RNG seed (write reseeds)
  localparam logic [15:0] REG_INJ_BASE   = 16'h0100;  // injector: base + 8*entry + field
  localparam logic [15:0] REG_MON_BASE   = 16'h0200;  // monitor: base + slot

endpackage
