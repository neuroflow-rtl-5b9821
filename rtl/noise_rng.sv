// noise_rng: random noise current for one neuron update module.
//
// A 32-bit xorshift generator (shifts 13, 17, 5) produces one random word per
// neuron; the word becomes either a uniform value in [-1, 1) or an
// approximately standard-normal value (sum of the word's four bytes, centred
// and scaled by 887/1024 so its standard deviation is 1.0), which is then
// multiplied by the single-precision amplitude `amp`. noise is a
// combinational function of the current generator state; `next` advances the
// state once the neuron that used it has been accepted. `seed_load` reloads
// the state from `seed` mixed with the module's LANE number so that every
// module draws a different sequence; a zero state is avoided. Uniform and
// Gaussian generators for noise input follow the design; the generator type
// and the Gaussian approximation are this design's choices.
module noise_rng
  import nf_pkg::*;
#(
  parameter int LANE = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_load,
  input  logic [31:0] seed,
  input  logic        next,
  input  logic        gauss,      // 1: Gaussian, 0: uniform
  input  logic [31:0] amp,        // fp32 amplitude
  output logic [31:0] noise       // fp32 noise current
);
  localparam logic [31:0] MIX = 32'h9E3779B9 * 32'(LANE + 1);

  logic [31:0] s, s_next, s_seed;

  always_comb begin
    s_next = s ^ (s << 13);
    s_next = s_next ^ (s_next >> 17);
    s_next = s_next ^ (s_next << 5);
    s_seed = seed ^ MIX;
    if (s_seed == '0) s_seed = 32'h1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         s <= MIX;
    else if (seed_load) s <= s_seed;
    else if (next)      s <= s_next;
  end

  // fixed-point sample: uniform has 15 fraction bits, Gaussian 7
  logic signed [15:0] uni;
  logic signed [10:0] gsum;
  logic signed [21:0] gscaled;
  logic signed [23:0] sample;
  logic [31:0]        uni_f, gau_f, sel_f;

  always_comb begin
    uni     = s[15:0];
    gsum    = $signed({3'b0, s[7:0]}) + $signed({3'b0, s[15:8]}) +
              $signed({3'b0, s[23:16]}) + $signed({3'b0, s[31:24]}) - 11'sd510;
    gscaled = 22'(gsum) * 22'sd887;
    sample  = 24'(gscaled >>> 10);
  end

  fix2fp #(.W(16), .FRAC(15)) u_cu (.x(uni),    .y(uni_f));
  fix2fp #(.W(24), .FRAC(7))  u_cg (.x(sample), .y(gau_f));
  assign sel_f = gauss ? gau_f : uni_f;
  fp_mul u_mul (.a(amp), .b(sel_f), .y(noise));
endmodule
