// fix2fp: signed fixed-point to IEEE-754 single precision.
//
// Synaptic weights are accumulated on chip in fixed point; the neuron update
// works in floating point. This combinational converter takes a W-bit two's
// complement value with FRAC fraction bits, finds the leading one of its
// magnitude, and rounds the significand to nearest, ties to even. Values of
// W up to 32 bits are supported; zero converts to +0.
module fix2fp #(
  parameter int W    = 24,
  parameter int FRAC = 10
) (
  input  logic signed [W-1:0] x,
  output logic [31:0]         y
);
  logic          sign;
  logic [W-1:0]  mag;
  int            msb;
  logic [55:0]   aligned;     // leading one placed at bit 55
  logic [23:0]   mant;
  logic          guard, rest, round_up;
  logic [24:0]   mant_r;
  logic [9:0]    exp_s;

  always_comb begin
    sign = x[W-1];
    mag  = sign ? W'(-x) : W'(x);
    msb  = 0;
    for (int i = 0; i < W; i++) if (mag[i]) msb = i;
    aligned  = 56'(mag) << (55 - msb);
    mant     = aligned[55:32];
    guard    = aligned[31];
    rest     = |aligned[30:0];
    round_up = guard && (rest || mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    exp_s    = 10'(127 + msb - FRAC);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 10'd1;
    end
    if (mag == '0) y = 32'd0;
    else           y = {sign, exp_s[7:0], mant_r[22:0]};
  end
endmodule
