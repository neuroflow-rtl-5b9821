// fp_mul: combinational IEEE-754 single-precision multiplier.
//
// The neuron state update works in single-precision floating point, as the
// design calls for; this is its multiplier. The 24x24-bit significand product
// is normalised and rounded to nearest, ties to even. Subnormal inputs and
// results are flushed to (signed) zero, overflow gives infinity, and NaN
// handling is not provided: neuron states stay far from those ranges. The
// unit is purely combinational; callers register its output.
module fp_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic        sign;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic [47:0] prod;
  logic [9:0]  exp_s;       // signed, biased exponent of the result
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;

  always_comb begin
    sign  = a[31] ^ b[31];
    ea    = a[30:23];
    eb    = b[30:23];
    ma    = {1'b1, a[22:0]};
    mb    = {1'b1, b[22:0]};
    prod  = ma * mb;
    exp_s = {2'b00, ea} + {2'b00, eb} - 10'd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_s  = exp_s + 10'd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 10'd1;
    end
    if (ea == 8'd0 || eb == 8'd0) begin
      y = {sign, 31'd0};
    end else if (exp_s[9] || exp_s == 10'd0) begin
      y = {sign, 31'd0};                    // underflow: flush to zero
    end else if (exp_s >= 10'd255) begin
      y = {sign, 8'hFF, 23'd0};             // overflow: infinity
    end else begin
      y = {sign, exp_s[7:0], mant_r[22:0]};
    end
  end
endmodule
