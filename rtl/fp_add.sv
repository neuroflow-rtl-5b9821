// fp_add: combinational IEEE-754 single-precision adder.
//
// Adds two single-precision numbers (subtract by flipping the sign of b
// before the call). The operand with the larger magnitude is taken as the
// base, the other is shifted right with guard, round and sticky bits kept,
// the significands are added or subtracted, the result is renormalised with
// a leading-zero count and rounded to nearest, ties to even. Subnormals are
// flushed to zero, overflow gives infinity and NaN is not handled, which is
// enough for the membrane and recovery variables of the neuron update.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic [31:0] opa, opb;
  logic [7:0]  eb, es, d;
  logic [26:0] mopa, mopb, shifted;   // 1.23 significand + guard/round/sticky
  logic        sticky;
  logic        sub;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic        found;
  logic [9:0]  exp_s;
  logic [27:0] norm;
  logic [23:0] mant;
  logic        guard, rest, round_up;
  logic [24:0] mant_r;

  always_comb begin
    if (a[30:0] >= b[30:0]) begin
      opa = a; opb = b;
    end else begin
      opa = b; opb = a;
    end
    eb = opa[30:23];
    es = opb[30:23];
    mopa   = (eb == 8'd0) ? 27'd0 : {1'b1, opa[22:0], 3'b000};
    mopb = (es == 8'd0) ? 27'd0 : {1'b1, opb[22:0], 3'b000};
    d      = eb - es;
    sticky = 1'b0;
    shifted = mopb;
    if (d >= 8'd27) begin
      shifted = 27'd0;
      sticky  = (mopb != 27'd0);
    end else begin
      for (int i = 0; i < 27; i++) begin
        if (i < int'(d) && mopb[i]) sticky = 1'b1;
      end
      shifted = mopb >> d;
    end
    shifted[0] = shifted[0] | sticky;
    sub = opa[31] ^ opb[31];
    sum = sub ? ({1'b0, mopa} - {1'b0, shifted}) : ({1'b0, mopa} + {1'b0, shifted});

    // leading-zero count over the 28-bit sum
    lz    = 5'd0;
    found = 1'b0;
    for (int i = 27; i >= 0; i--) begin
      if (!found && sum[i]) begin
        found = 1'b1;
        lz    = 5'(27 - i);
      end
    end
    // sum[27] set means carry out: exponent goes up by one (lz = 0)
    exp_s = {2'b00, eb} + 10'd1 - {5'd0, lz};
    norm  = sum << lz;               // leading one now at bit 27
    mant  = norm[27:4];
    guard = norm[3];
    rest  = |norm[2:0];
    round_up = guard && (rest || mant[0]);
    mant_r = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_s  = exp_s + 10'd1;
    end

    if (!found || eb == 8'd0) begin
      y = 32'd0;                           // exact cancellation or both zero
    end else if (exp_s[9] || exp_s == 10'd0) begin
      y = {opa[31], 31'd0};                // underflow: flush to zero
    end else if (exp_s >= 10'd255) begin
      y = {opa[31], 8'hFF, 23'd0};
    end else begin
      y = {opa[31], exp_s[7:0], mant_r[22:0]};
    end
  end
endmodule
