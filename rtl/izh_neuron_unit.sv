// izh_neuron_unit: one Neuron State Update Module (Izhikevich model, Euler).
//
// Each accepted neuron advances one 1 ms time step of the Izhikevich model by
// forward Euler, in single-precision floating point:
//     v' = v + (0.04 v^2 + 5 v + 140 - u + I)
//     u' = u + a (b v - u)
//     if v' >= 30 mV: spike, v' = c, u' = u' + d
// with I = i_syn + i_ext + i_noise. The model, its parameters a, b, c, d and
// the floating-point arithmetic follow the design; the order "update, then
// test the threshold" and the 1 ms Euler step without sub-steps are this
// design's choices.
//
// The unit is a six-stage pipeline that takes one neuron per cycle with no
// stall (in_valid may be high every cycle); each stage holds at most one
// floating-point multiply or add per path. A TAG_W-bit tag travels with the
// neuron so the caller can match results to neurons. out_valid follows
// in_valid exactly LATENCY = 6 cycles later.
module izh_neuron_unit
  import nf_pkg::*;
#(
  parameter int TAG_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [TAG_W-1:0]  in_tag,
  input  logic [31:0]       v, u, a, b, c, d,
  input  logic [31:0]       i_syn, i_ext, i_noise,
  output logic              out_valid,
  output logic [TAG_W-1:0]  out_tag,
  output logic [31:0]       v_new,
  output logic [31:0]       u_new,
  output logic              spike
);
  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [31:0] v, u, a, c, d;
  } carry_t;

  // ---- stage 1 -------------------------------------------------------------
  logic [31:0] vv_c, v5_c, bv_c, is1_c;
  fp_mul m_vv (.a(v),    .b(v),     .y(vv_c));
  fp_mul m_v5 (.a(FP_5), .b(v),     .y(v5_c));
  fp_mul m_bv (.a(b),    .b(v),     .y(bv_c));
  fp_add a_i1 (.a(i_syn),.b(i_ext), .y(is1_c));

  logic        s1_valid;
  carry_t      s1;
  logic [31:0] s1_vv, s1_v5, s1_bv, s1_is, s1_noise;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end
  always_ff @(posedge clk) begin
    s1 <= '{tag: in_tag, v: v, u: u, a: a, c: c, d: d};
    s1_vv <= vv_c; s1_v5 <= v5_c; s1_bv <= bv_c; s1_is <= is1_c; s1_noise <= i_noise;
  end

  // ---- stage 2 -------------------------------------------------------------
  logic [31:0] t1_c, t2_c, du0_c, is2_c;
  fp_mul m_t1  (.a(FP_0P04), .b(s1_vv), .y(t1_c));
  fp_add a_t2  (.a(s1_v5),   .b(FP_140), .y(t2_c));
  fp_add a_du0 (.a(s1_bv),   .b({~s1.u[31], s1.u[30:0]}), .y(du0_c));
  fp_add a_is2 (.a(s1_is),   .b(s1_noise), .y(is2_c));

  logic        s2_valid;
  carry_t      s2;
  logic [31:0] s2_t1, s2_t2, s2_du0, s2_is;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_valid <= 1'b0;
    else        s2_valid <= s1_valid;
  end
  always_ff @(posedge clk) begin
    s2 <= s1;
    s2_t1 <= t1_c; s2_t2 <= t2_c; s2_du0 <= du0_c; s2_is <= is2_c;
  end

  // ---- stage 3 -------------------------------------------------------------
  logic [31:0] t3_c, t4_c, du_c;
  fp_add a_t3 (.a(s2_t1), .b(s2_t2), .y(t3_c));
  fp_add a_t4 (.a(s2_is), .b({~s2.u[31], s2.u[30:0]}), .y(t4_c));
  fp_mul m_du (.a(s2.a),  .b(s2_du0), .y(du_c));

  logic        s3_valid;
  carry_t      s3;
  logic [31:0] s3_t3, s3_t4, s3_du;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s3_valid <= 1'b0;
    else        s3_valid <= s2_valid;
  end
  always_ff @(posedge clk) begin
    s3 <= s2;
    s3_t3 <= t3_c; s3_t4 <= t4_c; s3_du <= du_c;
  end

  // ---- stage 4 -------------------------------------------------------------
  logic [31:0] dv_c, un_c;
  fp_add a_dv (.a(s3_t3), .b(s3_t4), .y(dv_c));
  fp_add a_un (.a(s3.u),  .b(s3_du), .y(un_c));

  logic        s4_valid;
  carry_t      s4;
  logic [31:0] s4_dv, s4_un;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s4_valid <= 1'b0;
    else        s4_valid <= s3_valid;
  end
  always_ff @(posedge clk) begin
    s4 <= s3;
    s4_dv <= dv_c; s4_un <= un_c;
  end

  // ---- stage 5 -------------------------------------------------------------
  logic [31:0] vn_c, ud_c;
  fp_add a_vn (.a(s4.v),  .b(s4_dv), .y(vn_c));
  fp_add a_ud (.a(s4_un), .b(s4.d),  .y(ud_c));

  logic        s5_valid;
  carry_t      s5;
  logic [31:0] s5_vn, s5_un, s5_ud;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s5_valid <= 1'b0;
    else        s5_valid <= s4_valid;
  end
  always_ff @(posedge clk) begin
    s5 <= s4;
    s5_vn <= vn_c; s5_un <= s4_un; s5_ud <= ud_c;
  end

  // ---- stage 6: threshold and reset ------------------------------------------
  logic fire_c;
  assign fire_c = fp_ge(s5_vn, FP_30);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s5_valid;
  end
  always_ff @(posedge clk) begin
    out_tag <= s5.tag;
    spike   <= fire_c;
    v_new   <= fire_c ? s5.c  : s5_vn;
    u_new   <= fire_c ? s5_ud : s5_un;
  end
endmodule
