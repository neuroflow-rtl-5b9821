// current_injector: external current sources held on chip.
//
// A table of N_SRC current sources, each a DC step: a contiguous range of
// target neurons [lo, hi], a time window [start, stop) in time steps and an
// amplitude. For the N_PE neurons that the state-update kernel presents in a
// cycle, the injector sums the amplitudes of all sources that cover the
// neuron at the current time step and returns the total as a single-precision
// current, one cycle later. Amplitudes are stored as signed fixed point with
// 16 fraction bits so that overlapping sources add with integer adders; the
// sum saturates at the 32-bit range and is converted with fix2fp.
//
// The host writes the table through a word port: entry e, field f
// (0 lo, 1 hi, 2 start, 3 stop, 4 amplitude). All entries reset to an empty
// window. Storing amplitude, time and target of each source on chip follows
// the design; the range target, the table size and the number formats are
// this design's choices.
module current_injector
  import nf_pkg::*;
#(
  parameter int N_SRC = 16,
  parameter int N_PE  = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host table writes
  input  logic                     wr_en,
  input  logic [$clog2(N_SRC)-1:0] wr_entry,
  input  logic [2:0]               wr_field,
  input  logic [31:0]              wr_data,
  // query
  input  logic [31:0]              t_step,
  input  logic [31:0]              idx   [N_PE],
  output logic [31:0]              i_ext [N_PE]
);
  typedef struct packed {
    logic [31:0]        lo, hi, start, stop;
    logic signed [31:0] amp;
  } src_t;

  src_t tab [N_SRC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N_SRC; e++) tab[e] <= '0;
    end else if (wr_en) begin
      case (wr_field)
        3'd0: tab[wr_entry].lo    <= wr_data;
        3'd1: tab[wr_entry].hi    <= wr_data;
        3'd2: tab[wr_entry].start <= wr_data;
        3'd3: tab[wr_entry].stop  <= wr_data;
        3'd4: tab[wr_entry].amp   <= wr_data;
        default: ;
      endcase
    end
  end

  logic signed [31:0] sum_q [N_PE];

  always_ff @(posedge clk) begin
    for (int p = 0; p < N_PE; p++) begin
      logic signed [39:0] acc;
      acc = '0;
      for (int e = 0; e < N_SRC; e++) begin
        if (idx[p] >= tab[e].lo && idx[p] <= tab[e].hi &&
            t_step >= tab[e].start && t_step < tab[e].stop)
          acc = acc + 40'(tab[e].amp);
      end
      if (acc > 40'sh007FFFFFFF)       sum_q[p] <= 32'sh7FFFFFFF;
      else if (acc < -40'sh0080000000) sum_q[p] <= 32'sh80000000;
      else                             sum_q[p] <= acc[31:0];
    end
  end

  for (genvar p = 0; p < N_PE; p++) begin : g_cvt
    fix2fp #(.W(32), .FRAC(16)) u_cvt (.x(sum_q[p]), .y(i_ext[p]));
  end
endmodule
