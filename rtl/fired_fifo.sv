// fired_fifo: on-chip buffer of fired neurons between the two phases.
//
// During the state-update phase each neuron update module pushes one entry
// per neuron that spiked: the location (first word and length) of that
// neuron's row of synaptic packets in off-chip memory. During the synaptic
// phase the integration kernel pops the entries back in order. The buffer is
// a first-in first-out memory of DEPTH entries with one push and one pop port;
// the popped entry appears on rd_data one cycle after pop (registered read,
// as a block RAM gives it). Pushing when full or popping when empty is an
// error caught by assertions. A buffer of fired-neuron indices in on-chip
// memory follows the design; storing the row location with the entry and one
// buffer per update module are this design's choices.
module fired_fifo
  import nf_pkg::*;
#(
  parameter int DEPTH = 8192,
  parameter int DW    = FIRED_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [DW-1:0] wr_data,
  input  logic          pop,
  output logic [DW-1:0] rd_data,
  output logic          empty,
  output logic          full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [PW-1:0] wp, rp;

  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + ($clog2(DEPTH+1))'(push) - ($clog2(DEPTH+1))'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= wr_data;
    if (pop)  rd_data <= mem[rp];
  end

  always_ff @(posedge clk) begin
    if (push) assert (!full || pop) else $error("fired_fifo: push when full");
    if (pop)  assert (!empty)       else $error("fired_fifo: pop when empty");
  end
endmodule
