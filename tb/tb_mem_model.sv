// tb_mem_model: behavioural model of one off-chip memory channel, for
// testbenches only. Word-addressed, DW bits per word, DEPTH words. Read
// requests are accepted through a valid/ready handshake; `ready` is high
// with probability READY_PCT percent each cycle (100 = always). Each accepted
// read returns its word LAT cycles later, in order, one per cycle. Writes
// are accepted every cycle and take effect at once. The array `mem` is set
// and inspected by the testbench through hierarchical references.
module tb_mem_model #(
  parameter int DW    = 64,
  parameter int DEPTH = 16,
  parameter int AW    = 32,
  parameter int LAT   = 3
) (
  input  logic          clk,
  input  int            ready_pct,
  input  logic          req_valid,
  output logic          req_ready,
  input  logic [AW-1:0] req_addr,
  output logic          rsp_valid,
  output logic [DW-1:0] rsp_data,
  input  logic          wr_valid,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  output int            stalls
);
  logic [DW-1:0] mem [DEPTH];
  typedef struct { int due; logic [AW-1:0] addr; } req_t;
  req_t q [$];
  int cyc = 0;

  initial begin
    req_ready = 1'b1;
    rsp_valid = 1'b0;
    rsp_data  = '0;
    stalls    = 0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (req_valid && req_ready) q.push_back('{cyc + LAT, req_addr});
    if (req_valid && !req_ready) stalls <= stalls + 1;
    if (wr_valid) mem[int'(wr_addr) % DEPTH] <= wr_data;
    if (q.size() > 0 && q[0].due <= cyc) begin
      req_t r;
      r = q.pop_front();
      rsp_valid <= 1'b1;
      rsp_data  <= mem[int'(r.addr) % DEPTH];
    end else begin
      rsp_valid <= 1'b0;
    end
    req_ready <= (int'($urandom % 100) < ready_pct);
  end
endmodule
