// tb_current_injector: self-checking test of the external current table.
// Three sources are written, two of them overlapping in neurons and time;
// for many random (time step, neuron) queries on four lanes, the injected
// current one cycle later must equal the sum of the amplitudes of the sources
// that cover the neuron at that step, computed here from the same table.
module tb_current_injector;
  import nf_tb_pkg::*;
  localparam int N_SRC = 4, N_PE = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic wr_en = 0;
  logic [1:0] wr_entry = 0;
  logic [2:0] wr_field = 0;
  logic [31:0] wr_data = 0;
  logic [31:0] t_step = 0;
  logic [31:0] idx [N_PE];
  logic [31:0] i_ext [N_PE];
  int checks = 0, failures = 0;
  int lo [3] = '{10, 15, 0};
  int hi [3] = '{20, 40, 3};
  int st [3] = '{5, 8, 100};
  int sp [3] = '{50, 12, 101};
  real amp [3] = '{0.3, 10.0, -2.5};

  current_injector #(.N_SRC(N_SRC), .N_PE(N_PE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int e, input int f, input logic [31:0] d);
    @(negedge clk);
    wr_en = 1; wr_entry = 2'(e); wr_field = 3'(f); wr_data = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    foreach (idx[p]) idx[p] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 3; e++) begin
      wr(e, 0, lo[e]); wr(e, 1, hi[e]); wr(e, 2, st[e]); wr(e, 3, sp[e]);
      wr(e, 4, 32'(longint'(amp[e] * 65536.0)));
    end
    for (int i = 0; i < 600; i++) begin
      real want [N_PE];
      @(negedge clk);
      t_step = $urandom % 110;
      foreach (idx[p]) begin
        idx[p] = $urandom % 45;
        want[p] = 0.0;
        for (int e = 0; e < 3; e++)
          if (int'(idx[p]) >= lo[e] && int'(idx[p]) <= hi[e] && int'(t_step) >= st[e] && int'(t_step) < sp[e])
            want[p] += real'(longint'(amp[e] * 65536.0)) / 65536.0;
      end
      @(negedge clk);
      foreach (idx[p]) begin
        real got, err;
        got = f2r(i_ext[p]);
        err = got - want[p];
        if (err < 0) err = -err;
        checks++;
        if (err > 1e-5) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d n=%0d got %g want %g", t_step, idx[p], got, want[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
