// tb_neuron_monitor: self-checking test of the membrane-potential monitor.
// Three of four slots are enabled on chosen neurons; for 64 time steps a
// sweep of 48 neurons, 4 per cycle, is written back with random potentials.
// Every enabled slot's buffer must then hold, at each step, the potential
// given to its neuron, and the hit counter must equal 3 x 64.
module tb_neuron_monitor;
  localparam int N_MON = 4, DEPTH = 64, N_PE = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic cfg_en = 0;
  logic [1:0] cfg_slot = 0;
  logic [31:0] cfg_data = 0;
  logic [31:0] t_step = 0;
  logic wb_valid = 0;
  logic [31:0] wb_idx [N_PE];
  logic [31:0] wb_v [N_PE];
  logic [1:0] rd_slot = 0;
  logic [5:0] rd_t = 0;
  logic [31:0] rd_data, hits;
  int checks = 0, failures = 0;
  int mon_n [3] = '{5, 22, 47};
  logic [31:0] want [3][DEPTH];

  neuron_monitor #(.N_MON(N_MON), .DEPTH(DEPTH), .N_PE(N_PE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (wb_idx[p]) begin wb_idx[p] = 0; wb_v[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      @(negedge clk); cfg_en = 1; cfg_slot = 2'(m); cfg_data = 32'h8000_0000 | 32'(mon_n[m]);
    end
    @(negedge clk); cfg_en = 0;
    for (int t = 0; t < DEPTH; t++) begin
      for (int w = 0; w < 12; w++) begin
        @(negedge clk);
        t_step = t; wb_valid = 1;
        foreach (wb_idx[p]) begin
          wb_idx[p] = 32'(w * N_PE + p);
          wb_v[p] = $urandom;
          for (int m = 0; m < 3; m++) if (mon_n[m] == int'(wb_idx[p])) want[m][t] = wb_v[p];
        end
      end
    end
    @(negedge clk); wb_valid = 0;
    for (int m = 0; m < 3; m++)
      for (int t = 0; t < DEPTH; t++) begin
        @(negedge clk); rd_slot = 2'(m); rd_t = 6'(t);
        @(negedge clk);
        checks++;
        if (rd_data != want[m][t]) begin
          failures++;
          if (failures < 10) $display("FAIL slot %0d t %0d got %h want %h", m, t, rd_data, want[m][t]);
        end
      end
    checks++;
    if (hits != 3 * DEPTH) begin failures++; $display("FAIL hits %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
