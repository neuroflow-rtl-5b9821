// tb_syn_accum_lane: self-checking test of one synapse accumulator lane.
// A small lane (16 neurons x 4 slots) is cleared, then receives bursts of
// random weighted packets, many of them back to back on the same address so
// the forwarding path is exercised, and a few large ones to hit saturation.
// A reference array kept by the testbench is compared with what the
// read-and-clear port returns; a second sweep must then read all zeros.
module tb_syn_accum_lane;
  localparam int NB = 4, SB = 2, AW = 24;
  localparam int DEPTH = 1 << (NB + SB);
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic init_done;
  logic acc_valid = 0, rc_en = 0;
  logic [SB-1:0] acc_slot = 0, rc_slot = 0;
  logic [NB-1:0] acc_nidx = 0, rc_nidx = 0;
  logic signed [15:0] acc_weight = 0;
  logic rc_valid, busy;
  logic signed [AW-1:0] rc_data;
  int checks = 0, failures = 0, cycles = 0;
  longint ref_mem [DEPTH];
  int init_cycles;

  syn_accum_lane #(.NIDX_BITS(NB), .SLOT_BITS(SB), .AW(AW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(input longint v);
    if (v > (1 << (AW-1)) - 1) return (1 << (AW-1)) - 1;
    if (v < -(1 << (AW-1)))    return -(1 << (AW-1));
    return v;
  endfunction

  task automatic sweep(input bit expect_zero);
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      rc_en = 1; rc_slot = SB'(a >> NB); rc_nidx = NB'(a);
      @(negedge clk);
      rc_en = 0;
      checks++;
      if (!rc_valid || longint'(rc_data) != (expect_zero ? 0 : ref_mem[a])) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %0d want %0d", a, rc_data, expect_zero ? 0 : ref_mem[a]);
      end
      ref_mem[a] = 0;
    end
  endtask

  initial begin
    foreach (ref_mem[i]) ref_mem[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    init_cycles = cycles;
    wait (init_done);
    // clear sweep takes exactly DEPTH cycles
    checks++;
    if (cycles - init_cycles > DEPTH + 1) failures++;
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < 400; i++) begin
        int a;
        @(negedge clk);
        a = ($urandom % 4 == 0) ? int'({acc_slot, acc_nidx}) : int'($urandom % DEPTH);
        acc_valid = 1;
        acc_slot = SB'(a >> NB); acc_nidx = NB'(a);
        acc_weight = (i % 97 == 0) ? 16'sh7FFF : 16'(($urandom % 2001) - 1000);
        ref_mem[a] = sat(ref_mem[a] + longint'(acc_weight));
      end
      // a saturating run on one address
      for (int i = 0; i < 300 && round == 1; i++) begin
        @(negedge clk);
        acc_valid = 1; acc_slot = 1; acc_nidx = 3; acc_weight = 16'sh7FFF;
        ref_mem[1 << NB | 3] = sat(ref_mem[1 << NB | 3] + 32767);
      end
      @(negedge clk);
      acc_valid = 0;
      @(negedge clk);
      @(negedge clk);
      sweep(0);
    end
    sweep(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
