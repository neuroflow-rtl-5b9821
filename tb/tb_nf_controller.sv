// tb_nf_controller: self-checking test of the time-step sequencer. Stand-in
// kernels answer su_start and sa_start after random delays. For runs of
// 1, 5 and 0 steps the test checks that phases alternate (su before sa,
// never both), that each step gives exactly one su_start, one sa_start and
// one step_done, that t_step counts the steps across runs and restarts after
// clear_t, that nothing starts before lanes_ready, and that done pulses once
// per run.
module tb_nf_controller;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic run = 0, clear_t = 0, lanes_ready = 0;
  logic [31:0] n_steps = 0;
  logic su_start, su_done = 0, sa_start, sa_done = 0;
  logic [31:0] t_step;
  logic phase_su, phase_sa, busy, step_done, done;
  int checks = 0, failures = 0;
  int n_su = 0, n_sa = 0, n_step = 0, n_done = 0;
  bit expect_sa = 0;

  nf_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-in kernels
  always @(posedge clk) begin
    if (su_start) begin
      n_su++;
      checks++; if (expect_sa || !lanes_ready) failures++;
      expect_sa = 1;
      fork begin repeat (1 + $urandom % 6) @(posedge clk); #1 su_done = 1; @(posedge clk); #1 su_done = 0; end join_none
    end
    if (sa_start) begin
      n_sa++;
      checks++; if (!expect_sa) failures++;
      expect_sa = 0;
      fork begin repeat (1 + $urandom % 6) @(posedge clk); #1 sa_done = 1; @(posedge clk); #1 sa_done = 0; end join_none
    end
    if (step_done) n_step++;
    if (done) n_done++;
    if (phase_su && phase_sa) failures++;
  end

  task automatic do_run(input int n, input int t_expect);
    int s0, d0;
    s0 = n_step; d0 = n_done;
    @(negedge clk); run = 1; n_steps = n;
    @(negedge clk); run = 0;
    wait (n_done == d0 + 1);
    @(negedge clk);
    checks++;
    if (n_step - s0 != n || t_step != 32'(t_expect) || busy) begin
      failures++;
      $display("FAIL run of %0d: %0d steps, t=%0d", n, n_step - s0, t_step);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // not ready yet: a run waits
    @(negedge clk); run = 1; n_steps = 1;
    @(negedge clk); run = 0;
    repeat (20) @(negedge clk);
    checks++; if (n_su != 0) failures++;
    lanes_ready = 1;
    wait (n_done == 1);
    @(negedge clk);
    checks++; if (t_step != 1) failures++;
    do_run(5, 6);
    do_run(0, 6);
    @(negedge clk); clear_t = 1; @(negedge clk); clear_t = 0;
    checks++; if (t_step != 0) failures++;
    do_run(3, 3);
    checks++; if (n_su != 9 || n_sa != 9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
