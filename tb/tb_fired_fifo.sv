// tb_fired_fifo: self-checking test of the fired-neuron buffer. A small
// buffer is filled to full with random entries, drained, and then exercised
// with random simultaneous pushes and pops; every popped entry is compared
// with a reference queue, and the empty/full flags and count are checked.
module tb_fired_fifo;
  localparam int DEPTH = 16, DW = 48;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset
  logic push = 0, pop = 0;
  logic [DW-1:0] wr_data = 0, rd_data;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [DW-1:0] q[$];
  logic [DW-1:0] expect_d;
  bit pending = 0;

  fired_fifo #(.DEPTH(DEPTH), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare the entry popped in the previous cycle
  always @(negedge clk) begin
    if (pending) begin
      checks++;
      if (rd_data != expect_d) begin
        failures++;
        $display("FAIL pop got %h want %h", rd_data, expect_d);
      end
    end
  end

  task automatic step(input bit do_push, input bit do_pop);
    @(negedge clk);
    push = do_push; pop = do_pop;
    wr_data = {$urandom, 16'($urandom)};
    @(posedge clk);
    pending = do_pop;
    if (do_pop) expect_d = q.pop_front();
    if (do_push) q.push_back(wr_data);
    #1;
    push = 0; pop = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (!empty || full) failures++;
    for (int i = 0; i < DEPTH; i++) step(1, 0);
    @(negedge clk); pending = 0;
    checks++; if (!full || count != DEPTH) failures++;
    for (int i = 0; i < DEPTH; i++) step(0, 1);
    @(negedge clk); pending = 0;
    checks++; if (!empty) failures++;
    for (int i = 0; i < 500; i++) begin
      bit pu, po;
      pu = ($urandom % 2) && (q.size() < DEPTH);
      po = ($urandom % 2) && (q.size() > 0);
      step(pu, po);
      @(negedge clk); pending = 0;
      checks++; if (int'(count) != q.size()) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
