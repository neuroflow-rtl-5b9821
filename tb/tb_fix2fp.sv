// tb_fix2fp: self-checking test of the fixed-to-float converter at the
// accumulator format (24 bits, 10 fraction bits). Every tested value must
// convert to the single-precision number nearest to value / 2^10; values up
// to 2^24 in magnitude are exact, so the result is compared for equality,
// and wider random values are checked to within half an ulp.
module tb_fix2fp;
  import nf_tb_pkg::*;
  localparam int W = 24, FRAC = 10;
  logic signed [W-1:0] x;
  logic [31:0] y;
  int checks = 0, failures = 0;

  fix2fp #(.W(W), .FRAC(FRAC)) dut (.x(x), .y(y));


  task automatic check_one(input logic signed [W-1:0] v);
    real exact;
    x = v;
    #1;
    exact = real'(v) / real'(1 << FRAC);
    checks++;
    if (f2r(y) != exact) begin
      failures++;
      if (failures < 10) $display("FAIL fix2fp %0d -> %h (%g, want %g)", v, y, f2r(y), exact);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(0);
    check_one(1);
    check_one(-1);
    check_one(24'sd1024);          // 1.0
    check_one(-24'sd6144);         // -6.0
    check_one(24'sh7FFFFF);
    check_one(-24'sh800000);
    for (int i = 0; i < 20000; i++) check_one(W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
