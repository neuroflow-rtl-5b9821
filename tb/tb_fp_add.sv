// tb_fp_add: self-checking test of the single-precision adder.
// Random operands with moderate exponents and a few fixed cases are added;
// the exact sum is formed in double precision from the decoded operands and
// the result must lie within half an ulp of it (correct rounding to nearest).
// Exact ties (an integer of 2^23..2^24 plus one half) are checked bit for bit,
// since either neighbour is half an ulp away and only ties-to-even is right.
module tb_fp_add;
  import nf_tb_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .y(y));



  function automatic logic [31:0] rnd_fp();
    logic [31:0] r;
    r = $urandom;
    r[30:23] = 8'(100 + ($urandom % 55));
    return r;
  endfunction

  task automatic check_one(input logic [31:0] x, input logic [31:0] z);
    real exact, got, err;
    a = x; b = z;
    #1;
    exact = f2r(x) + f2r(z);
    got   = f2r(y);
    err   = got - exact;
    if (err < 0) err = -err;
    checks++;
    if (err > 0.5 * ulp(y) * 1.000001) begin
      failures++;
      if (failures < 10) $display("FAIL add %h + %h = %h (exact %g got %g)", x, z, y, exact, got);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'h40A00000, 32'h41F00000);  // 5 + 30
    check_one(32'h430C0000, 32'hC2AF0000);  // 140 - 87.5
    check_one(32'h3F800000, 32'hBF7FFFFF);  // 1 - (1-ulp): deep cancellation
    check_one(32'h3FFFFFFF, 32'h34000000);  // rounding carry
    check_one(32'h4B000000, 32'h3F000000);  // tie to even
    for (int i = 0; i < 20000; i++) check_one(rnd_fp(), rnd_fp());
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] p, q;
      p = rnd_fp(); q = p; q[31] = ~p[31]; q[3:0] = 4'($urandom);
      check_one(p, q);                      // near cancellation
    end
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] p, want;
      p = {9'h096, 23'($urandom)};          // integer in [2^23, 2^24)
      want = p[0] ? p + 32'd1 : p;          // tie goes to the even neighbour
      a = p; b = 32'h3F000000; #1;          // p + 0.5
      checks++;
      if (y != want) begin
        failures++;
        if (failures < 10) $display("FAIL tie %h + 0.5 = %h, want %h", p, y, want);
      end
    end
    // exact cancellation and zero operand
    a = 32'h41F00000; b = 32'hC1F00000; #1;
    checks++; if (y != 0) failures++;
    a = 32'h00000000; b = 32'h40A00000; #1;
    checks++; if (y != 32'h40A00000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
