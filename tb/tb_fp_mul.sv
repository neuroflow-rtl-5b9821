// tb_fp_mul: self-checking test of the single-precision multiplier.
// Random operands with moderate exponents and a few fixed cases are
// multiplied; the exact product is formed in double precision from the
// decoded operands and the result must lie within half an ulp of it
// (correct rounding to nearest).
module tb_fp_mul;
  import nf_tb_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));



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
    exact = f2r(x) * f2r(z);
    got   = f2r(y);
    err   = got - exact;
    if (err < 0) err = -err;
    checks++;
    if (err > 0.5 * ulp(y) * 1.000001 || y[31] != (x[31] ^ z[31])) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h (exact %g got %g)", x, z, y, exact, got);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'h40A00000, 32'h41F00000);  // 5 * 30
    check_one(32'h3D23D70A, 32'hC28C0000);  // 0.04 * -70
    check_one(32'hBF800000, 32'h3F800000);  // -1 * 1
    check_one(32'h3FFFFFFF, 32'h3FFFFFFF);  // rounding carry
    for (int i = 0; i < 20000; i++) check_one(rnd_fp(), rnd_fp());
    // zero operand gives zero
    a = 32'h00000000; b = 32'h40A00000; #1;
    checks++; if (y[30:0] != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
