// tb_fp32_mul: self-checking test of the float32 mul unit.
//
// Drives directed special cases (zeros, infinities, NaN, subnormals read as
// zero, overflow, rounding ties) and 20000 random operand pairs, and
// compares every result bit for bit with the reference model in
// fp_ref_pkg, which computes in double precision and rounds by hand.
// The unit is combinational; a watchdog ends the run if it hangs.
module tb_fp32_mul;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    a = ta; b = tb_;
    #1;
    exp_y = ref_mul(ta, tb_);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h mul %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed cases
    check(32'h3F80_0000, 32'h4000_0000);   // 1, 2
    check(32'h3FC0_0000, 32'hBFC0_0000);   // 1.5, -1.5
    check(32'h0000_0000, 32'h4000_0000);   // 0
    check(32'h8000_0000, 32'h0000_0000);   // -0, +0
    check(32'h8000_0000, 32'h8000_0000);   // -0, -0
    check(32'h7F80_0000, 32'h3F80_0000);   // inf
    check(32'h7F80_0000, 32'hFF80_0000);   // inf, -inf
    check(32'h7F80_0000, 32'h0000_0000);   // inf, 0
    check(32'h7FC0_0001, 32'h3F80_0000);   // NaN
    check(32'h0000_0001, 32'h3F80_0000);   // subnormal
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF);   // overflow
    check(32'h0080_0000, 32'h3F00_0000);   // underflow
    check(32'h0080_0000, 32'h8080_0001);   // near-cancellation at the bottom
    check(32'h3F80_0001, 32'h3F80_0001);
    check(32'h3F80_0000, 32'h3380_0000);   // 1 + 2^-24: tie
    check(32'h3F80_0001, 32'h3380_0000);   // tie to even, odd
    check(32'h4B7F_FFFF, 32'h3F00_0000);
    check(32'h3F7F_FFFF, 32'hBF80_0000);
    check(32'h3F80_0000, 32'hBF7F_FFFF);
    // random operands of similar and of distant magnitude
    for (int n = 0; n < 20000; n++) begin
      if (n % 4 == 0) check(rand_float(120), rand_float(120));
      else if (n % 4 == 1) check(rand_float(30), rand_float(30));
      else check(rand_float(3), rand_float(3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
