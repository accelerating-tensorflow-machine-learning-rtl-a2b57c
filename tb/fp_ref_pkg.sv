// fp_ref_pkg: reference float32 arithmetic for the testbenches.
//
// Works independently of the RTL: operands are widened exactly to double
// precision, the operation is done in the simulator's double arithmetic,
// and the double result is rounded to float32 (nearest, ties to even) by
// hand. Rounding a double result of +, -, * on float32 operands to float32
// gives the correctly rounded float32 result, because 53 >= 2*24 + 2.
// Results below the normal float32 range are flushed to signed zero, and
// NaNs are returned as 0x7FC00000, matching the conventions of the RTL.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] dbits;
    if (f[30:23] == 8'd0) begin
      dbits = {f[31], 63'd0};
    end else if (f[30:23] == 8'hFF) begin
      dbits = {f[31], 11'h7FF, f[22:0], 29'd0};
    end else begin
      dbits = {f[31], 11'(f[30:23]) - 11'd127 + 11'd1023, f[22:0], 29'd0};
    end
    return $bitstoreal(dbits);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] m;        // 1.f
    logic [24:0] mr;
    logic        g, st;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'h7FF) begin
      if (d[51:0] != '0) return 32'h7FC0_0000;
      return {s, 8'hFF, 23'd0};
    end
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:0]};
    g  = m[28];
    st = |m[27:0];
    mr = {1'b0, m[52:29]} + {24'd0, g & (st | m[29])};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), mr[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) begin
      if ((a[30:23] == 8'hFF && a[22:0] != 0) || (b[30:23] == 8'hFF && b[22:0] != 0))
        return 32'h7FC0_0000;
      if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return 32'h7FC0_0000;
      return {a[31] ^ b[31], 8'hFF, 23'd0};
    end
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {a[31] ^ b[31], 31'd0};
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    real s;
    if ((a[30:23] == 8'hFF && a[22:0] != 0) || (b[30:23] == 8'hFF && b[22:0] != 0))
      return 32'h7FC0_0000;
    if (a[30:23] == 8'hFF && b[30:23] == 8'hFF && a[31] != b[31]) return 32'h7FC0_0000;
    if (a[30:23] == 8'hFF) return a;
    if (b[30:23] == 8'hFF) return b;
    if (a[30:23] == 8'd0 && b[30:23] == 8'd0) return {a[31] & b[31], 31'd0};
    if (a[30:23] == 8'd0) return b;
    if (b[30:23] == 8'd0) return a;
    s = f2r(a) + f2r(b);
    if (s == 0.0) return 32'd0;
    return r2f(s);
  endfunction

  function automatic logic [31:0] ref_relu(input logic [31:0] a);
    return a[31] ? 32'd0 : a;
  endfunction

  // A random normal float with exponent in [127-span, 127+span]
  function automatic logic [31:0] rand_float(input int span);
    int unsigned e;
    e = 127 - span + ($urandom % (2 * span + 1));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
