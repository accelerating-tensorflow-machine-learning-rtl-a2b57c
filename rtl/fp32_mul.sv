// fp32_mul: IEEE-754 single-precision multiplier, purely combinational.
//
// The accelerator works in float32 throughout; this is its one multiplier.
// It multiplies the two 24-bit significands (hidden bit included) into a
// 48-bit product, normalises by at most one place, and rounds to nearest,
// ties to even, using a guard bit and a sticky bit. The exponent is
// computed without bounds first and checked after rounding: above the
// range gives infinity, below the normal range gives a signed zero.
//
// Subnormal inputs are read as zero and subnormal results are flushed to
// zero, as vendor floating-point cores for FPGAs commonly do; that and the
// single canonical quiet NaN (0x7FC00000) produced for every NaN result are
// this design's choices. Float32 itself follows the accelerator description.
//
// Interface: a, b operands; y = a * b in the same cycle. No clock.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] prod;
  logic [23:0] mant;        // normalised significand before rounding
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;      // after rounding, one bit of headroom
  logic signed [10:0] exp_u; // unbounded exponent (biased)

  always_comb begin
    sa = a[31];  ea = a[30:23];  fa = a[22:0];
    sb = b[31];  eb = b[30:23];  fb = b[22:0];
    sy = sa ^ sb;

    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (fa == '0);
    b_inf  = (eb == 8'hFF) && (fb == '0);
    a_nan  = (ea == 8'hFF) && (fa != '0);
    b_nan  = (eb == 8'hFF) && (fb != '0);

    prod = {1'b1, fa} * {1'b1, fb};
    exp_u = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 11'sd127;

    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_u  = exp_u + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end

    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_u  = exp_u + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = QNAN;
    end else if (a_inf || b_inf) begin
      y = {sy, 8'hFF, 23'd0};
    end else if (a_zero || b_zero) begin
      y = {sy, 31'd0};
    end else if (exp_u >= 11'sd255) begin
      y = {sy, 8'hFF, 23'd0};
    end else if (exp_u <= 11'sd0) begin
      y = {sy, 31'd0};
    end else begin
      y = {sy, exp_u[7:0], mant_r[22:0]};
    end
  end

endmodule
