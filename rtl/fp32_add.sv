// fp32_add: IEEE-754 single-precision adder, purely combinational.
//
// The accelerator accumulates its dot products and adds the bias with this
// unit. The operand of larger magnitude is placed first; the smaller
// significand is aligned to it with three extra low bits (guard, round and
// a sticky bit that collects everything shifted further out). Equal signs
// add, with at most a one-place right normalisation; unequal signs
// subtract, followed by a left normalisation by the leading-zero count.
// The result is rounded to nearest, ties to even. The exponent is checked
// after rounding: above the range gives infinity, below the normal range a
// signed zero. An exact cancellation gives +0.
//
// Subnormal inputs are read as zero and subnormal results are flushed to
// zero, and every NaN result is the quiet NaN 0x7FC00000: these are this
// design's choices. Float32 itself follows the accelerator description.
//
// Interface: a, b operands; y = a + b in the same cycle. No clock.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  logic        sa, sb, sl, ss;
  logic [7:0]  ea, eb, el, es;
  logic [22:0] fa, fb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic        a_ge_b;
  logic [23:0] ml, ms;        // significands with hidden bit: larger, smaller
  logic [7:0]  d;             // exponent difference
  logic [26:0] ml_x, ms_x;    // significand << 3 (guard, round, sticky)
  logic [26:0] ms_sh, lost_mask;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic        found;
  logic signed [10:0] exp_u;
  logic        round_up;
  logic [24:0] mant_r;

  always_comb begin
    sa = a[31];  ea = a[30:23];  fa = a[22:0];
    sb = b[31];  eb = b[30:23];  fb = b[22:0];

    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (fa == '0);
    b_inf  = (eb == 8'hFF) && (fb == '0);
    a_nan  = (ea == 8'hFF) && (fa != '0);
    b_nan  = (eb == 8'hFF) && (fb != '0);

    // order by magnitude
    a_ge_b = (a[30:0] >= b[30:0]);
    if (a_ge_b) begin
      sl = sa; el = ea; ml = {1'b1, fa};
      ss = sb; es = eb; ms = {1'b1, fb};
    end else begin
      sl = sb; el = eb; ml = {1'b1, fb};
      ss = sa; es = ea; ms = {1'b1, fa};
    end
    d = el - es;

    // align the smaller operand, keeping a sticky bit
    ml_x = {ml, 3'b000};
    ms_x = {ms, 3'b000};
    if (d >= 8'd27) begin
      lost_mask = '1;
      ms_sh     = 27'd1;                  // all of it is sticky
    end else begin
      lost_mask = (27'd1 << d) - 27'd1;
      ms_sh     = (ms_x >> d) | {26'd0, |(ms_x & lost_mask)};
    end

    exp_u = $signed({3'b000, el});
    norm  = '0;
    lz    = '0;
    found = 1'b0;
    if (sl == ss) begin
      sum = {1'b0, ml_x} + {1'b0, ms_sh};
      if (sum[27]) begin
        norm  = {sum[27:2], sum[1] | sum[0]};
        exp_u = exp_u + 11'sd1;
      end else begin
        norm  = sum[26:0];
      end
    end else begin
      sum = {1'b0, ml_x} - {1'b0, ms_sh};
      // leading-zero count of sum[26:0]
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) begin
          found = 1'b1;
          lz    = 5'(26 - i);
        end
      end
      norm  = sum[26:0] << lz;
      exp_u = exp_u - $signed({6'd0, lz});
    end

    // round to nearest, ties to even: norm = 1.m (24 bits) | g | r | s
    round_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    mant_r   = {1'b0, norm[26:3]} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_u  = exp_u + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = QNAN;
    end else if (a_inf) begin
      y = a;
    end else if (b_inf) begin
      y = b;
    end else if (a_zero && b_zero) begin
      y = {sa & sb, 31'd0};
    end else if (a_zero) begin
      y = b;
    end else if (b_zero) begin
      y = a;
    end else if ((sl != ss) && (sum[26:0] == '0)) begin
      y = 32'd0;
    end else if (exp_u >= 11'sd255) begin
      y = {sl, 8'hFF, 23'd0};
    end else if (exp_u <= 11'sd0) begin
      y = {sl, 31'd0};
    end else begin
      y = {sl, exp_u[7:0], mant_r[22:0]};
    end
  end

endmodule
