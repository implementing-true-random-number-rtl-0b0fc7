// fp_add: combinational single-precision floating-point adder.
//
// Adds two values in IEEE 754 single layout and rounds to nearest, ties to
// even. The operands are ordered by magnitude, the smaller significand is
// aligned with guard, round and sticky bits, the significands are added or
// subtracted, the result is normalised (one right shift after a carry, or a
// left shift by the leading-zero count after cancellation) and rounded.
// Simplifications, all this design's own choices: subnormal inputs are read as
// zero and results below the normal range are flushed to +0; a result beyond
// the largest finite value becomes infinity; infinities and NaNs on the inputs
// are not given special treatment. An exact zero difference is +0.
// This is the adder inside the regular floating-point accumulator; the design
// description names that accumulator but does not describe its adder.
module fp_add
  import trng_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  typedef struct packed {
    logic       s;
    logic [7:0] e;
    logic [22:0] f;
  } fp_fields_t;

  fp_fields_t fa, fb, hi_op, lo_op;
  logic        a_bigger;
  logic [7:0]  d;
  logic [26:0] hi_m, lo_m, lo_sh;   // 1.f plus guard, round, sticky
  logic        sticky;
  logic [27:0] sum;
  logic [26:0] norm;
  logic signed [9:0] exp_n;
  logic [4:0]  lz;
  logic        eff_sub;
  logic [24:0] rounded;
  logic        rnd_up;
  logic signed [9:0] exp_r;

  always_comb begin
    fa = a;
    fb = b;
    // subnormals read as zero
    if (fa.e == 8'd0) fa.f = '0;
    if (fb.e == 8'd0) fb.f = '0;
    a_bigger = {fa.e, fa.f} >= {fb.e, fb.f};
    hi_op   = a_bigger ? fa : fb;
    lo_op = a_bigger ? fb : fa;
    d     = hi_op.e - lo_op.e;

    hi_m   = (hi_op.e   == 8'd0) ? '0 : {1'b1, hi_op.f,   3'b000};
    lo_m = (lo_op.e == 8'd0) ? '0 : {1'b1, lo_op.f, 3'b000};

    // align the smaller operand, folding shifted-out bits into the sticky bit
    if (d >= 8'd27) begin
      lo_sh = '0;
      sticky   = |lo_m;
    end else begin
      lo_sh = lo_m >> d;
      sticky   = |(lo_m & ((27'd1 << d) - 27'd1));
    end
    lo_sh[0] = lo_sh[0] | sticky;

    eff_sub = hi_op.s ^ lo_op.s;
    sum     = eff_sub ? ({1'b0, hi_m} - {1'b0, lo_sh})
                      : ({1'b0, hi_m} + {1'b0, lo_sh});
    exp_n   = {2'b00, hi_op.e};
    lz      = '0;
    norm    = '0;

    if (sum[27]) begin
      // carry out: shift right one place, keep the sticky information
      norm  = {sum[27:2], sum[1] | sum[0]};
      exp_n = exp_n + 10'sd1;
    end else begin
      // count leading zeros of the 27-bit result and shift them out
      for (int i = 0; i <= 26; i++) begin
        if (sum[i]) lz = 5'(26 - i);           // highest set bit wins
      end
      norm  = sum[26:0] << lz;
      exp_n = exp_n - 10'(lz);
    end

    // round to nearest, ties to even
    rnd_up  = norm[2] && (norm[1] || norm[0] || norm[3]);
    rounded = {1'b0, norm[26:3]} + 25'(rnd_up);
    exp_r   = exp_n;
    if (rounded[24]) begin
      rounded = rounded >> 1;
      exp_r   = exp_r + 10'sd1;
    end

    if (sum[26:0] == '0 && !sum[27]) begin
      y = '0;                                   // exact zero
    end else if (hi_op.e == 8'd0) begin
      y = '0;                                   // both operands zero
    end else if (exp_r <= 10'sd0) begin
      y = '0;                                   // flush underflow to zero
    end else if (exp_r >= 10'sd255) begin
      y = {hi_op.s, 8'hFF, 23'd0};                // overflow to infinity
    end else begin
      y = {hi_op.s, exp_r[7:0], rounded[22:0]};
    end
  end

endmodule
