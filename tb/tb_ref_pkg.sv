// tb_ref_pkg: reference arithmetic for the TRNG testbenches.
//
// Works out expected values independently of the RTL: single-precision values
// are widened exactly to double precision, added or multiplied as reals, and
// rounded back to single precision (nearest, ties to even; results below the
// normal range flushed to zero), which matches correctly rounded single
// arithmetic for addition because double has more than twice the precision.
// The fixed-point conversion is computed with 128-bit integer arithmetic.
package tb_ref_pkg;

  function automatic real f2r(input logic [31:0] b);
    logic [10:0] e;
    if (b[30:23] == 8'd0) return 0.0;
    e = 11'(b[30:23]) - 11'd127 + 11'd1023;
    return $bitstoreal({b[31], e, b[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return 32'd0;
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && ((|d[27:0]) || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0) return 32'd0;
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic logic [31:0] fadd(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  // Fixed-point value (LSB weight 2**lsb_exp) of a float, magnitude truncated,
  // as a 64-bit two's-complement addend; too_big when it needs over 63 bits.
  function automatic logic [63:0] f2fix(input logic [31:0] b, input int lsb_exp,
                                        output logic too_big);
    logic [127:0] w;
    int           sh;
    too_big = 1'b0;
    if (b[30:23] == 8'd0) return 64'd0;
    sh = int'(b[30:23]) - 150 - lsb_exp;
    w  = 128'({1'b1, b[22:0]});
    if (sh >= 0) begin
      if (sh > 100) begin
        too_big = 1'b1;
        w = 0;
      end else begin
        w = w << sh;
      end
    end else if (sh <= -24) w = 0;
    else w = w >> (-sh);
    if (w[127:63] != 0) too_big = 1'b1;
    return b[31] ? 64'(-w) : 64'(w);
  endfunction

  function automatic logic [7:0] xor_bytes(input logic [63:0] w);
    return w[39:32] ^ w[31:24] ^ w[23:16] ^ w[15:8];
  endfunction

  // random normal float with exponent in [elo, ehi]
  function automatic logic [31:0] rand_float(input int elo, input int ehi);
    logic [7:0] e;
    e = 8'(elo + int'($urandom_range(ehi - elo)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

endpackage
