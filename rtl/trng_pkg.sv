// trng_pkg: types and constants shared by the chip-filling TRNG.
//
// The generator is a floating-point computational core whose results are summed
// by two accumulators: a 32-bit floating-point one and a 64-bit fixed-point one.
// Accumulator values are buffered in a cache, reduced to random bytes by an XOR
// tree over bits 39..8 of the 64-bit value, and sent to a PC over RS-232.
// Widths 32 and 64 and the bit range 39..8 come from the design description; the
// single-precision format of the 32-bit values and the 8-bit grouping of the
// post-processor output follow the figures of that description.
package trng_pkg;

  // Floating-point word as produced by the pipeline and the regular accumulator
  // (IEEE 754 single layout: sign, 8-bit exponent, 23-bit fraction).
  localparam int unsigned FP_W    = 32;
  localparam int unsigned FIX_W   = 64;   // improved (fixed-point) accumulator width
  localparam int unsigned RAND_W  = 8;    // random byte produced per 64-bit word

  typedef logic [FP_W-1:0] fp32_t;

  // One point of the point-coordinate memory.
  typedef struct packed {
    fp32_t z;
    fp32_t y;
    fp32_t x;
  } point_t;

  // One cache entry: the two accumulator values captured in the same cycle.
  typedef struct packed {
    logic [FIX_W-1:0] improved;
    fp32_t            regular;
  } cache_entry_t;

  // Clock the generator was run at: 45 MHz.
  localparam int unsigned CLK_HZ_DEFAULT = 45_000_000;

endpackage
