// xor_postproc: XOR-based post-processing unit.
//
// From each 64-bit improved-accumulator word only bits 39..8, the bits that
// showed the most entropy, are used. They are taken as four 8-bit groups
// (39..32, 31..24, 23..16, 15..8) and combined by a two-level XOR tree: the
// first two groups are XORed, the last two are XORed, and the two results are
// XORed into one 8-bit random number. Each output bit is thus the XOR of four
// raw bits, which reduces bias at the cost of a factor of four in bit rate.
// Interface: valid/ready on both sides with one output register; a word is
// accepted when in_ready is high, and its byte appears on out_data one clock
// later and stays until out_ready. Full throughput of one word per clock.
// The selected bit range, the grouping and the XOR tree follow the design
// description; the handshake and the output register are this design's own.
module xor_postproc #(
  parameter int unsigned IN_W    = 64,
  parameter int unsigned LO_BIT  = 8,     // lowest bit used
  parameter int unsigned GROUP_W = 8      // width of one group = output width
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [IN_W-1:0]    in_word,
  output logic               in_ready,
  output logic               out_valid,
  output logic [GROUP_W-1:0] out_data,
  input  logic               out_ready
);

  logic [GROUP_W-1:0] g3, g2, g1, g0;     // groups from high to low
  logic [GROUP_W-1:0] x_hi, x_lo, x_out;

  always_comb begin
    g0    = in_word[LO_BIT             +: GROUP_W];
    g1    = in_word[LO_BIT + GROUP_W   +: GROUP_W];
    g2    = in_word[LO_BIT + 2*GROUP_W +: GROUP_W];
    g3    = in_word[LO_BIT + 3*GROUP_W +: GROUP_W];
    x_hi  = g3 ^ g2;
    x_lo  = g1 ^ g0;
    x_out = x_hi ^ x_lo;
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= x_out;
    end
  end

  // output handshake: a byte stays unchanged until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
