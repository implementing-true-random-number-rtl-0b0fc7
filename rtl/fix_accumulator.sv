// fix_accumulator: the improved, 64-bit fixed-point accumulator.
//
// Each floating-point pipeline result is converted to a fixed-point number
// whose least significant bit weighs 2**LSB_EXP and added to (or, for a
// negative value, subtracted from) a 64-bit two's-complement register. The
// conversion shifts the 24-bit significand 1.f by (exponent - 150 - LSB_EXP)
// places; bits that fall below the LSB are truncated. One operand is taken per
// enabled clock; the new sum is on acc one clock later and out_valid is high
// when the last enabled clock added an operand. overflow is a sticky flag set
// when an operand does not fit in the 63 magnitude bits or a signed addition
// wraps. While en is low the block holds. Synchronous active-low reset.
// The 64-bit fixed-point accumulation of floating-point results follows the
// design description; the position of the binary point (LSB_EXP), truncation
// of low bits, the overflow flag and the reset are this design's own choices.
module fix_accumulator
  import trng_pkg::*;
#(
  parameter int ACC_W   = 64,
  parameter int LSB_EXP = -32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             in_valid,
  input  fp32_t            in_data,
  output logic [ACC_W-1:0] acc,
  output logic             out_valid,
  output logic             overflow
);

  logic             s;
  logic [7:0]       e;
  logic [23:0]      m;
  int               shift;
  logic [ACC_W-1:0] mag;
  logic             op_ovf;
  logic [ACC_W-1:0] addend, sum;
  logic             add_ovf;

  always_comb begin
    s      = in_data[31];
    e      = in_data[30:23];
    m      = {1'b1, in_data[22:0]};
    shift  = int'(e) - 150 - LSB_EXP;
    mag    = '0;
    op_ovf = 1'b0;
    if (e == 8'd0) begin
      mag = '0;                                    // zero (and subnormals)
    end else if (shift >= 0) begin
      if (shift > ACC_W - 25) begin
        op_ovf = 1'b1;                             // needs more than ACC_W-1 bits
        mag    = (shift >= ACC_W) ? '0 : ACC_W'(m) << shift;
      end else begin
        mag = ACC_W'(m) << shift;
      end
    end else if (shift > -24) begin
      mag = ACC_W'(m >> (-shift));                 // truncate bits below the LSB
    end
    addend  = s ? (~mag + 1'b1) : mag;
    sum     = acc + addend;
    add_ovf = (acc[ACC_W-1] == addend[ACC_W-1]) && (sum[ACC_W-1] != acc[ACC_W-1])
              && (mag != '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      overflow  <= 1'b0;
    end else if (en) begin
      out_valid <= in_valid;
      if (in_valid) begin
        acc <= sum;
        if (op_ovf || add_ovf) overflow <= 1'b1;
      end
    end
  end

endmodule
