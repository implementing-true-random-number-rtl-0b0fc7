// fp_accumulator: the regular floating-point accumulator.
//
// Sums the pipeline results in a 32-bit floating-point register: on every
// enabled clock with in_valid high, acc <= acc + in_data through a
// single-cycle floating-point adder (fp_add) whose output is fed back. The sum
// is visible on acc one clock after the operand; out_valid is high when the
// last enabled clock added an operand. While en is low (core stalled) the
// register and out_valid hold. Synchronous active-low reset clears the sum.
// The block, its 32-bit width and its feedback structure follow the design
// description; the single-precision format, the single-cycle adder (needed so
// that one operand per clock can be accumulated through the feedback) and the
// reset behaviour are this design's own choices.
module fp_accumulator
  import trng_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  in_valid,
  input  fp32_t in_data,
  output fp32_t acc,
  output logic  out_valid
);

  fp32_t sum;

  fp_add u_add (.a(acc), .b(in_data), .y(sum));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else if (en) begin
      out_valid <= in_valid;
      if (in_valid) acc <= sum;
    end
  end

endmodule
