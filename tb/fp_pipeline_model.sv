// fp_pipeline_model: behavioural stand-in for the floating-point pipeline of
// the computational core (simulation only, not synthesizable).
//
// The real pipeline's computation is not part of this RTL. This model has the
// same kind of interface: one point (X, Y, Z) in per enabled clock, one
// single-precision result out per enabled clock after LAT enabled clocks. It
// computes x * y + z (rounded to single precision) so that the results vary in
// sign and magnitude. Everything advances only while en is high, matching a
// pipeline whose clock is stopped while the core is stalled.
module fp_pipeline_model
  import trng_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int LAT = 6
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   in_valid,
  input  point_t in_point,
  output logic   res_valid,
  output fp32_t  res
);

  logic  v_q [LAT];
  fp32_t d_q [LAT];

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        v_q[i] <= 1'b0;
        d_q[i] <= '0;
      end
    end else if (en) begin
      v_q[0] <= in_valid;
      d_q[0] <= r2f(f2r(in_point.x) * f2r(in_point.y) + f2r(in_point.z));
      for (int i = 1; i < LAT; i++) begin
        v_q[i] <= v_q[i-1];
        d_q[i] <= d_q[i-1];
      end
    end
  end

  assign res_valid = v_q[LAT-1];
  assign res       = d_q[LAT-1];

endmodule
