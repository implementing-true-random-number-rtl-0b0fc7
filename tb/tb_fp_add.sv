// tb_fp_add: checks the single-precision adder on its own.
//
// Random operand pairs over the whole normal exponent range (including sums
// that overflow to infinity and differences that fall below the normal range
// and are flushed to zero), operands of nearly equal magnitude and opposite
// sign, exponent differences around the alignment limit, zeros and subnormals
// (read as zero), all compared with the real-arithmetic reference. Also a few
// fixed cases with known results.
module tb_fp_add;
  import tb_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0, n_inf = 0, n_flush = 0;

  fp_add dut (.a, .b, .y);

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] exp_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("%h + %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, z, r;
    check(32'h3F800000, 32'h3F800000, 32'h40000000);   // 1 + 1 = 2
    check(32'h3F800000, 32'hBF800000, 32'h00000000);   // 1 - 1 = +0
    check(32'h00000000, 32'hC0400000, 32'hC0400000);   // 0 + -3 = -3
    check(32'h3F800000, 32'h33800000, 32'h3F800000);   // 1 + 2^-24: tie, stays even
    check(32'h3F800001, 32'h33800000, 32'h3F800002);   // tie rounds up to even
    check(32'h7F7FFFFF, 32'h7F7FFFFF, 32'h7F800000);   // overflow to infinity
    check(32'h00400000, 32'h3F800000, 32'h3F800000);   // subnormal read as zero
    for (int i = 0; i < 200000; i++) begin
      case (i % 4)
        0: begin x = rand_float(1, 254); z = rand_float(1, 254); end
        1: begin x = rand_float(1, 254); z = {~x[31], x[30:23], 23'($urandom)}; end
        2: begin
          x = rand_float(30, 220);
          z = {1'($urandom), 8'(int'(x[30:23]) - 22 - int'($urandom_range(8))), 23'($urandom)};
        end
        default: begin x = rand_float(1, 12); z = {~x[31], rand_float(1, 12) & 32'h7FFFFFFF}; end
      endcase
      r = fadd(x, z);
      if (r[30:23] == 8'hFF) n_inf++;
      if (r == 32'd0 && (f2r(x) + f2r(z)) != 0.0) n_flush++;
      check(x, z, r);
    end
    checks++;
    if (n_inf == 0 || n_flush == 0) begin
      failures++;
      $display("coverage: inf=%0d flush=%0d", n_inf, n_flush);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
