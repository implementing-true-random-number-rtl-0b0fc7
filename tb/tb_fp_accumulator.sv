// tb_fp_accumulator: checks the regular floating-point accumulator.
//
// Feeds random single-precision operands (random signs, exponents spread over
// a range wide enough for carries, cancellation and fully shifted-out
// operands), with random in_valid and random stall cycles (en low), and
// compares the accumulator after every clock with a real-arithmetic reference.
// Also checks an exact cancellation to +0 and that out_valid follows in_valid.
module tb_fp_accumulator;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0, en = 0, in_valid = 0;
  logic [31:0] in_data = '0, acc;
  logic        out_valid;
  logic [31:0] ref_acc;
  int checks = 0, failures = 0;

  fp_accumulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic v, input logic e, input logic [31:0] d);
    in_valid = v; en = e; in_data = d;
    @(posedge clk);
    #1;
    if (e && v) ref_acc = fadd(ref_acc, d);
    checks++;
    if (acc !== ref_acc) begin
      failures++;
      if (failures < 10)
        $display("mismatch: acc=%h expected=%h (operand %h)", acc, ref_acc, d);
    end
    if (e) begin
      checks++;
      if (out_valid !== v) failures++;
    end
  endtask

  initial begin
    ref_acc = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // a few hand-picked cases: 1.5 + 2.25, then cancellation to zero
    step(1, 1, 32'h3FC00000);
    step(1, 1, 32'h40100000);
    checks++; if (acc !== 32'h40700000) failures++;   // 3.75
    step(1, 1, 32'hC0700000);
    checks++; if (acc !== 32'h00000000) failures++;   // exactly zero
    // random operands
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] d;
      if (i % 3 == 0) d = rand_float(110, 140);
      else if (i % 3 == 1) d = rand_float(120, 128);
      else d = {~ref_acc[31], ref_acc[30:23], 23'($urandom)};  // near-cancellation
      if (ref_acc[30:23] == 8'd0 && i % 3 == 2) d = rand_float(120, 128);
      step($urandom_range(7) != 0, $urandom_range(9) != 0, d);
      if (ref_acc[30:23] > 8'd150) begin
        // keep the sum in range: cancel it exactly
        step(1, 1, {~ref_acc[31], ref_acc[30:0]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
