// tb_fix_accumulator: checks the improved 64-bit fixed-point accumulator.
//
// Random floats whose values range from far below the LSB (truncated to zero)
// to beyond the 64-bit range are accumulated with random signs, random
// in_valid and random stalls. The accumulator and its sticky overflow flag are
// compared after every clock with a 128-bit integer reference. The overflow
// flag is cleared by reset between a normal-range phase and an overflow phase.
module tb_fix_accumulator;
  import tb_ref_pkg::*;

  localparam int LSB_EXP = -32;

  logic        clk = 0, rst_n = 0, en = 0, in_valid = 0;
  logic [31:0] in_data = '0;
  logic [63:0] acc;
  logic        out_valid, overflow;
  logic [63:0] ref_acc;
  logic        ref_ovf;
  int checks = 0, failures = 0, truncs = 0, negs = 0;

  fix_accumulator #(.ACC_W(64), .LSB_EXP(LSB_EXP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic v, input logic e, input logic [31:0] d);
    logic        big;
    logic [63:0] add, s;
    in_valid = v; en = e; in_data = d;
    @(posedge clk);
    #1;
    if (e && v) begin
      add = f2fix(d, LSB_EXP, big);
      s   = ref_acc + add;
      if (big) ref_ovf = 1'b1;
      if (add != 0 && ref_acc[63] == add[63] && s[63] != ref_acc[63]) ref_ovf = 1'b1;
      ref_acc = s;
      if (d[31]) negs++;
    end
    checks += 2;
    if (acc !== ref_acc || overflow !== ref_ovf) begin
      failures++;
      if (failures < 10)
        $display("mismatch: acc=%h exp=%h ovf=%b exp=%b operand %h", acc, ref_acc,
                 overflow, ref_ovf, d);
    end
    if (e) begin
      checks++;
      if (out_valid !== v) failures++;
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    @(posedge clk);
    #1 rst_n = 1;
    ref_acc = '0; ref_ovf = 1'b0;
  endtask

  initial begin
    ref_acc = '0; ref_ovf = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // 1.0 -> 2**32 in fixed point; -0.5 -> subtract 2**31; 2**-33 -> truncated to 0
    step(1, 1, 32'h3F800000);
    checks++; if (acc !== 64'h0000_0001_0000_0000) failures++;
    step(1, 1, 32'hBF000000);
    checks++; if (acc !== 64'h0000_0000_8000_0000) failures++;
    step(1, 1, 32'h2F000000);
    checks++; if (acc !== 64'h0000_0000_8000_0000) failures++;
    // normal range: values 2**-40 .. 2**20, no overflow expected
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] d;
      d = rand_float(127 - 40, 127 + 20);
      if (d[30:23] < 8'd127 - 8'd9) truncs++;
      step($urandom_range(7) != 0, $urandom_range(9) != 0, d);
    end
    checks++; if (overflow !== 1'b0) begin failures++; $display("ovf0"); end
    // overflow phase: operands up to 2**40
    do_reset();
    for (int i = 0; i < 2000; i++)
      step(1, $urandom_range(9) != 0, rand_float(127 + 20, 127 + 40));
    checks++; if (overflow !== 1'b1) begin failures++; $display("ovf1"); end
    checks++; if (truncs == 0 || negs == 0) begin failures++; $display("cov %0d %0d", truncs, negs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
