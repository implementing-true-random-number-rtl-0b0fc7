// tb_xor_postproc: checks the XOR-based post-processing unit.
//
// Sends random 64-bit words with random in_valid and random out_ready. Every
// byte leaving the unit must equal the XOR of bits 39..32, 31..24, 23..16 and
// 15..8 of the corresponding word, in order, with none lost or duplicated. A
// word with changes only outside bits 39..8 must give the same byte. Also
// checks full throughput (one byte per clock when always ready).
module tb_xor_postproc;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0, in_valid = 0, out_ready = 0;
  logic [63:0] in_word = '0;
  logic        in_ready, out_valid;
  logic [7:0]  out_data;
  logic [7:0]  q[$];
  int checks = 0, failures = 0, sent = 0, recv = 0;

  xor_postproc #(.IN_W(64), .LO_BIT(8), .GROUP_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (q.size() == 0 || out_data !== q[0]) failures++;
      if (q.size() != 0) void'(q.pop_front());
      recv++;
    end
    if (rst_n && in_valid && in_ready) begin
      q.push_back(xor_bytes(in_word));
      sent++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // full rate
    out_ready = 1;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      in_valid = 1; in_word = {$urandom, $urandom};
    end
    @(negedge clk) in_valid = 0;
    @(negedge clk);
    checks++;
    if (recv != 50) failures++;
    // bits outside 39..8 do not matter; 0xFF in one group gives 0xFF
    in_word = 64'hFFFF_FF00_0000_00FF;
    #1 checks++;
    if (dut.x_out !== 8'h00) failures++;
    in_word = 64'h0000_0000_00FF_0000;
    #1 checks++;
    if (dut.x_out !== 8'hFF) failures++;
    // random handshakes
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (!in_valid || in_ready) begin
        in_valid = $urandom_range(1);
        in_word  = {$urandom, $urandom};
      end
      out_ready = $urandom_range(2) != 0;
    end
    @(negedge clk) in_valid = 0; out_ready = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (recv != sent || q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
