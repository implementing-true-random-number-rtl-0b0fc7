// tb_uart_tx: checks the RS-232 transmitter.
//
// A small clock-to-baud ratio (10 clocks per bit) keeps the run short. Random
// bytes are offered back to back; a receiver in the testbench finds each start
// bit, samples every bit in its middle and checks the data bits, the stop bit,
// the idle level, and the frame timing: with the next byte already waiting,
// start bits are 10 bit times plus the one accepting clock apart (101 clocks).
module tb_uart_tx;

  localparam int CLK_HZ = 1000, BAUD = 100, CPB = CLK_HZ / BAUD;

  logic       clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] in_data = '0;
  logic       in_ready, tx;
  logic [7:0] q[$];
  int checks = 0, failures = 0, frames = 0;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver
  initial begin
    int start_t, prev_start;
    logic [7:0] b;
    prev_start = -1;
    @(posedge rst_n);
    forever begin
      start_t = 0;
      while (tx !== 1'b0) begin
        @(posedge clk);
      end
      start_t = $time / 10;
      if (prev_start >= 0) begin
        checks++;
        if (start_t - prev_start != 10 * CPB + 1) begin
          failures++;
          $display("frame period %0d", start_t - prev_start);
        end
      end
      prev_start = start_t;
      repeat (CPB / 2) @(posedge clk);
      checks++;
      if (tx !== 1'b0) failures++;          // still start bit
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = tx;
      end
      repeat (CPB) @(posedge clk);
      checks++;
      if (tx !== 1'b1) failures++;          // stop bit
      checks++;
      if (q.size() == 0 || b !== q[0]) failures++;
      if (q.size() != 0) void'(q.pop_front());
      frames++;
      repeat (CPB / 2) @(posedge clk);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (tx !== 1'b1) failures++;             // idle high in reset
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      in_valid = 1; in_data = 8'($urandom);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      q.push_back(in_data);
      @(negedge clk) in_valid = 0;
    end
    repeat (12 * CPB) @(negedge clk);
    checks++;
    if (frames != 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
