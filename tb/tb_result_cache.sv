// tb_result_cache: checks the cache memory and its fill/drain control.
//
// With DEPTH = 16, random words are offered with random wr_valid and drained
// with random rd_ready over several rounds. Checks: core_en stays high until
// exactly DEPTH words have been written and then stays low for the whole
// drain; words come out in write order, unchanged; words offered while
// draining are not stored; the cache refills after the last word is taken;
// the full and empty pulses occur once per round; a fill at one word per clock
// takes DEPTH clocks.
module tb_result_cache;

  localparam int DEPTH = 16, W = 96;

  logic         clk = 0, rst_n = 0, wr_valid = 0, rd_ready = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic         core_en, rd_valid, full_pulse, empty_pulse;
  logic [W-1:0] q[$];
  logic ref_filling = 1'b1;
  int   ref_cnt = 0;
  int checks = 0, failures = 0, written = 0, fulls = 0, empties = 0, read_cnt = 0;

  result_cache #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (wr_valid && core_en) begin
        q.push_back(wr_data);
        written++;
      end
      if (rd_valid && rd_ready) begin
        checks++;
        if (q.size() == 0 || rd_data !== q[0]) failures++;
        if (q.size() != 0) void'(q.pop_front());
        read_cnt++;
      end
      // core_en must follow a reference fill/drain model
      checks++;
      if (core_en !== ref_filling) begin
        failures++;
        if (failures < 5) $display("core_en=%b expected %b", core_en, ref_filling);
      end
      if (ref_filling && wr_valid && ++ref_cnt == DEPTH) begin
        ref_filling = 1'b0; ref_cnt = 0;
      end else if (!ref_filling && rd_valid && rd_ready && ++ref_cnt == DEPTH) begin
        ref_filling = 1'b1; ref_cnt = 0;
      end
      if (full_pulse) fulls++;
      if (empty_pulse) empties++;
    end
  end

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // round 1 at full rate: fill takes DEPTH clocks
    wr_valid = 1;
    t0 = 0;
    while (core_en) begin
      wr_data = {$urandom, $urandom, $urandom};
      @(negedge clk);
      t0++;
    end
    checks++;
    if (t0 != DEPTH) begin
      failures++;
      $display("fill took %0d clocks", t0);
    end
    // further rounds with random handshakes
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      wr_valid = $urandom_range(2) != 0;
      wr_data  = {$urandom, $urandom, $urandom};
      rd_ready = $urandom_range(1);
    end
    checks++;
    if (fulls < 5 || empties < 4 || fulls - empties > 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
