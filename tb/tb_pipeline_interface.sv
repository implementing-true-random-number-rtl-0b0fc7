// tb_pipeline_interface: checks the stream of points sent to the pipeline.
//
// The interface is connected to a point memory loaded with points whose X
// field is the address. With random stalls (en low) and run pauses, every
// enabled clock with pipe_valid high must deliver the next address in the
// sequence 0 .. last_addr, 0, ... with pipe_last on last_addr, and nothing may
// change while en is low. Also checks one point per clock when never stalled.
module tb_pipeline_interface;
  import trng_pkg::*;

  localparam int DEPTH = 32;
  localparam int AW = $clog2(DEPTH);

  logic          clk = 0, rst_n = 0, en = 0, run = 0, wr_en = 0;
  logic [AW-1:0] last_addr = AW'(20), wr_addr = '0;
  point_t        wr_data = '0;
  logic          mem_rd_en;
  logic [AW-1:0] mem_rd_addr;
  point_t        mem_rd_data, pipe_point;
  logic          pipe_valid, pipe_last;
  int checks = 0, failures = 0, expect_addr = 0, wraps = 0, stalls = 0, got = 0;

  point_memory #(.DEPTH(DEPTH)) u_mem (
    .clk, .wr_en, .wr_addr, .wr_data, .rd_en(mem_rd_en), .rd_addr(mem_rd_addr),
    .rd_data(mem_rd_data));
  pipeline_interface #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: sample on enabled clock edges, as the pipeline does
  point_t prev_point;
  logic   prev_valid;
  always @(posedge clk) begin
    if (rst_n && en && pipe_valid) begin
      checks++;
      if (pipe_point.x !== 32'(expect_addr) || pipe_point.y !== ~32'(expect_addr)) begin
        failures++;
        if (failures < 5) $display("got %0d expected %0d", pipe_point.x, expect_addr);
      end
      checks++;
      if (pipe_last !== (expect_addr == int'(last_addr))) failures++;
      if (expect_addr == int'(last_addr)) begin
        expect_addr = 0; wraps++;
      end else expect_addr++;
      got++;
    end
    if (rst_n && !en) begin
      // a stalled clock edge must change nothing
      prev_point = pipe_point;
      prev_valid = pipe_valid;
      #1;
      stalls++;
      checks++;
      if (pipe_point !== prev_point || pipe_valid !== prev_valid) failures++;
    end
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = '{x: 32'(a), y: ~32'(a), z: 32'(3 * a)};
    end
    @(negedge clk) wr_en = 0; rst_n = 1; en = 1; run = 1;
    // unstalled: one point per clock
    repeat (41) @(negedge clk);
    checks++;
    if (got != 40) begin
      failures++;
      $display("rate: %0d points in 41 clocks", got);
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en  = $urandom_range(3) != 0;
      if (en) run = $urandom_range(15) != 0;
    end
    checks++;
    if (wraps < 3 || stalls < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
