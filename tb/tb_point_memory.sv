// tb_point_memory: checks the point-coordinate memory.
//
// Writes random points to random addresses while keeping a reference copy,
// then reads back every written address and checks the one-clock read latency
// and that rd_data holds its value while rd_en is low.
module tb_point_memory;
  import trng_pkg::*;

  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);

  logic          clk = 0, wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  point_t        wr_data = '0, rd_data;
  point_t        ref_mem [DEPTH];
  int checks = 0, failures = 0;

  point_memory #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a);
      wr_data = '{x: $urandom, y: $urandom, z: $urandom};
      ref_mem[a] = wr_data;
    end
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      wr_addr = AW'($urandom_range(DEPTH - 1));
      wr_data = '{x: $urandom, y: $urandom, z: $urandom};
      ref_mem[wr_addr] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int i = 0; i < 500; i++) begin
      point_t held;
      @(negedge clk);
      rd_en = 1; rd_addr = AW'($urandom_range(DEPTH - 1));
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data !== ref_mem[rd_addr]) failures++;
      held = rd_data;
      rd_addr = rd_addr + 1'b1;
      @(negedge clk);
      checks++;
      if (rd_data !== held) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
