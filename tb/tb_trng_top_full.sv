// tb_trng_top_full: end-to-end test of the random number generator with every
// parameter of trng_top at its default (4096 points, 8192 cache entries,
// 45 MHz clock, 115200 baud): one complete fill of the cache and its drain,
// 8192 random bytes, through the serial line.
//
// The point memory is loaded through its load port, the behavioural pipeline
// model is attached to the pipeline ports, and the generator runs through
// several fill/drain rounds of the cache. A reference model in the testbench
// follows every pipeline result that the core accepts, accumulates it in
// single precision and in 64-bit fixed point, and from that predicts every
// accumulator value and every random byte (XOR of bits 39..32, 31..24, 23..16,
// 15..8). The bytes are checked where they enter the UART and again after
// decoding the serial line. Counted mechanisms, each of which must occur:
// core stalls and restarts by the cache, wrap-around of the point stream,
// negative pipeline results, results truncated by the fixed-point conversion,
// pauses of run, and decoded UART frames. While the core is stalled, its
// outputs to the pipeline must not change.
module tb_trng_top_full;
  import trng_pkg::*;
  import tb_ref_pkg::*;

  // the defaults of trng_top
  localparam int PT_DEPTH = 4096, CACHE_DEPTH = 8192, LSB_EXP = -32;
  localparam int CLK_HZ = 45_000_000, BAUD = 115_200, CPB = CLK_HZ / BAUD;
  localparam int ROUNDS = 1, WATCHDOG = 40_000_000;
  localparam int PAW = $clog2(PT_DEPTH);

  logic clk = 0, rst_n = 0, pt_wr_en = 0, run = 0;
  logic [PAW-1:0] pt_wr_addr = '0, last_addr = PAW'(PT_DEPTH - 3);
  point_t pt_wr_data = '0, pipe_point;
  logic pipe_en, pipe_valid, pipe_last, pipe_res_valid;
  fp32_t pipe_res, regular_result;
  logic [63:0] improved_result;
  logic acc_overflow, rand_valid, uart_txd, core_stalled;
  logic [7:0] rand_byte;

  trng_top dut (.*);

  fp_pipeline_model #(.LAT(6)) u_pipe (
    .clk, .rst_n, .en(pipe_en), .in_valid(pipe_valid), .in_point(pipe_point),
    .res_valid(pipe_res_valid), .res(pipe_res));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_restart = 0, n_wrap = 0, n_neg = 0, n_trunc = 0, n_pause = 0;
  int n_frames = 0, n_bytes = 0, n_results = 0;
  fp32_t       ref_reg = '0;
  logic [63:0] ref_fix = '0;
  logic [7:0]  exp_bytes[$], uart_q[$];

  task automatic fail(input string what);
    failures++;
    if (failures < 10) $display("FAIL: %s", what);
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of the accumulators and the byte stream
  always @(posedge clk) begin
    if (rst_n) begin
      logic en_q, v_q, stalled_q, last_q;
      fp32_t d_q;
      point_t pt_q;
      logic big;
      en_q = pipe_en; v_q = pipe_res_valid; d_q = pipe_res; pt_q = pipe_point;
      stalled_q = core_stalled; last_q = pipe_last && pipe_valid;
      #1;
      if (en_q && v_q) begin
        ref_reg = fadd(ref_reg, d_q);
        ref_fix = ref_fix + f2fix(d_q, LSB_EXP, big);
        if (d_q[31]) n_neg++;
        if (d_q[30:23] != 0 && int'(d_q[30:23]) < 150 + LSB_EXP) n_trunc++;
        exp_bytes.push_back(xor_bytes(ref_fix));
        n_results++;
        checks += 2;
        if (regular_result !== ref_reg) fail($sformatf("regular %h vs %h", regular_result, ref_reg));
        if (improved_result !== ref_fix) fail($sformatf("improved %h vs %h", improved_result, ref_fix));
      end
      if (en_q && last_q) n_wrap++;
      if (!en_q) begin
        checks++;
        if (pipe_point !== pt_q) fail("pipeline operand changed while stalled");
      end
      if (!stalled_q && core_stalled) n_stall++;
      if (stalled_q && !core_stalled) n_restart++;
    end
  end

  // bytes entering the transmitter
  always @(posedge clk) begin
    if (rst_n && rand_valid) begin
      checks++;
      if (exp_bytes.size() == 0) fail("unexpected byte");
      else begin
        if (rand_byte !== exp_bytes[0]) fail($sformatf("byte %h vs %h", rand_byte, exp_bytes[0]));
        void'(exp_bytes.pop_front());
      end
      uart_q.push_back(rand_byte);
      n_bytes++;
    end
  end

  // serial receiver
  initial begin
    logic [7:0] b;
    @(posedge rst_n);
    forever begin
      while (uart_txd !== 1'b0) @(posedge clk);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      checks += 2;
      if (uart_txd !== 1'b1) fail("stop bit");
      if (uart_q.size() == 0 || b !== uart_q[0]) fail("serial byte");
      if (uart_q.size() != 0) void'(uart_q.pop_front());
      n_frames++;
    end
  end

  initial begin
    // load points; every fourth point gives a tiny result that gets truncated
    for (int a = 0; a < PT_DEPTH; a++) begin
      @(negedge clk);
      pt_wr_en = 1; pt_wr_addr = PAW'(a);
      if (a % 4 == 3)
        pt_wr_data = '{x: rand_float(85, 95), y: rand_float(85, 95), z: rand_float(80, 100)};
      else
        pt_wr_data = '{x: rand_float(123, 131), y: rand_float(123, 131), z: rand_float(120, 134)};
    end
    @(negedge clk) pt_wr_en = 0;
    rst_n = 1; run = 1;
    while (n_restart < ROUNDS) begin
      @(negedge clk);
      if (n_stall == 0 && $urandom_range(7) == 0) begin
        run = 0;
        n_pause++;
      end else run = 1;
    end
    // let the bytes already handed to the transmitter leave the serial line
    run = 0;
    do repeat (30 * CPB) @(negedge clk);
    while (core_stalled || uart_q.size() != 0);
    checks++;
    if (acc_overflow) fail("overflow");
    if (n_stall == 0)   fail("no stall");
    if (n_restart == 0) fail("no restart");
    if (n_wrap == 0)    fail("no wrap");
    if (n_neg == 0)     fail("no negative result");
    if (n_trunc == 0)   fail("no truncated result");
    if (n_pause == 0)   fail("no run pause");
    if (n_frames != n_bytes || n_bytes < ROUNDS * CACHE_DEPTH) fail("frames");
    $display("stalls=%0d restarts=%0d wraps=%0d neg=%0d trunc=%0d pauses=%0d results=%0d bytes=%0d frames=%0d",
             n_stall, n_restart, n_wrap, n_neg, n_trunc, n_pause, n_results, n_bytes, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
