// trng_top: true random number generator built around a filled-up
// floating-point computational core.
//
// Dataflow (clk domain, one clock throughout):
//   point_memory -> pipeline_interface -> [floating-point pipeline, external]
//     -> fp_accumulator (32-bit float)  \
//     -> fix_accumulator (64-bit fixed)  -> result_cache -> xor_postproc
//                                                      -> uart_tx -> uart_txd
// The pipeline interface streams one point (X, Y, Z) per clock to the
// floating-point pipeline, which is outside this module: its operands leave on
// pipe_valid/pipe_point and its results return on pipe_res_valid/pipe_res. Both
// accumulators sum every result. Each pair of accumulator values is written to
// the cache; when the cache is full, core_en drops and the core (pipeline
// interface, the external pipeline via pipe_en, both accumulators) is stalled
// until the cache has been emptied through the XOR post-processor, which turns
// bits 39..8 of each 64-bit value into one random byte, and the RS-232
// transmitter. The core then resumes where it stopped.
// The random behaviour of the real generator comes from the physical
// interference in a nearly full FPGA, not from this logic: in simulation the
// output is a deterministic function of the point set and the pipeline.
// The block structure follows the design description; the clock-enable stall,
// the load port of the point memory, the sizes of the memories and the UART
// settings are this design's own choices.
module trng_top
  import trng_pkg::*;
#(
  parameter int unsigned PT_DEPTH    = 4096,
  parameter int unsigned CACHE_DEPTH = 8192,
  parameter int          LSB_EXP     = -32,
  parameter int unsigned CLK_HZ      = CLK_HZ_DEFAULT,
  parameter int unsigned BAUD        = 115_200,
  localparam int unsigned PAW = $clog2(PT_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // point-memory load port
  input  logic           pt_wr_en,
  input  logic [PAW-1:0] pt_wr_addr,
  input  point_t         pt_wr_data,
  // operation
  input  logic           run,
  input  logic [PAW-1:0] last_addr,
  // external floating-point pipeline
  output logic           pipe_en,        // pipeline clock enable (low = stalled)
  output logic           pipe_valid,
  output logic           pipe_last,
  output point_t         pipe_point,
  input  logic           pipe_res_valid,
  input  fp32_t          pipe_res,
  // accumulator final results
  output fp32_t          regular_result,
  output logic [FIX_W-1:0] improved_result,
  output logic           acc_overflow,
  // random numbers
  output logic           rand_valid,     // a random byte is handed to the UART
  output logic [RAND_W-1:0] rand_byte,
  output logic           uart_txd,
  output logic           core_stalled
);

  logic           core_en;
  logic           mem_rd_en;
  logic [PAW-1:0] mem_rd_addr;
  point_t         mem_rd_data;

  logic           reg_valid, fix_valid;
  cache_entry_t   wr_entry, rd_entry;
  logic           cache_rd_valid, cache_rd_ready;
  logic           full_pulse, empty_pulse;
  logic           pp_valid, pp_ready;
  logic [RAND_W-1:0] pp_data;

  point_memory #(.DEPTH(PT_DEPTH)) u_points (
    .clk, .wr_en(pt_wr_en), .wr_addr(pt_wr_addr), .wr_data(pt_wr_data),
    .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data)
  );

  pipeline_interface #(.DEPTH(PT_DEPTH)) u_if (
    .clk, .rst_n, .en(core_en), .run, .last_addr,
    .mem_rd_en, .mem_rd_addr, .mem_rd_data,
    .pipe_valid, .pipe_last, .pipe_point
  );

  assign pipe_en = core_en;

  fp_accumulator u_regular (
    .clk, .rst_n, .en(core_en), .in_valid(pipe_res_valid), .in_data(pipe_res),
    .acc(regular_result), .out_valid(reg_valid)
  );

  fix_accumulator #(.ACC_W(FIX_W), .LSB_EXP(LSB_EXP)) u_improved (
    .clk, .rst_n, .en(core_en), .in_valid(pipe_res_valid), .in_data(pipe_res),
    .acc(improved_result), .out_valid(fix_valid), .overflow(acc_overflow)
  );

  assign wr_entry = '{improved: improved_result, regular: regular_result};

  result_cache #(.DEPTH(CACHE_DEPTH), .W($bits(cache_entry_t))) u_cache (
    .clk, .rst_n,
    .wr_valid(fix_valid && reg_valid), .wr_data(wr_entry), .core_en,
    .rd_valid(cache_rd_valid), .rd_data(rd_entry), .rd_ready(cache_rd_ready),
    .full_pulse, .empty_pulse
  );

  // Only the improved accumulator feeds the post-processor; the regular
  // accumulator's value is kept alongside it in the cache.
  xor_postproc #(.IN_W(FIX_W), .LO_BIT(8), .GROUP_W(RAND_W)) u_post (
    .clk, .rst_n,
    .in_valid(cache_rd_valid), .in_word(rd_entry.improved), .in_ready(cache_rd_ready),
    .out_valid(pp_valid), .out_data(pp_data), .out_ready(pp_ready)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n, .in_valid(pp_valid), .in_data(pp_data), .in_ready(pp_ready),
    .tx(uart_txd)
  );

  assign rand_valid   = pp_valid && pp_ready;
  assign rand_byte    = pp_data;
  assign core_stalled = !core_en;

endmodule
