// pipeline_interface: streams points from the point memory into the pipeline.
//
// While run is high and the core is enabled (en), it reads one point per clock
// from the point memory, walking addresses 0 .. last_addr and then wrapping back
// to 0, so the pipeline receives a new operand every cycle. The memory read is
// synchronous, so a point appears on pipe_point/pipe_valid one enabled clock
// after its address was issued; pipe_last marks the final point of each pass.
// When en is low (the core is stalled) nothing moves: the address, the valid
// flag and the memory output register all hold their values, which is how a
// clock-stopped core behaves.
// That the interface feeds the pipeline from the memory follows the design
// description; the addressing order, the wrap-around and the clock-enable stall
// are this design's own choices.
module pipeline_interface
  import trng_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,          // core clock enable (low = stalled)
  input  logic          run,         // stream points while high
  input  logic [AW-1:0] last_addr,   // address of the last loaded point
  // to the point memory
  output logic          mem_rd_en,
  output logic [AW-1:0] mem_rd_addr,
  input  point_t        mem_rd_data,
  // to the pipeline
  output logic          pipe_valid,
  output logic          pipe_last,
  output point_t        pipe_point
);

  logic [AW-1:0] addr_q;
  logic          issued_q, issued_last_q;

  assign mem_rd_en   = en && run;
  assign mem_rd_addr = addr_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr_q        <= '0;
      issued_q      <= 1'b0;
      issued_last_q <= 1'b0;
    end else if (en) begin
      issued_q      <= run;
      issued_last_q <= run && (addr_q == last_addr);
      if (run) addr_q <= (addr_q == last_addr) ? '0 : addr_q + 1'b1;
    end
  end

  assign pipe_valid = issued_q;
  assign pipe_last  = issued_last_q;
  assign pipe_point = mem_rd_data;

endmodule
