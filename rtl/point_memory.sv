// point_memory: storage for the (X, Y, Z) coordinates of the points the
// floating-point pipeline works on.
//
// A simple dual-port RAM written as an array, so an FPGA tool maps it to block
// RAM. Port A is a write port for loading the point set; port B is the read
// port used by the pipeline interface. The read is synchronous: rd_data holds
// the point at rd_addr one clock after a cycle with rd_en high, and keeps its
// value while rd_en is low (so a stalled core sees a stable operand).
// The memory's role (point coordinates X, Y, Z) follows the design description;
// its depth, the separate load port and the registered read are this design's
// own choices. Contents are not reset.
module point_memory
  import trng_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  // load port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  point_t        wr_data,
  // read port
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output point_t        rd_data
);

  point_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
