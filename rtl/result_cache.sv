// result_cache: the cache memory between the computational core and the
// transmission side, with the fill/drain control that stalls the core.
//
// The cache alternates between two phases. In FILL, core_en is high, the core
// runs and every wr_valid word is written at the next address. When the last
// of the DEPTH entries has been written the cache switches to DRAIN and drops
// core_en, which stalls the whole core. In DRAIN the entries are read back in
// write order and offered one at a time on rd_valid/rd_data (valid/ready
// handshake, data held until accepted); the memory read is synchronous, so an
// entry takes at least two clocks. After the last entry has been accepted the
// cache returns to FILL and the core restarts. wr_valid is ignored outside
// FILL. The fill-then-drain operation and the stalling of the core follow the
// design description; the depth, the handshake and the clock-enable form of the
// stall are this design's own choices.
module result_cache #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned W     = 96,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  // write side (computational core)
  input  logic         wr_valid,
  input  logic [W-1:0] wr_data,
  output logic         core_en,     // high while filling; low stalls the core
  // read side (post-processing and transmission)
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  input  logic         rd_ready,
  // phase markers (one-clock pulses)
  output logic         full_pulse,  // last entry written, drain begins
  output logic         empty_pulse  // last entry accepted, core restarts
);

  typedef enum logic [1:0] {FILL, DRAIN_RD, DRAIN_OUT} phase_e;

  phase_e        phase;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  mem [DEPTH];

  assign core_en  = (phase == FILL);
  assign rd_valid = (phase == DRAIN_OUT);

  always_ff @(posedge clk) begin
    if (core_en && wr_valid) mem[waddr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (phase == DRAIN_RD) rd_data <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase       <= FILL;
      waddr       <= '0;
      raddr       <= '0;
      full_pulse  <= 1'b0;
      empty_pulse <= 1'b0;
    end else begin
      full_pulse  <= 1'b0;
      empty_pulse <= 1'b0;
      unique case (phase)
        FILL: if (wr_valid) begin
          if (waddr == AW'(DEPTH - 1)) begin
            waddr      <= '0;
            raddr      <= '0;
            phase      <= DRAIN_RD;
            full_pulse <= 1'b1;
          end else begin
            waddr <= waddr + 1'b1;
          end
        end
        DRAIN_RD: phase <= DRAIN_OUT;
        DRAIN_OUT: if (rd_ready) begin
          if (raddr == AW'(DEPTH - 1)) begin
            phase       <= FILL;
            empty_pulse <= 1'b1;
          end else begin
            raddr <= raddr + 1'b1;
            phase <= DRAIN_RD;
          end
        end
        default: phase <= FILL;
      endcase
    end
  end

  // read-side handshake: an offered entry stays unchanged until it is taken
  a_rd_hold: assert property (@(posedge clk) disable iff (!rst_n)
    rd_valid && !rd_ready |=> rd_valid && $stable(rd_data));

  // the core never runs while entries are waiting to be read
  a_no_fill_in_drain: assert property (@(posedge clk) disable iff (!rst_n)
    rd_valid |-> !core_en);

endmodule
