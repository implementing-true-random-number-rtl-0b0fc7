// uart_tx: the PC transmission controller, an RS-232 serial transmitter.
//
// Sends each accepted byte as one start bit (0), eight data bits least
// significant first, and one stop bit (1); the line idles high. Every bit lasts
// CLKS_PER_BIT clocks, CLK_HZ / BAUD rounded down (390 clocks at 45 MHz and
// 115200 baud), so a byte takes 10 * CLKS_PER_BIT clocks. in_ready is high only
// while the transmitter is idle; a byte offered with in_valid is accepted on
// that clock and its start bit begins on the next one.
// The RS-232 link to the PC follows the design description; the baud rate and
// frame format are this design's own choices.
module uart_tx #(
  parameter int unsigned CLK_HZ = 45_000_000,
  parameter int unsigned BAUD   = 115_200,
  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD,
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic       tx
);

  logic [9:0]    frame;     // stop, data[7:0], start; shifted out LSB first
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  assign in_ready = (bits_left == 4'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frame     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      tx        <= 1'b1;
    end else if (bits_left == 4'd0) begin
      tx <= 1'b1;
      if (in_valid) begin
        frame     <= {1'b1, in_data, 1'b0};
        bits_left <= 4'd10;
        cnt       <= '0;
      end
    end else begin
      tx <= frame[0];
      if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt       <= '0;
        frame     <= {1'b1, frame[9:1]};
        bits_left <= bits_left - 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
