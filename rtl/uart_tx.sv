// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, 1 stop
// bit, least significant bit first.
//
// A one-cycle pulse on start while busy is low loads data and sends a frame:
// start bit (low), eight data bits, stop bit (high), each CLKS_PER_BIT clock
// cycles long. busy is high from the cycle after start until the stop bit has
// been sent; a start while busy is ignored. The line idles high. Frame format
// and interface are this design's choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 5208
) (
  input  logic       clk,
  input  logic       arst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       tx
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  // frame shift register: {stop, data[7:0], start}, sent from bit 0
  logic [9:0]    frame;
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      frame     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      busy      <= 1'b0;
      tx        <= 1'b1;
    end else if (!busy) begin
      tx <= 1'b1;
      if (start) begin
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        cnt       <= '0;
        busy      <= 1'b1;
      end
    end else begin
      tx <= frame[0];
      if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt   <= '0;
        frame <= {1'b1, frame[9:1]};
        if (bits_left == 4'd1) busy <= 1'b0;
        bits_left <= bits_left - 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
