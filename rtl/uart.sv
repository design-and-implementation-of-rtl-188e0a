// uart: the SoC's serial link to a PC terminal.
//
// The receiver (uart_rx) turns each serial frame from the PC into a byte and
// keeps the last good byte on led[7:0]; the processor reads it from there
// through the in_port register. The schematic of the SoC gives this block
// only the pins arst_n, clk, rx, led(7:0) and tx, so the transmitter
// (uart_tx) has no data input from the processor: it sends every received
// byte back to the PC (echo), which lets a terminal user see what the SoC
// took in. A byte received while the previous echo is still being sent waits
// in a one-byte holding register, so back-to-back frames are all echoed.
//
// rx_valid pulses for one cycle when led changes to a newly received byte;
// frame_err pulses when a frame with a low stop bit is dropped. Both are
// additions for observation. Baud rate = CLK_HZ / CLKS_PER_BIT; the defaults
// (50 MHz clock, 9600 baud, 8N1) are this design's choice.
module uart #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       arst_n,
  input  logic       rx,
  output logic [7:0] led,
  output logic       tx,
  output logic       rx_valid,
  output logic       frame_err
);

  localparam int unsigned CLKS_PER_BIT = (CLK_HZ + BAUD / 2) / BAUD;

  logic [7:0] rx_data;
  logic       tx_busy;
  logic       pending;
  logic [7:0] pend_data;
  logic       tx_start;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk      (clk),
    .arst_n   (arst_n),
    .rx       (rx),
    .data     (rx_data),
    .valid    (rx_valid),
    .frame_err(frame_err)
  );

  assign led      = rx_data;
  assign tx_start = pending && !tx_busy;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      pending   <= 1'b0;
      pend_data <= '0;
    end else if (rx_valid) begin
      pending   <= 1'b1;
      pend_data <= rx_data;
    end else if (tx_start) begin
      pending   <= 1'b0;
    end
  end

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk   (clk),
    .arst_n(arst_n),
    .start (tx_start),
    .data  (pend_data),
    .busy  (tx_busy),
    .tx    (tx)
  );

endmodule
