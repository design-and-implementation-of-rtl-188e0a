// uart_rx: asynchronous serial receiver, 8 data bits, no parity, 1 stop bit.
//
// rx is brought into the clock domain through two flip-flops. A falling edge
// while idle starts a frame; the receiver then waits half a bit time and
// checks that the line is still low (a shorter pulse is taken as noise),
// after which it samples once per bit time in the middle of each bit, least
// significant bit first. If the stop bit is high the byte is put on data and
// valid pulses for one cycle; a low stop bit drops the byte (framing error,
// reported by a one-cycle pulse on frame_err).
//
// CLKS_PER_BIT = clock frequency / baud rate. The frame format and the
// mid-bit sampling are this design's choice; the SoC description only
// calls for an asynchronous serial link to a PC terminal.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 5208
) (
  input  logic       clk,
  input  logic       arst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  state_t          state;
  logic   [CW-1:0] cnt;
  logic   [2:0]    bit_idx;
  logic   [7:0]    shreg;
  logic   [1:0]    sync;
  logic            rx_s;

  assign rx_s = sync[1];

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      sync      <= 2'b11;
      state     <= IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rx};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        IDLE: begin
          cnt <= '0;
          if (!rx_s) state <= START;
        end
        START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rx_s ? IDLE : DATA;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rx_s, shreg[7:1]};
            if (bit_idx == 3'd7) state <= STOP;
            else bit_idx <= bit_idx + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= IDLE;
            if (rx_s) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
      endcase
    end
  end

endmodule
