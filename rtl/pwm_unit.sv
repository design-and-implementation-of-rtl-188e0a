// pwm_unit: pulse-width modulator driving the fan output of the SoC.
//
// An 8-bit counter runs through 0..255, advancing once every PRESCALE clock
// cycles, so one PWM period is 256 * PRESCALE clock cycles. The output is
// high while the counter is below the duty value, so the high time is
// dutycycle/256 of the period: 0 gives a constant low, 128 a 50 % wave, 255
// is high for 255 of 256 steps. The duty value is taken into a shadow
// register at the start of every period, so a change written in mid-period
// never cuts a pulse short; it shows from the next period on. period_start
// is high in the last cycle of each period, so the edge that ends that cycle
// starts a new period (it is an observation output for the SoC top).
//
// The 8-bit duty input, the clk and reset pins and the pwm output are those
// of the SoC's schematic. reset_n is active low: the SoC's simulation shows
// the wave running with reset at 1. The counter width, the prescaler
// (default 8, about 24 kHz from a 50 MHz clock, a usual fan PWM rate) and
// the period-boundary update are this design's choices.
module pwm_unit #(
  parameter int unsigned PRESCALE = 8
) (
  input  logic       clk,
  input  logic       reset_n,
  input  logic [7:0] dutycycle,
  output logic       pwm,
  output logic       period_start
);

  localparam int unsigned PW = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;

  logic [PW-1:0] pre;
  logic [7:0]    cnt;
  logic [7:0]    duty_q;
  logic          step;

  assign step = (PRESCALE <= 1) || (pre == PW'(PRESCALE - 1));

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      pre    <= '0;
      cnt    <= '0;
      duty_q <= '0;
      pwm    <= 1'b0;
    end else begin
      if (step) begin
        pre <= '0;
        cnt <= cnt + 1'b1;
      end else begin
        pre <= pre + 1'b1;
      end
      // new period begins with counter value 0
      if (step && cnt == 8'hFF) begin
        duty_q <= dutycycle;
        pwm    <= (dutycycle != 8'h00);
      end else if (step) begin
        pwm    <= ((cnt + 8'd1) < duty_q);
      end
    end
  end

  assign period_start = step && (cnt == 8'hFF);

endmodule
