// pwm_unit_tb: self-checking test of the PWM generator.
// With PRESCALE = 2 one period is 512 clock cycles. For a set of duty values
// it measures, between two period_start pulses, the period length and the
// number of high cycles, which must be 512 and duty * 2. It also checks that
// a duty change written in mid-period first shows in the following period,
// and that reset forces the output low.
module pwm_unit_tb;
  localparam int PRE = 2;
  logic       clk = 0;
  logic       reset_n = 0;
  logic [7:0] duty = 0;
  logic       pwm, period_start;
  int checks = 0, failures = 0;

  pwm_unit #(.PRESCALE(PRE)) dut (
    .clk(clk), .reset_n(reset_n), .dutycycle(duty), .pwm(pwm), .period_start(period_start)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure one full period: returns cycles and high cycles. If change_at
  // is not negative, duty is set to new_duty that many cycles into it.
  task automatic measure(output int len, output int high,
                         input int change_at = -1, input logic [7:0] new_duty = 0);
    len = 0; high = 0;
    @(posedge clk iff period_start);   // this edge begins the period
    forever begin
      #1;
      len++;
      if (pwm) high++;
      if (len == change_at) duty = new_duty;
      if (period_start || len > 4 * 256 * PRE) break;
      @(posedge clk);
    end
  endtask

  initial begin
    int len, high;
    static logic [7:0] vals[$] = '{8'd0, 8'd1, 8'd64, 8'd128, 8'd200, 8'd254, 8'd255};
    repeat (3) @(posedge clk);
    #1 checks++;
    if (pwm !== 1'b0) begin failures++; $display("pwm high in reset"); end
    reset_n = 1;
    foreach (vals[i]) begin
      duty = vals[i];
      measure(len, high);       // period in which the new value is taken
      measure(len, high);
      checks++;
      if (len != 256 * PRE) begin failures++; $display("period %0d", len); end
      checks++;
      if (high != int'(vals[i]) * PRE) begin
        failures++; $display("duty %0d: high %0d expected %0d", vals[i], high, int'(vals[i]) * PRE);
      end
    end
    // mid-period change: current period keeps the old value
    duty = 8'd128;
    measure(len, high);
    measure(len, high, 100, 8'd32);
    checks++;
    if (high != 128 * PRE) begin failures++; $display("mid-period change cut the pulse: %0d", high); end
    measure(len, high);
    checks++;
    if (high != 32 * PRE) begin failures++; $display("new duty not applied: %0d", high); end
    // reset mid-wave
    duty = 8'd255;
    repeat (50) @(posedge clk);
    reset_n = 0;
    #1 checks++;
    if (pwm !== 1'b0) begin failures++; $display("reset does not clear pwm"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
