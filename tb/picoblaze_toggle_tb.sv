// picoblaze_toggle_tb: end-to-end test of the SoC at its default parameters
// (50 MHz clock, 9600 baud, PWM period 2048 clocks, 4K-word program memory
// holding the demonstration program), with a behavioural processor model on
// the processor ports.
//
// A terminal is modelled on rx1: it sends duty-cycle bytes (128 = 50 %, then
// 64, 0, 255, 200). After each, the test waits for the program loop to carry
// the byte to the duty register and checks the duty register, the measured
// PWM wave on oLed0 (high cycles = duty * 8, period = 2048 cycles) and the
// echo on tx. It counts each mechanism of the design: bytes received, input
// reads, output writes, duty changes, PWM periods, echoed bytes, and fails
// on one that never happened. The processor reset must follow NOT Reset.
module picoblaze_toggle_tb;
  import soc_pkg::*;
  localparam int CPB = (50_000_000 + 4800) / 9600;   // clocks per bit
  localparam int PERIOD = 256 * 8;                   // PWM period in clocks

  logic   iClk = 0, key = 0, Reset = 0, rx1 = 1;
  logic   oLed0, tx, kcpsm6_reset;
  instr_t instruction;
  data_t  in_port, out_port, port_id, dutycycle;
  pc_t    address;
  logic   bram_enable, write_strobe, read_strobe, k_write_strobe, interrupt_ack;
  logic   rx_valid, frame_err, pwm_period_start;
  int     bad_opcodes;
  int checks = 0, failures = 0;

  int n_rx = 0, n_read = 0, n_write = 0, n_duty = 0, n_period = 0, n_echo = 0;
  data_t duty_prev = 0;
  logic [7:0] echo_q[$];

  picoblaze_toggle dut (
    .iClk(iClk), .key(key), .Reset(Reset), .rx1(rx1), .oLed0(oLed0), .tx(tx),
    .kcpsm6_reset(kcpsm6_reset), .instruction(instruction), .in_port(in_port),
    .address(address), .bram_enable(bram_enable), .out_port(out_port),
    .write_strobe(write_strobe), .read_strobe(read_strobe),
    .dutycycle(dutycycle), .rx_valid(rx_valid), .frame_err(frame_err),
    .pwm_period_start(pwm_period_start)
  );

  kcpsm6_model cpu (
    .instruction(instruction), .in_port(in_port), .clk(iClk), .interrupt(1'b0),
    .reset(kcpsm6_reset), .sleep(1'b0), .address(address), .out_port(out_port),
    .port_id(port_id), .bram_enable(bram_enable), .interrupt_ack(interrupt_ack),
    .k_write_strobe(k_write_strobe), .read_strobe(read_strobe),
    .write_strobe(write_strobe), .bad_opcodes(bad_opcodes)
  );

  always #10 iClk = ~iClk;

  always @(posedge iClk) begin
    if (rx_valid && key) n_rx++;
    if (read_strobe) n_read++;
    if (write_strobe) n_write++;
    if (pwm_period_start) n_period++;
    if (dutycycle != duty_prev) n_duty++;
    duty_prev <= dutycycle;
  end

  initial begin
    repeat (2_000_000) @(posedge iClk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // terminal side: decode what the SoC sends on tx
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge tx);
      repeat (CPB / 2) @(posedge iClk);
      if (tx !== 1'b0) continue;
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge iClk);
        b[i] = tx;
      end
      repeat (CPB) @(posedge iClk);
      echo_q.push_back(b);
      n_echo++;
    end
  end

  task automatic send(input logic [7:0] b);
    @(negedge iClk);
    rx1 = 1'b0;
    repeat (CPB) @(negedge iClk);
    for (int i = 0; i < 8; i++) begin
      rx1 = b[i];
      repeat (CPB) @(negedge iClk);
    end
    rx1 = 1'b1;
    repeat (CPB) @(negedge iClk);
  endtask

  task automatic measure(output int len, output int high);
    len = 0; high = 0;
    @(posedge iClk iff pwm_period_start);
    forever begin
      #1;
      len++;
      if (oLed0) high++;
      if (pwm_period_start || len > 2 * PERIOD) break;
      @(posedge iClk);
    end
  endtask

  initial begin
    static logic [7:0] cmds[$] = '{8'd128, 8'd64, 8'd0, 8'd255, 8'd200};
    int len, high;
    #1 checks++;
    if (kcpsm6_reset !== 1'b1) begin failures++; $display("processor not in reset"); end
    repeat (10) @(posedge iClk);
    key = 1; Reset = 1;
    #1 checks++;
    if (kcpsm6_reset !== 1'b0) begin failures++; $display("processor reset not released"); end

    foreach (cmds[i]) begin
      send(cmds[i]);
      // a few passes of the three-instruction program loop
      repeat (40) @(posedge iClk);
      #1 checks++;
      if (dutycycle !== cmds[i]) begin
        failures++; $display("duty register %0d, expected %0d", dutycycle, cmds[i]);
      end
      measure(len, high);     // the period in which the new value is taken
      measure(len, high);
      checks++;
      if (len != PERIOD) begin failures++; $display("PWM period %0d", len); end
      checks++;
      if (high != int'(cmds[i]) * 8) begin
        failures++; $display("duty %0d: high %0d of %0d cycles", cmds[i], high, len);
      end
      else $display("duty byte %0d: PWM high %0d of %0d clock cycles", cmds[i], high, len);
    end

    repeat (12 * CPB) @(posedge iClk);
    checks++;
    if (echo_q.size() != cmds.size()) begin
      failures++; $display("echoed %0d bytes, sent %0d", echo_q.size(), cmds.size());
    end
    foreach (cmds[i]) begin
      checks++;
      if (i >= echo_q.size() || echo_q[i] !== cmds[i]) begin failures++; $display("echo %0d wrong", i); end
    end
    checks++;
    if (bad_opcodes != 0) begin failures++; $display("processor fetched %0d unknown words", bad_opcodes); end

    $display("mechanisms: rx=%0d read=%0d write=%0d duty_changes=%0d periods=%0d echo=%0d",
             n_rx, n_read, n_write, n_duty, n_period, n_echo);
    checks++; if (n_rx == 0)     begin failures++; $display("no byte received"); end
    checks++; if (n_read == 0)   begin failures++; $display("no input read"); end
    checks++; if (n_write == 0)  begin failures++; $display("no output write"); end
    checks++; if (n_duty == 0)   begin failures++; $display("duty never changed"); end
    checks++; if (n_period == 0) begin failures++; $display("no PWM period"); end
    checks++; if (n_echo == 0)   begin failures++; $display("no echo"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
