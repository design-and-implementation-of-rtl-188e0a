// uart_tb: self-checking test of the serial link.
// Runs at 16 clocks per bit. Sends random bytes (isolated and back to back)
// on rx and checks: led holds each byte, rx_valid pulses once per byte at the
// middle of the stop bit (9.5 bit times after the start edge, plus the input
// synchroniser), every byte comes back on tx with the right frame timing,
// and a frame with a low stop bit raises frame_err and leaves led unchanged.
module uart_tb;
  localparam int CPB = 16;
  logic       clk = 0;
  logic       arst_n = 0;
  logic       rx = 1;
  logic [7:0] led;
  logic       tx, rx_valid, frame_err;
  int checks = 0, failures = 0;
  int cycle = 0;
  int valid_count = 0, ferr_count = 0;
  int last_valid_cycle = 0;
  logic [7:0] echo_q[$];

  uart #(.CLK_HZ(CPB * 62_500), .BAUD(62_500)) dut (
    .clk(clk), .arst_n(arst_n), .rx(rx), .led(led), .tx(tx),
    .rx_valid(rx_valid), .frame_err(frame_err)
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rx_valid) begin valid_count <= valid_count + 1; last_valid_cycle <= cycle; end
    if (frame_err) ferr_count <= ferr_count + 1;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // serial decoder on tx, independent of the design
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      if (tx !== 1'b0) continue;
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = tx;
      end
      repeat (CPB) @(posedge clk);
      checks++;
      if (tx !== 1'b1) begin failures++; $display("echo stop bit low"); end
      echo_q.push_back(b);
    end
  end

  int start_cycle;
  task automatic send(input logic [7:0] b, input logic stop_bit);
    @(negedge clk);
    start_cycle = cycle;
    rx = 1'b0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      rx = b[i];
      repeat (CPB) @(negedge clk);
    end
    rx = stop_bit;
    repeat (CPB) @(negedge clk);
    rx = 1'b1;
  endtask

  initial begin
    logic [7:0] sent[$];
    logic [7:0] b, prev;
    int v0, f0;
    repeat (4) @(posedge clk);
    arst_n = 1;
    repeat (4) @(posedge clk);
    checks++;
    if (tx !== 1'b1) begin failures++; $display("tx not idle high"); end

    // isolated bytes, including the extremes
    for (int k = 0; k < 12; k++) begin
      b = (k == 0) ? 8'h00 : (k == 1) ? 8'hFF : (k == 2) ? 8'h80 : 8'($urandom);
      v0 = valid_count;
      send(b, 1'b1);
      sent.push_back(b);
      repeat (CPB) @(negedge clk);
      checks++;
      if (led !== b) begin failures++; $display("led=%h expected %h", led, b); end
      checks++;
      if (valid_count != v0 + 1) begin failures++; $display("rx_valid pulses %0d", valid_count - v0); end
      checks++;
      if (last_valid_cycle - start_cycle < 9 * CPB + CPB / 2 ||
          last_valid_cycle - start_cycle > 9 * CPB + CPB / 2 + 4) begin
        failures++;
        $display("rx_valid %0d cycles after start edge", last_valid_cycle - start_cycle);
      end
      repeat (4 * CPB) @(negedge clk);
    end

    // back-to-back frames: every one must be received and echoed
    for (int k = 0; k < 8; k++) begin
      b = 8'($urandom);
      send(b, 1'b1);
      sent.push_back(b);
    end
    repeat (CPB) @(negedge clk);
    checks++;
    if (led !== b) begin failures++; $display("led after burst=%h expected %h", led, b); end

    // framing error: stop bit low
    prev = led;
    f0 = ferr_count;
    v0 = valid_count;
    send(8'h3C, 1'b0);
    repeat (2 * CPB) @(negedge clk);
    checks++;
    if (ferr_count != f0 + 1 || valid_count != v0) begin
      failures++; $display("framing error not flagged");
    end
    checks++;
    if (led !== prev) begin failures++; $display("bad frame changed led"); end

    // a short glitch on rx is not a start bit
    @(negedge clk); rx = 0; repeat (3) @(negedge clk); rx = 1;
    repeat (12 * CPB) @(negedge clk);
    checks++;
    if (valid_count != v0 || ferr_count != f0 + 1) begin failures++; $display("glitch taken as frame"); end

    // wait for the last echo, then compare
    repeat (25 * CPB) @(negedge clk);
    checks++;
    if (echo_q.size() != sent.size()) begin
      failures++; $display("echoed %0d bytes, sent %0d", echo_q.size(), sent.size());
    end
    for (int i = 0; i < sent.size() && i < echo_q.size(); i++) begin
      checks++;
      if (echo_q[i] !== sent[i]) begin failures++; $display("echo %0d: %h expected %h", i, echo_q[i], sent[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
