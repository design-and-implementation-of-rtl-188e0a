// fde_tb: self-checking test of the clock-enabled register.
// Checks the power-up value, then drives random d and ce for 500 cycles and
// compares q against a reference that loads d only when ce was high.
module fde_tb;
  logic       clk = 0;
  logic       ce;
  logic [7:0] d, q, ref_q;
  int checks = 0, failures = 0;

  fde #(.WIDTH(8)) dut (.clk(clk), .ce(ce), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 0; d = 8'hA5; ref_q = 8'h00;
    #1;
    checks++; if (q !== 8'h00) begin failures++; $display("power-up value %h", q); end
    repeat (3) @(posedge clk);
    #1 checks++; if (q !== 8'h00) begin failures++; $display("loaded without ce: %h", q); end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      ce = ($urandom_range(0, 2) == 0);
      d  = 8'($urandom);
      @(posedge clk);
      if (ce) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("cycle %0d: q=%h expected %h", i, q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
