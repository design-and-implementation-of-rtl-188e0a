// program_rom_tb: self-checking test of the program memory.
// Reads the three words of the demonstration program and a sample of the
// rest (expected zero), checks the one-cycle read latency and that the
// output holds while enable is low.
module program_rom_tb;
  import soc_pkg::*;
  logic   clk = 0;
  logic   enable;
  pc_t    address;
  instr_t instruction;
  int checks = 0, failures = 0;

  // the demonstration program: INPUT s0,00 / OUTPUT s0,00 / JUMP 000
  function automatic instr_t expected(pc_t a);
    case (a)
      12'h000: return 18'h09000;
      12'h001: return 18'h2D000;
      12'h002: return 18'h22000;
      default: return 18'h00000;
    endcase
  endfunction

  program_rom dut (.clk(clk), .enable(enable), .address(address), .instruction(instruction));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(pc_t a);
    @(negedge clk);
    enable  = 1'b1;
    address = a;
    @(posedge clk);
    #1;
    checks++;
    if (instruction !== expected(a)) begin
      failures++;
      $display("address %h: %h expected %h", a, instruction, expected(a));
    end
  endtask

  initial begin
    enable = 0; address = '0;
    for (int a = 0; a < 8; a++) read_check(pc_t'(a));
    for (int i = 0; i < 200; i++) read_check(pc_t'($urandom));
    read_check(12'hFFF);
    // hold while disabled
    read_check(12'h001);
    @(negedge clk);
    enable = 1'b0; address = 12'h000;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (instruction !== 18'h2D000) begin failures++; $display("output changed while disabled"); end
    // latency: the new word is not visible before the clock edge
    @(negedge clk);
    enable = 1'b1; address = 12'h002;
    #2 checks++;
    if (instruction !== 18'h2D000) begin failures++; $display("read is not registered"); end
    @(posedge clk); #1 checks++;
    if (instruction !== 18'h22000) begin failures++; $display("word not read after one edge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
