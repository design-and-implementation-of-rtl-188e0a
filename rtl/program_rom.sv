// program_rom: program memory of the processor (one block RAM used as ROM).
//
// DEPTH words of 18 bits, addressed by the processor's 12-bit address bus.
// The read is synchronous: when enable is high at a rising clock edge, the
// word at address appears on instruction after that edge; when enable is low
// the output holds. This matches how the KCPSM6 core fetches from a block RAM
// (address and bram_enable in one cycle, instruction used in the next).
//
// The contents are loaded from INIT_FILE (hex, one 18-bit word per line).
// The default file holds this design's demonstration program, which reads
// the byte last received by the UART and writes it as the PWM duty cycle,
// forever:
//     000  INPUT  s0, 00    (18'h09000)
//     001  OUTPUT s0, 00    (18'h2D000)
//     002  JUMP   000       (18'h22000)
// Words not in the file read as zero. Depth and width follow the processor's
// 4K x 18 program space; the program is this design's own.
module program_rom
  import soc_pkg::*;
#(
  parameter int unsigned DEPTH     = 4096,
  parameter string       INIT_FILE = "rtl/firmware.hex"
) (
  input  logic   clk,
  input  logic   enable,
  input  pc_t    address,
  output instr_t instruction
);

  instr_t mem [DEPTH];
  instr_t instruction_r;

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (enable) instruction_r <= mem[address[$clog2(DEPTH)-1:0]];
  end

  assign instruction = instruction_r;

endmodule
