// fde: register with clock enable (D flip-flops with CE, as in the FPGA
// primitive of the same name).
//
// On every rising edge of clk where ce is high, q takes d; otherwise q holds.
// The SoC uses two of them: one keeps the last byte the UART received and
// presents it on the processor's in_port, the other keeps the duty cycle the
// processor writes through out_port. There is no reset pin, as in the
// schematic of the SoC; the register powers up at zero (FPGA configuration
// value), which is this design's choice.
//
// Timing: one cycle from ce/d to q. Lint reports the declaration initialiser
// of a register written in always_ff (PROCASSINIT); it is intended, being
// the power-up value of a register without reset.
module fde #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             ce,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  // power-up value as loaded by FPGA configuration (the register has no
  // reset pin, so the initial value is given at the declaration)
  logic [WIDTH-1:0] q_r = '0;

  always_ff @(posedge clk) begin
    if (ce) q_r <= d;
  end

  assign q = q_r;

endmodule
