// kcpsm6_model: behavioural model of the KCPSM6 (PicoBlaze) processor, for
// testbenches only. Not synthesizable and not a processor implementation:
// it has the pins of the real core and executes just the four instructions
// the demonstration program uses, with the real core's two clock cycles per
// instruction:
//     LOAD   sX, kk   18'h01xkk
//     INPUT  sX, pp   18'h09xpp
//     OUTPUT sX, pp   18'h2Dxpp
//     JUMP   aaa      18'h22aaa
// Cycle 1 of an instruction puts the program counter on address with
// bram_enable high; the memory returns the word at that edge. Cycle 2
// decodes it: INPUT raises read_strobe with port_id and takes in_port into
// sX at the closing edge; OUTPUT raises write_strobe with port_id and
// out_port = sX. Any other word counts in bad_opcodes and acts as a no-op.
// interrupt and sleep are ignored; interrupt_ack and k_write_strobe stay low.
module kcpsm6_model (
  input  logic [17:0] instruction,
  input  logic [7:0]  in_port,
  input  logic        clk,
  input  logic        interrupt,
  input  logic        reset,
  input  logic        sleep,
  output logic [11:0] address,
  output logic [7:0]  out_port,
  output logic [7:0]  port_id,
  output logic        bram_enable,
  output logic        interrupt_ack,
  output logic        k_write_strobe,
  output logic        read_strobe,
  output logic        write_strobe,
  output int          bad_opcodes
);
  logic [11:0] pc;
  logic        exec;
  logic [7:0]  regs [16];
  logic [5:0]  op;
  logic [3:0]  sx;

  assign op             = instruction[17:12];
  assign sx             = instruction[11:8];
  assign address        = pc;
  assign bram_enable    = !reset && !exec;
  assign port_id        = instruction[7:0];
  assign out_port       = regs[sx];
  assign read_strobe    = exec && op == 6'h09;
  assign write_strobe   = exec && op == 6'h2D;
  assign interrupt_ack  = 1'b0;
  assign k_write_strobe = 1'b0;

  initial begin
    bad_opcodes = 0;
    foreach (regs[i]) regs[i] = '0;
  end

  always @(posedge clk) begin
    if (reset) begin
      pc   <= '0;
      exec <= 1'b0;
    end else if (!exec) begin
      exec <= 1'b1;
    end else begin
      exec <= 1'b0;
      pc   <= pc + 1'b1;
      case (op)
        6'h01: regs[sx] <= instruction[7:0];
        6'h09: regs[sx] <= in_port;
        6'h2D: ;
        6'h22: pc <= instruction[11:0];
        default: bad_opcodes <= bad_opcodes + 1;
      endcase
    end
  end

  // unused inputs of the model
  logic unused;
  assign unused = interrupt ^ sleep;
endmodule
