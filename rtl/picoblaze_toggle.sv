// picoblaze_toggle: top of the PicoBlaze-based embedded control SoC.
//
// A PC sends the wanted duty cycle of a DC fan over a serial line. The UART
// receives it; the byte is held in a register on the processor's in_port.
// The processor program (in program_rom) reads it with INPUT and writes it
// back with OUTPUT; a second register, loaded by write_strobe, holds
// out_port as the duty cycle of the PWM generator, whose output drives the
// fan. The UART echoes every received byte on tx.
//
// The wiring follows the SoC's RTL schematic:
//   UART      : arst_n = key, clk = iClk, rx = rx1, led(7:0) -> in_port register
//   in_port register (fde): D = UART led, CE = read_strobe, Q -> in_port
//   program memory (LED block): address, enable = bram_enable -> instruction
//   duty register (fde): D = out_port, CE = write_strobe, Q -> PWM dutycycle
//   PWM (block d): reset = key, pwm -> oLed0
//   processor reset = NOT Reset (the schematic's inverter kcpsm6_reset1)
// The in_port register is loaded by read_strobe, so an INPUT returns the byte
// that was in the UART at the previous INPUT; the program reads in a loop,
// so this only delays a new duty cycle by one loop pass. No port_id decoding
// appears in the schematic: every OUTPUT writes the duty register and every
// INPUT reads the UART byte. key and Reset are active low.
//
// The KCPSM6 processor itself is not part of this RTL: its pins are ports
// of this module (kcpsm6_* outputs drive its inputs, the remaining inputs
// come from its outputs). Its interrupt and sleep inputs, and its port_id,
// k_write_strobe and interrupt_ack outputs, are left unconnected in the
// schematic and are not brought out. The UART's rx_valid/frame_err and the
// PWM's period_start are observation outputs added by this design.
module picoblaze_toggle
  import soc_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 50_000_000,
  parameter int unsigned BAUD         = 9600,
  parameter int unsigned PWM_PRESCALE = 8,
  parameter int unsigned ROM_DEPTH    = 4096,
  parameter string       ROM_FILE     = "rtl/firmware.hex"
) (
  // board pins
  input  logic   iClk,
  input  logic   key,          // active-low reset of UART and PWM
  input  logic   Reset,        // active-low processor reset
  input  logic   rx1,
  output logic   oLed0,        // PWM output to the fan driver
  output logic   tx,
  // processor connections
  output logic   kcpsm6_reset,
  output instr_t instruction,
  output data_t  in_port,
  input  pc_t    address,
  input  logic   bram_enable,
  input  data_t  out_port,
  input  logic   write_strobe,
  input  logic   read_strobe,
  // observation
  output data_t  dutycycle,
  output logic   rx_valid,
  output logic   frame_err,
  output logic   pwm_period_start
);

  data_t uart_byte;

  assign kcpsm6_reset = ~Reset;

  uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk      (iClk),
    .arst_n   (key),
    .rx       (rx1),
    .led      (uart_byte),
    .tx       (tx),
    .rx_valid (rx_valid),
    .frame_err(frame_err)
  );

  fde #(.WIDTH(DATA_W)) u_in_reg (
    .clk(iClk),
    .ce (read_strobe),
    .d  (uart_byte),
    .q  (in_port)
  );

  program_rom #(.DEPTH(ROM_DEPTH), .INIT_FILE(ROM_FILE)) u_led (
    .clk        (iClk),
    .enable     (bram_enable),
    .address    (address),
    .instruction(instruction)
  );

  fde #(.WIDTH(DATA_W)) u_duty_reg (
    .clk(iClk),
    .ce (write_strobe),
    .d  (out_port),
    .q  (dutycycle)
  );

  pwm_unit #(.PRESCALE(PWM_PRESCALE)) u_d (
    .clk         (iClk),
    .reset_n     (key),
    .dutycycle   (dutycycle),
    .pwm         (oLed0),
    .period_start(pwm_period_start)
  );

  // the processor never reads and writes a port in the same cycle
  a_strobes_exclusive: assert property (@(posedge iClk) disable iff (kcpsm6_reset)
    !(read_strobe && write_strobe));

endmodule
