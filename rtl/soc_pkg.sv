// soc_pkg: widths shared by the blocks of the PicoBlaze-based control SoC.
//
// The processor bus of this SoC is the one of the KCPSM6 core: an 18-bit
// instruction word, a 12-bit program address (4K instructions), 8-bit data
// and an 8-bit port address. These numbers follow the description of the
// core; the packed types below are only a naming convenience.
package soc_pkg;

  localparam int unsigned INSTR_W   = 18;  // instruction word
  localparam int unsigned PC_W      = 12;  // program address, 4K instructions
  localparam int unsigned DATA_W    = 8;   // in_port / out_port width

  typedef logic [INSTR_W-1:0]   instr_t;
  typedef logic [PC_W-1:0]      pc_t;
  typedef logic [DATA_W-1:0]    data_t;

endpackage
