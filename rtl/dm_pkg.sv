// dm_pkg: widths, register addresses and the register-select type shared by
// the PIC16F84A-style data memory.
//
// The data memory is addressed by a 7-bit file address plus the bank bit RP0
// (STATUS<5>). Each bank runs from 00h to 4Fh: 00h-0Bh are special function
// registers, 0Ch-4Fh are 68 general purpose registers shared by both banks.
// The addresses below follow the memory map of the PIC16F84A. The bundling of
// the decoder outputs into one packed struct is this design's own choice.
package dm_pkg;

  localparam int unsigned ADDR_W = 7;   // file address width (instruction field)
  localparam int unsigned DATA_W = 8;   // register width

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // Special function register addresses (bank offset; bank 1 adds 80h)
  localparam addr_t A_INDF   = 7'h00;   // indirect access through FSR
  localparam addr_t A_STATUS = 7'h03;   // both banks
  localparam addr_t A_FSR    = 7'h04;   // both banks
  localparam addr_t A_PORTA  = 7'h05;   // PORTA in bank 0, TRISA in bank 1
  localparam addr_t A_PORTB  = 7'h06;   // PORTB in bank 0, TRISB in bank 1

  // General purpose register window, identical in both banks
  localparam addr_t A_GPR_FIRST = 7'h0C;
  localparam addr_t A_GPR_LAST  = 7'h4F;
  localparam int unsigned GPR_DEPTH = int'(A_GPR_LAST) - int'(A_GPR_FIRST) + 1; // 68

  // Port widths
  localparam int unsigned PORTA_W = 5;  // RA4..RA0
  localparam int unsigned PORTB_W = 8;  // RB7..RB0

  // One-hot register select produced by the address decoder. At most one bit
  // is set; none is set for INDF, unimplemented locations and 50h-7Fh.
  typedef struct packed {
    logic gpr;
    logic status;
    logic fsr;
    logic porta;
    logic trisa;
    logic portb;
    logic trisb;
  } sel_t;

  localparam int unsigned NUM_SRC = $bits(sel_t);   // sources on the read bus

endpackage
