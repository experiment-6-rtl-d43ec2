// addr_decoder: register select decoder of the data memory.
//
// Takes the effective 7-bit address and the bank bit RP0 and raises at most one
// select line. 0Ch-4Fh select the general purpose registers in either bank
// (bank 1 GPR addresses mirror bank 0). STATUS (03h) and FSR (04h) are seen
// in both banks. 05h/06h select PORTA/PORTB in bank 0 and TRISA/TRISB in bank 1.
// 00h (INDF, which only reaches here when FSR points at 00h), 01h, 02h,
// 07h-0Bh and 50h-7Fh select nothing, so they read as 0 and ignore writes.
// 01h, 02h and 08h-0Bh hold TMR0, PCL, EEPROM and interrupt registers in a full
// PIC16F84A; they are outside this data memory.
//
// Combinational, no clock.
module addr_decoder
  import dm_pkg::*;
(
  input  addr_t addr,   // effective address from addr_mux
  input  logic  rp0,    // bank select, STATUS<5>
  output sel_t  sel     // one-hot (or all-zero) register select
);

  always_comb begin
    sel        = '0;
    sel.gpr    = (addr >= A_GPR_FIRST) && (addr <= A_GPR_LAST);
    sel.status = (addr == A_STATUS);
    sel.fsr    = (addr == A_FSR);
    sel.porta  = (addr == A_PORTA) && !rp0;
    sel.trisa  = (addr == A_PORTA) &&  rp0;
    sel.portb  = (addr == A_PORTB) && !rp0;
    sel.trisb  = (addr == A_PORTB) &&  rp0;
  end

endmodule
