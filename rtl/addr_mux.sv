// addr_mux: direct / indirect address selection.
//
// A zero detector looks at the 7-bit address from the instruction. Address 00h
// is INDF, which is not a register: an access to it is redirected to the
// register whose address is held in FSR. The detector drives the select of a
// 2:1 multiplexer, input 0 being the instruction address and input 1 the low
// seven bits of FSR. This is the "0?" block and multiplexer of the data-memory
// block diagram. Only FSR<6:0> are used; the bank of an indirect access is
// still RP0, as in the block diagram, which routes only RP0 to the decoder
// (the PIC16F84A itself would take the bank from FSR<7>).
//
// Purely combinational; the effective address is valid one mux delay after
// addr or fsr change.
module addr_mux
  import dm_pkg::*;
(
  input  addr_t addr,       // direct address from the instruction
  input  addr_t fsr,        // FSR<6:0>
  output addr_t eff_addr    // address seen by the decoder and the GPRs
);

  logic indirect;           // output of the zero detector: INDF addressed

  always_comb begin
    indirect = (addr == A_INDF);
    eff_addr = indirect ? fsr : addr;
  end

endmodule
