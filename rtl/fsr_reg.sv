// fsr_reg: File Select Register, the 8-bit pointer for indirect addressing.
//
// Loaded from the data bus at the rising clock edge when it is selected
// (04h or 84h) and written. Its value is always visible on q, which feeds the
// indirect address multiplexer, and is read back through the data bus.
// The power-on value of FSR is undefined on the PIC16F84A; this design clears
// it with the synchronous, active-high reset so that simulation is
// deterministic.
module fsr_reg
  import dm_pkg::*;
(
  input  logic  clock,
  input  logic  reset,   // synchronous, active high
  input  logic  we,      // write strobe, sampled at posedge clock
  input  data_t din,
  output data_t q
);

  always_ff @(posedge clock)
    if (reset)   q <= '0;
    else if (we) q <= din;

endmodule
