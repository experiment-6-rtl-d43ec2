// io_port: one bidirectional I/O port, its output latch (PORTx) and its data
// direction register (TRISx).
//
// WIDTH pins (5 for PORTA, 8 for PORTB). TRIS bit = 1 makes the pin an input
// (driver off), 0 makes it an output driven from the latch; TRIS resets to all
// ones, so every pin starts as an input. The port latch is loaded by a PORTx
// write, the direction register by a TRISx write, both at the rising clock
// edge. Reading PORTx returns the level on the pins: the external level for an
// input pin, the latch for an output pin. Reading TRISx returns the direction
// register. The latch is undefined after a PIC16F84A power-on reset; here it is
// cleared.
//
// The pins are split into pin_in (level from outside), pin_out and pin_oe
// (driver value and enable) instead of one inout bus; a pad wrapper outside
// the block joins them: pin = pin_oe ? pin_out : 'z.
module io_port #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clock,
  input  logic             reset,      // synchronous, active high
  input  logic             we_port,    // PORTx write strobe
  input  logic             we_tris,    // TRISx write strobe
  input  logic [WIDTH-1:0] din,
  input  logic [WIDTH-1:0] pin_in,     // level driven from outside
  output logic [WIDTH-1:0] pin_out,    // output latch
  output logic [WIDTH-1:0] pin_oe,     // 1 = pin driven by pin_out
  output logic [WIDTH-1:0] port_q,     // PORTx read value
  output logic [WIDTH-1:0] tris_q      // TRISx read value
);

  logic [WIDTH-1:0] latch;

  always_ff @(posedge clock)
    if (reset) begin
      latch  <= '0;
      tris_q <= '1;
    end else begin
      if (we_port) latch  <= din;
      if (we_tris) tris_q <= din;
    end

  always_comb begin
    pin_out = latch;
    pin_oe  = ~tris_q;
    port_q  = (tris_q & pin_in) | (~tris_q & latch);
  end

endmodule
