// status_reg: the STATUS special function register (03h / 83h).
//
// Implemented bits: RP0 (bit 5, bank select), Z (bit 2), DC (bit 1) and C
// (bit 0). Bits 7, 6, 4 and 3 are not implemented and read as 0.
// At the rising clock edge:
//   * reset clears the register (RP0 = 0 as on a PIC16F84A power-on reset;
//     Z, DC and C are undefined there and are cleared here);
//   * a flag whose enable (c_en, dc_en, z_en) is high takes its new value
//     from the ALU input (c_in, dc_in, z_in);
//   * otherwise, when the register is written (we), the bit takes the data
//     bus value.
// A flag enable therefore overrides a data write of the same bit, which is
// how the PIC16F84A behaves when STATUS is the destination of an instruction
// that also sets flags. RP0 and C are brought out for the bank decoder and the
// ALU carry input; q is the value read back on the data bus.
module status_reg
  import dm_pkg::*;
(
  input  logic  clock,
  input  logic  reset,   // synchronous, active high
  input  logic  we,      // data-bus write strobe
  input  data_t din,
  input  logic  c_in,  dc_in,  z_in,   // new flag values from the ALU
  input  logic  c_en,  dc_en,  z_en,   // flag update enables
  output data_t q,       // read-back value
  output logic  rp0,
  output logic  c
);

  localparam int unsigned B_RP0 = 5, B_Z = 2, B_DC = 1, B_C = 0;

  logic z, dc;

  always_ff @(posedge clock) begin
    if (reset) begin
      rp0 <= 1'b0;
      z   <= 1'b0;
      dc  <= 1'b0;
      c   <= 1'b0;
    end else begin
      if (we)         rp0 <= din[B_RP0];
      if (z_en)       z   <= z_in;
      else if (we)    z   <= din[B_Z];
      if (dc_en)      dc  <= dc_in;
      else if (we)    dc  <= din[B_DC];
      if (c_en)       c   <= c_in;
      else if (we)    c   <= din[B_C];
    end
  end

  always_comb begin
    q        = '0;
    q[B_RP0] = rp0;
    q[B_Z]   = z;
    q[B_DC]  = dc;
    q[B_C]   = c;
  end

endmodule
