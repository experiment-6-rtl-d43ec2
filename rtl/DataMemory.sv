// DataMemory: the data memory of a PIC16F84A-style microcontroller.
//
// The memory is a banked register file. The 7-bit address of an instruction
// together with the bank bit RP0 (STATUS<5>) selects one of:
//   03h/83h STATUS   04h/84h FSR   05h PORTA / 85h TRISA   06h PORTB / 86h TRISB
//   0Ch-4Fh and 8Ch-CFh: 68 general purpose registers, the same in both banks.
// Address 00h (INDF) is indirect: the access goes to the register whose
// address is in FSR. All other locations read as 0 and ignore writes.
//
// Structure (following the block diagram of the data memory): a zero detector
// and 2:1 multiplexer choose Addr or FSR<6:0> (addr_mux); a decoder turns the
// chosen address and RP0 into register selects (addr_decoder); the GPR array
// (gprs), FSR (fsr_reg), STATUS (status_reg) and two I/O ports with their
// direction registers (io_port) sit on the common DataIn bus; their outputs
// are gated onto DataOut by the selects (out_bus).
//
// Timing: reads are combinational, DataOut follows Addr, DataWrite-independent.
// A write (DataWrite = 1) and the ALU flag updates (C_en, DC_en, Z_en) take
// effect at the rising edge of Clock. Reset is synchronous and active high; it
// sets RP0 = 0 and TRISA/TRISB to all ones as on a PIC16F84A power-on reset,
// and also clears FSR, the port latches and Z/DC/C, which the PIC leaves
// undefined. The GPR contents are not reset.
//
// Interface: the port names follow the data-memory module of the lab; the
// bidirectional PortA/PortB pins are split into an input level, a driven value
// and a driver enable per pin (pin = PortX_oe ? PortX_out : 'z), so that the
// module has no tri-state nets.
module DataMemory
  import dm_pkg::*;
(
  input  logic               Clock,
  input  logic               Reset,
  // ALU flag interface
  input  logic               C_in, DC_in, Z_in,
  input  logic               C_en, DC_en, Z_en,
  output logic               C,
  // data access
  input  addr_t              Addr,
  input  data_t              DataIn,
  input  logic               DataWrite,
  output data_t              DataOut,
  // I/O pins
  input  logic [PORTA_W-1:0] PortA_in,
  output logic [PORTA_W-1:0] PortA_out,
  output logic [PORTA_W-1:0] PortA_oe,
  input  logic [PORTB_W-1:0] PortB_in,
  output logic [PORTB_W-1:0] PortB_out,
  output logic [PORTB_W-1:0] PortB_oe
);

  addr_t eff_addr;
  logic  rp0;
  sel_t  sel, we;
  data_t fsr_q, status_q, gpr_q;
  logic [PORTA_W-1:0] porta_q, trisa_q;
  logic [PORTB_W-1:0] portb_q, trisb_q;

  addr_mux u_addr_mux (
    .addr(Addr), .fsr(fsr_q[ADDR_W-1:0]), .eff_addr(eff_addr)
  );

  addr_decoder u_decoder (
    .addr(eff_addr), .rp0(rp0), .sel(sel)
  );

  // Write strobes: the selected register takes DataIn when DataWrite is high
  assign we = DataWrite ? sel : '0;

  gprs u_gprs (
    .clock(Clock), .wt(we.gpr), .addr(eff_addr), .din(DataIn), .dout(gpr_q)
  );

  fsr_reg u_fsr (
    .clock(Clock), .reset(Reset), .we(we.fsr), .din(DataIn), .q(fsr_q)
  );

  status_reg u_status (
    .clock(Clock), .reset(Reset), .we(we.status), .din(DataIn),
    .c_in(C_in), .dc_in(DC_in), .z_in(Z_in),
    .c_en(C_en), .dc_en(DC_en), .z_en(Z_en),
    .q(status_q), .rp0(rp0), .c(C)
  );

  io_port #(.WIDTH(PORTA_W)) u_porta (
    .clock(Clock), .reset(Reset), .we_port(we.porta), .we_tris(we.trisa),
    .din(DataIn[PORTA_W-1:0]), .pin_in(PortA_in),
    .pin_out(PortA_out), .pin_oe(PortA_oe), .port_q(porta_q), .tris_q(trisa_q)
  );

  io_port #(.WIDTH(PORTB_W)) u_portb (
    .clock(Clock), .reset(Reset), .we_port(we.portb), .we_tris(we.trisb),
    .din(DataIn[PORTB_W-1:0]), .pin_in(PortB_in),
    .pin_out(PortB_out), .pin_oe(PortB_oe), .port_q(portb_q), .tris_q(trisb_q)
  );

  // Read bus: sources in the bit order of sel_t (gpr first, trisb last)
  logic [NUM_SRC-1:0][DATA_W-1:0] src;
  always_comb begin
    src    = '0;
    src[6] = gpr_q;
    src[5] = status_q;
    src[4] = fsr_q;
    src[3] = data_t'(porta_q);
    src[2] = data_t'(trisa_q);
    src[1] = data_t'(portb_q);
    src[0] = data_t'(trisb_q);
  end

  out_bus #(.N(NUM_SRC), .W(DATA_W)) u_out_bus (
    .en(sel), .d(src), .q(DataOut)
  );

endmodule
