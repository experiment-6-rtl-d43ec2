// out_bus: the read bus that joins the register outputs onto DataOut.
//
// Each source has a buffer with an enable, as in the data-memory block
// diagram, where every register drives the common DataOut bus through a
// tri-state buffer. Since on-chip tri-state nets are not available in most
// flows, each buffer is modelled as an AND gate on its enable and the bus as an
// OR of all buffers: with at most one enable high this gives the same value as
// the tri-state bus, and with none high the bus reads 0 (an unimplemented
// location reads as '0'). An assertion flags two enables high at once, which
// on a tri-state bus would be a drive fight.
//
// Combinational.
module out_bus #(
  parameter int unsigned N = 7,   // number of sources
  parameter int unsigned W = 8    // bus width
) (
  input  logic [N-1:0]        en,   // buffer enables, at most one high
  input  logic [N-1:0][W-1:0] d,    // source values
  output logic [W-1:0]        q
);

  always_comb begin
    q = '0;
    for (int i = 0; i < N; i++)
      q |= d[i] & {W{en[i]}};
  end

  // Bus-contention rule of the tri-state bus
  always_comb
    assert ($onehot0(en) || $isunknown(en)) else $error("out_bus: %b drive the bus at once", en);

endmodule
