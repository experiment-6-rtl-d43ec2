// gprs: the 68 x 8 general purpose register file (SRAM) of the data memory.
//
// The array holds DEPTH bytes for file addresses BASE .. BASE+DEPTH-1
// (0Ch-4Fh by default); the address is offset by BASE to index it, so no
// storage is spent on the SFR addresses below it. Reads are asynchronous: dout
// follows addr combinationally. A write takes place at the rising clock edge
// when wt is high and addr lies in the window; outside the window dout is 0
// and writes are ignored. The window check repeats the decoder's, so the block
// is safe on its own. The contents are not reset, as in a real SRAM.
module gprs
  import dm_pkg::*;
#(
  parameter int unsigned DEPTH = GPR_DEPTH,            // 68 registers
  parameter int unsigned BASE  = int'(A_GPR_FIRST)     // first address, 0Ch
) (
  input  logic  clock,
  input  logic  wt,       // write enable, sampled at posedge clock
  input  addr_t addr,     // 7-bit file address
  input  data_t din,
  output data_t dout
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  data_t            mem [DEPTH];
  logic             in_range;
  logic [IDX_W-1:0] idx;

  always_comb begin
    in_range = (int'(addr) >= BASE) && (int'(addr) < BASE + DEPTH);
    idx      = IDX_W'(int'(addr) - BASE);
    dout     = in_range ? mem[idx] : '0;
  end

  always_ff @(posedge clock)
    if (wt && in_range)
      mem[idx] <= din;

endmodule
