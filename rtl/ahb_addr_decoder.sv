// ahb_addr_decoder: central AHB address decoder.
//
// Decodes the address of the current address phase into one select line per
// slave. The memory map is this design's own: the address space is cut into
// N_SLAVES equal regions by the top address bits, so with four slaves
// HADDR[31:30] picks the slave (slave 0 at 0x0000_0000, slave 1 at
// 0x4000_0000, slave 2 at 0x8000_0000, slave 3 at 0xC000_0000). The map is
// full, so no default slave is needed. Combinational.
module ahb_addr_decoder
  import ahb_pkg::*;
#(
  parameter int unsigned N_SLAVES = 4
) (
  input  logic [ADDR_W-1:0]   haddr_i,
  output logic [N_SLAVES-1:0] hsel_o
);

  localparam int unsigned SEL_W = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1;

  logic [SEL_W-1:0] region;
  assign region = haddr_i[ADDR_W-1 -: SEL_W];

  always_comb begin
    hsel_o = '0;
    for (int unsigned s = 0; s < N_SLAVES; s++)
      if (region == SEL_W'(s)) hsel_o[s] = 1'b1;
  end

endmodule
