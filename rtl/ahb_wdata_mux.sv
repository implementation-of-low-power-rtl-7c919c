// ahb_wdata_mux: write data multiplexer of the AHB.
//
// Passes HWDATA of the master that owns the data phase (HMASTER delayed by one
// HREADY edge, from the arbiter) towards the slaves. In this system its output
// feeds the multi-coding encoder. Combinational.
module ahb_wdata_mux
  import ahb_pkg::*;
#(
  parameter int unsigned N_MASTERS = 3,
  parameter int unsigned W         = 32
) (
  input  logic [W-1:0]         hwdata_i [N_MASTERS],
  input  logic [HMASTER_W-1:0] hmaster_data_i,
  output logic [W-1:0]         hwdata_o
);

  always_comb begin
    hwdata_o = '0;
    for (int unsigned m = 0; m < N_MASTERS; m++)
      if (hmaster_data_i == HMASTER_W'(m)) hwdata_o = hwdata_i[m];
  end

endmodule
