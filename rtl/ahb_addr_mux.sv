// ahb_addr_mux: address and control multiplexer of the AHB.
//
// Passes the address and control (HADDR, HTRANS, HWRITE, HSIZE, HBURST) of the
// master that owns the address phase, as given by HMASTER, to all slaves and
// to the address decoder. An out-of-range HMASTER yields an IDLE transfer.
// Combinational.
module ahb_addr_mux
  import ahb_pkg::*;
#(
  parameter int unsigned N_MASTERS = 3
) (
  input  ahb_ctrl_t            ctrl_i [N_MASTERS],
  input  logic [HMASTER_W-1:0] hmaster_i,
  output ahb_ctrl_t            ctrl_o
);

  always_comb begin
    ctrl_o        = '0;
    ctrl_o.htrans = HTRANS_IDLE;
    for (int unsigned m = 0; m < N_MASTERS; m++)
      if (hmaster_i == HMASTER_W'(m)) ctrl_o = ctrl_i[m];
  end

endmodule
