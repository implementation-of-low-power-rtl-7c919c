// ahb_rdata_mux: read data and response multiplexer of the AHB.
//
// Remembers, at every edge where HREADY is high, which slave was selected in
// the address phase; during the following data phase it routes that slave's
// HRDATA, HREADYOUT and HRESP back to all masters (and HREADY to all slaves).
// The register resets (hresetn_i, active low) to slave 0, which is ready while
// it has no transfer. Select register: one cycle; data path: combinational.
module ahb_rdata_mux
  import ahb_pkg::*;
#(
  parameter int unsigned N_SLAVES = 4,
  parameter int unsigned W        = 32
) (
  input  logic                hclk_i,
  input  logic                hresetn_i,
  input  logic [N_SLAVES-1:0] hsel_i,
  input  logic [W-1:0]        hrdata_i    [N_SLAVES],
  input  logic                hreadyout_i [N_SLAVES],
  input  hresp_e              hresp_i     [N_SLAVES],
  output logic [W-1:0]        hrdata_o,
  output logic                hready_o,
  output hresp_e              hresp_o
);

  logic [N_SLAVES-1:0] sel_q;

  always_ff @(posedge hclk_i or negedge hresetn_i) begin
    if (!hresetn_i)    sel_q <= N_SLAVES'(1);
    else if (hready_o) sel_q <= hsel_i;
  end

  always_comb begin
    hrdata_o = '0;
    hready_o = 1'b1;
    hresp_o  = HRESP_OKAY;
    for (int unsigned s = 0; s < N_SLAVES; s++)
      if (sel_q[s]) begin
        hrdata_o = hrdata_i[s];
        hready_o = hreadyout_i[s];
        hresp_o  = hresp_i[s];
      end
  end

endmodule
