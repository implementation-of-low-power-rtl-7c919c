// mc_decoder: receiver side of the multi-coded bus.
//
// Splits the W+2-bit bus word into its 2-bit code (top bits) and coded data
// and undoes the coding. Every coding is an involution, so a coding unit
// driven with the received code restores the original word. Placed at each
// slave's write-data input. Combinational, no latency.
module mc_decoder
  import mc_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W+1:0] bus_i,
  output logic [W-1:0] data_o
);

  mc_code_e code;
  assign code = mc_code_e'(bus_i[W+1:W]);

  mc_code_unit #(.W(W)) u_undo (.code_i(code), .data_i(bus_i[W-1:0]), .data_o(data_o));

endmodule
