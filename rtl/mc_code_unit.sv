// mc_code_unit: one of the four codings of the multi-coding bus scheme.
//
// code_i selects the coding applied to data_i:
//   CODE_INVERT   every bit inverted          (e.g. 01101011100 -> 10010100011)
//   CODE_SWAP     bits 2k and 2k+1 exchanged  (e.g. 011010111000 -> 100101110100)
//   CODE_INV_EVEN bits 0, 2, 4, ... inverted  (e.g. 001101011100 -> 011000001001)
//   CODE_INV_ODD  bits 1, 3, 5, ... inverted  (e.g. 001101011100 -> 100111110110)
// Bit 0 is the least significant bit; with that numbering the even/odd codings
// reproduce the worked examples above. Every coding is its own inverse, so the
// same unit, driven with the received code, serves as the decoder. For an odd
// W the top bit has no partner and the swap coding leaves it unchanged (a
// choice of this design). Purely combinational, no latency. The four codings
// and the code labels follow the published scheme.
module mc_code_unit
  import mc_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  mc_code_e       code_i,
  input  logic [W-1:0]   data_i,
  output logic [W-1:0]   data_o
);

  logic [W-1:0] even_mask;  // ones at bit positions 0, 2, 4, ...
  logic [W-1:0] swapped;

  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      even_mask[i] = (i % 2 == 0);
      if (i % 2 == 0) swapped[i] = (i + 1 < W) ? data_i[i+1] : data_i[i];
      else            swapped[i] = data_i[i-1];
    end
  end

  always_comb begin
    unique case (code_i)
      CODE_INVERT:   data_o = ~data_i;
      CODE_SWAP:     data_o = swapped;
      CODE_INV_EVEN: data_o = data_i ^ even_mask;
      CODE_INV_ODD:  data_o = data_i ^ ~even_mask;
      default:       data_o = data_i;
    endcase
  end

endmodule
