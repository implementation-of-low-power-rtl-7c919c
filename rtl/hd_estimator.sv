// hd_estimator: Hamming distance between a coded word and the word the bus
// held in the previous transfer, i.e. the number of bus lines that would
// toggle if coded_i were driven next.
//
// The differing bits (coded_i ^ prev_i) are counted with 1-bit full adders
// (mc_pkg::full_add), as the counter is described as being built. The
// counter here is a chain: each stage adds two difference bits into a running
// HD_W-bit total through a ripple of HD_W full adders, the two bits entering
// the lowest cell as its second operand and its carry-in. The chain structure
// is this design's choice; the paper only says that full adders are used.
// Combinational.
module hd_estimator
  import mc_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter int unsigned HD_W = $clog2(W + 1)
) (
  input  logic [W-1:0]    coded_i,
  input  logic [W-1:0]    prev_i,
  output logic [HD_W-1:0] hd_o
);

  logic [W-1:0]    diff;
  logic [HD_W-1:0] acc;
  logic            carry;
  logic [1:0]      fa;

  assign diff = coded_i ^ prev_i;

  always_comb begin
    acc = '0;
    for (int unsigned i = 0; i < W; i += 2) begin
      carry = diff[i];
      for (int unsigned j = 0; j < HD_W; j++) begin
        fa     = full_add(acc[j], (j == 0 && i + 1 < W) ? diff[i+1] : 1'b0, carry);
        acc[j] = fa[0];
        carry  = fa[1];
      end
    end
  end

  assign hd_o = acc;

endmodule
