// mc_comparator: picks the candidate coding with the smaller Hamming distance.
//
// Each candidate is a coded word with its code and its Hamming distance to
// the previous bus word. The candidate with the smaller distance is passed
// on; on a tie candidate a wins, which, with a wired to the lower code,
// makes the whole coder prefer the lowest code among equal distances (the tie
// rule is this design's choice). Used both inside each group and as the final
// comparator between the two groups. Combinational.
module mc_comparator
  import mc_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter int unsigned HD_W = $clog2(W + 1)
) (
  input  mc_code_e        a_code_i,
  input  logic [W-1:0]    a_word_i,
  input  logic [HD_W-1:0] a_hd_i,
  input  mc_code_e        b_code_i,
  input  logic [W-1:0]    b_word_i,
  input  logic [HD_W-1:0] b_hd_i,
  output mc_code_e        code_o,
  output logic [W-1:0]    word_o,
  output logic [HD_W-1:0] hd_o
);

  logic pick_b;
  assign pick_b = b_hd_i < a_hd_i;

  assign code_o = pick_b ? b_code_i : a_code_i;
  assign word_o = pick_b ? b_word_i : a_word_i;
  assign hd_o   = pick_b ? b_hd_i   : a_hd_i;

endmodule
