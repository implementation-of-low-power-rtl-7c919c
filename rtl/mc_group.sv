// mc_group: one coding group of the multi-coding encoder.
//
// A group holds two coding units, fixed by CODE_A and CODE_B (group 1:
// invert data and swap data; group 2: invert even and invert odd). Each coded
// word goes to a Hamming-distance estimator against the previous bus word
// prev_i, and a comparator passes on the better of the two together with its
// code and distance. Combinational.
module mc_group
  import mc_pkg::*;
#(
  parameter int unsigned W      = 32,
  parameter int unsigned HD_W   = $clog2(W + 1),
  parameter mc_code_e    CODE_A = CODE_INVERT,
  parameter mc_code_e    CODE_B = CODE_SWAP
) (
  input  logic [W-1:0]    data_i,
  input  logic [W-1:0]    prev_i,
  output mc_code_e        code_o,
  output logic [W-1:0]    word_o,
  output logic [HD_W-1:0] hd_o
);

  logic [W-1:0]    word_a, word_b;
  logic [HD_W-1:0] hd_a, hd_b;

  mc_code_unit #(.W(W)) u_code_a (.code_i(CODE_A), .data_i(data_i), .data_o(word_a));
  mc_code_unit #(.W(W)) u_code_b (.code_i(CODE_B), .data_i(data_i), .data_o(word_b));

  hd_estimator #(.W(W), .HD_W(HD_W)) u_hd_a (.coded_i(word_a), .prev_i(prev_i), .hd_o(hd_a));
  hd_estimator #(.W(W), .HD_W(HD_W)) u_hd_b (.coded_i(word_b), .prev_i(prev_i), .hd_o(hd_b));

  mc_comparator #(.W(W), .HD_W(HD_W)) u_cmp (
    .a_code_i (CODE_A), .a_word_i (word_a), .a_hd_i (hd_a),
    .b_code_i (CODE_B), .b_word_i (word_b), .b_hd_i (hd_b),
    .code_o   (code_o), .word_o   (word_o), .hd_o   (hd_o)
  );

endmodule
