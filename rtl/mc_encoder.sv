// mc_encoder: multi-coding low-transition encoder for a W-bit bus.
//
// Every word data_i is coded in four ways (invert, swap adjacent bits, invert
// even bits, invert odd bits), split into two groups of two. In each group
// Hamming-distance estimators compare both coded words with the word the bus
// carried in the previous cycle, and a comparator keeps the closer one; a
// final comparator picks the better group. The chosen word goes out with its
// 2-bit code on the top bits: bus_o = {code, word}, W+2 bits (34 for the
// 32-bit AHB write data). hd_o is the number of data lines that toggle.
//
// Timing: bus_o and hd_o are combinational from data_i and the previous-word
// register. That register loads the data part of bus_o on every rising clock
// edge and is cleared by rst_ni (active low, asynchronous). Loading every
// cycle models the wires exactly, and because picking the lowest code among
// equal distances makes the coding idempotent, a word held on data_i for
// several cycles (AHB wait states) keeps the same bus value. Only the data
// lines are counted in the distance; the two code lines are not. Because the
// invert-even and invert-odd candidates toggle complementary line sets, no
// word ever toggles more than W/2 data lines (asserted below).
//
// The four codings, their grouping and the minimum-distance choice follow the
// published scheme; the register, its reset value, the tie rule and the
// choice not to count the code lines are this design's own.
module mc_encoder
  import mc_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter int unsigned HD_W = $clog2(W + 1)
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic [W-1:0]    data_i,
  output logic [W+1:0]    bus_o,
  output logic [HD_W-1:0] hd_o
);

  logic [W-1:0]    prev_q;
  mc_code_e        g1_code, g2_code, code;
  logic [W-1:0]    g1_word, g2_word, word;
  logic [HD_W-1:0] g1_hd, g2_hd;

  mc_group #(.W(W), .HD_W(HD_W), .CODE_A(CODE_INVERT), .CODE_B(CODE_SWAP)) u_group1 (
    .data_i (data_i), .prev_i (prev_q),
    .code_o (g1_code), .word_o (g1_word), .hd_o (g1_hd)
  );

  mc_group #(.W(W), .HD_W(HD_W), .CODE_A(CODE_INV_EVEN), .CODE_B(CODE_INV_ODD)) u_group2 (
    .data_i (data_i), .prev_i (prev_q),
    .code_o (g2_code), .word_o (g2_word), .hd_o (g2_hd)
  );

  mc_comparator #(.W(W), .HD_W(HD_W)) u_final (
    .a_code_i (g1_code), .a_word_i (g1_word), .a_hd_i (g1_hd),
    .b_code_i (g2_code), .b_word_i (g2_word), .b_hd_i (g2_hd),
    .code_o   (code),    .word_o   (word),    .hd_o   (hd_o)
  );

  assign bus_o = {code, word};

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) prev_q <= '0;
    else         prev_q <= word;
  end

  // Invert-even and invert-odd toggle complementary sets of lines, so their
  // distances add up to W: the chosen coding never toggles more than W/2
  // data lines.
  a_half_bound: assert property (@(posedge clk_i) disable iff (!rst_ni) 32'(hd_o) <= W / 2);

endmodule
