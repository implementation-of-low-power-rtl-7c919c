// tb_mc_comparator: checks that the smaller distance wins, that a tie goes to
// input a, and the minimum of the four distances of the 10-bit example
// (7, 8, 7, 6: invert odd wins) through a two-level tree as in the encoder.
module tb_mc_comparator;
  import mc_pkg::*;

  int checks = 0, failures = 0;

  mc_code_e   ac, bc, oc, c1, c2, cf;
  logic [7:0] aw, bw, ow, w1, w2, wf;
  logic [3:0] ah, bh, oh, h1, h2, hf;
  logic [3:0] e0, e1, e2, e3;

  mc_comparator #(.W(8), .HD_W(4)) u_dut (
    .a_code_i(ac), .a_word_i(aw), .a_hd_i(ah), .b_code_i(bc), .b_word_i(bw), .b_hd_i(bh),
    .code_o(oc), .word_o(ow), .hd_o(oh));

  // two-level tree on the example distances
  mc_comparator #(.W(8), .HD_W(4)) u_g1 (
    .a_code_i(CODE_INVERT), .a_word_i(8'h11), .a_hd_i(e0),
    .b_code_i(CODE_SWAP),   .b_word_i(8'h22), .b_hd_i(e1),
    .code_o(c1), .word_o(w1), .hd_o(h1));
  mc_comparator #(.W(8), .HD_W(4)) u_g2 (
    .a_code_i(CODE_INV_EVEN), .a_word_i(8'h33), .a_hd_i(e2),
    .b_code_i(CODE_INV_ODD),  .b_word_i(8'h44), .b_hd_i(e3),
    .code_o(c2), .word_o(w2), .hd_o(h2));
  mc_comparator #(.W(8), .HD_W(4)) u_fin (
    .a_code_i(c1), .a_word_i(w1), .a_hd_i(h1), .b_code_i(c2), .b_word_i(w2), .b_hd_i(h2),
    .code_o(cf), .word_o(wf), .hd_o(hf));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e0 = 7; e1 = 8; e2 = 7; e3 = 6; #1;
    check("example code", int'(cf), int'(CODE_INV_ODD));
    check("example hd", int'(hf), 6);
    check("example word", int'(wf), 'h44);
    e3 = 7; #1;
    check("tie goes to lowest code", int'(cf), int'(CODE_INVERT));
    for (int n = 0; n < 400; n++) begin
      ac = mc_code_e'($urandom_range(3)); bc = mc_code_e'($urandom_range(3));
      aw = 8'($urandom); bw = 8'($urandom);
      ah = 4'($urandom_range(8)); bh = (n % 5 == 0) ? ah : 4'($urandom_range(8));
      #1;
      if (bh < ah) begin
        check("b code", int'(oc), int'(bc)); check("b word", int'(ow), int'(bw)); check("b hd", int'(oh), int'(bh));
      end else begin
        check("a code", int'(oc), int'(ac)); check("a word", int'(ow), int'(aw)); check("a hd", int'(oh), int'(ah));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
