// tb_mc_group: checks both coding groups (invert/swap and invert even/invert
// odd) on random 32-bit words against the reference model: the chosen code,
// the coded word and its distance to the previous bus word.
module tb_mc_group;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [31:0] d, p, w1, w2;
  mc_code_e    c1, c2;
  logic [5:0]  h1, h2;

  mc_group u_g1 (.data_i(d), .prev_i(p), .code_o(c1), .word_o(w1), .hd_o(h1));
  mc_group #(.CODE_A(CODE_INV_EVEN), .CODE_B(CODE_INV_ODD)) u_g2 (
    .data_i(d), .prev_i(p), .code_o(c2), .word_o(w2), .hd_o(h2));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic int pick(input int ca, input int cb, input logic [63:0] dd, input logic [63:0] pp);
    return (ref_hd(ref_code(cb, dd, 32), pp, 32) < ref_hd(ref_code(ca, dd, 32), pp, 32)) ? cb : ca;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      int e1, e2;
      d = $urandom;
      // mix fully random previous words with ones close to a coded word
      p = (n % 3 == 0) ? 32'(ref_code(n % 4, 64'(d), 32)) ^ (32'd1 << (n % 32)) : $urandom;
      #1;
      e1 = pick(0, 1, 64'(d), 64'(p));
      e2 = pick(2, 3, 64'(d), 64'(p));
      check("g1 code", 64'(c1), 64'(e1));
      check("g1 word", 64'(w1), ref_code(e1, 64'(d), 32));
      check("g1 hd",   64'(h1), 64'(ref_hd(ref_code(e1, 64'(d), 32), 64'(p), 32)));
      check("g2 code", 64'(c2), 64'(e2));
      check("g2 word", 64'(w2), ref_code(e2, 64'(d), 32));
      check("g2 hd",   64'(h2), 64'(ref_hd(ref_code(e2, 64'(d), 32), 64'(p), 32)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
