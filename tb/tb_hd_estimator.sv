// tb_hd_estimator: checks the Hamming-distance counter on the rows of the
// minimum-distance example (10-bit words against the previous output
// 0100111011) and on random 32-bit and 10-bit words against a bit count.
module tb_hd_estimator;
  import mc_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [9:0]  a10, b10;
  logic [3:0]  h10;
  logic [31:0] a32, b32;
  logic [5:0]  h32;

  hd_estimator #(.W(10)) u10 (.coded_i(a10), .prev_i(b10), .hd_o(h10));
  hd_estimator           u32 (.coded_i(a32), .prev_i(b32), .hd_o(h32));

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
    b10 = 10'b0100111011;
    a10 = 10'b0101000100; #1; check("invert row", int'(h10), 7);
    a10 = 10'b1101000100; #1; check("swap row",   int'(h10), 8);
    a10 = 10'b0010001000; #1; check("odd row",    int'(h10), 6);
    // invert-even row, given by its difference word 0101110111
    a10 = 10'b0101110111; b10 = '0; #1; check("even row", int'(h10), 7);
    a32 = '1; b32 = '0; #1; check("all differ", int'(h32), 32);
    a32 = '1; b32 = '1; #1; check("none differ", int'(h32), 0);
    for (int n = 0; n < 500; n++) begin
      a32 = $urandom; b32 = $urandom; a10 = 10'($urandom); b10 = 10'($urandom);
      #1;
      check("rand32", int'(h32), ref_hd(64'(a32), 64'(b32), 32));
      check("rand10", int'(h10), ref_hd(64'(a10), 64'(b10), 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
