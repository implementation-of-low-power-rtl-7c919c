// tb_mc_code_unit: checks the four codings against the worked examples of
// the scheme (11- and 12-bit words) and against a reference model on random
// 32-bit and 11-bit words (odd width: top bit untouched by the swap).
module tb_mc_code_unit;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  int checks = 0, failures = 0;

  mc_code_e    c12, c32, c11;
  logic [11:0] d12, q12;
  logic [31:0] d32, q32;
  logic [10:0] d11, q11;

  mc_code_unit #(.W(12)) u12 (.code_i(c12), .data_i(d12), .data_o(q12));
  mc_code_unit           u32 (.code_i(c32), .data_i(d32), .data_o(q32));
  mc_code_unit #(.W(11)) u11 (.code_i(c11), .data_i(d11), .data_o(q11));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    // worked examples
    c11 = CODE_INVERT;   d11 = 11'b01101011100;  #1; check("ex invert", 64'(q11), 64'(11'b10010100011));
    c12 = CODE_SWAP;     d12 = 12'b011010111000; #1; check("ex swap",   64'(q12), 64'(12'b100101110100));
    c12 = CODE_INV_EVEN; d12 = 12'b001101011100; #1; check("ex even",   64'(q12), 64'(12'b011000001001));
    c12 = CODE_INV_ODD;  d12 = 12'b001101011100; #1; check("ex odd",    64'(q12), 64'(12'b100111110110));
    // random against the model, each code
    for (int n = 0; n < 400; n++) begin
      int c;
      c = n % 4;
      c32 = mc_code_e'(c);
      c11 = mc_code_e'(c);
      d32 = $urandom;
      d11 = 11'($urandom);
      #1;
      check("rand32", 64'(q32), ref_code(c, 64'(d32), 32));
      check("rand11", 64'(q11), ref_code(c, 64'(d11), 11));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
