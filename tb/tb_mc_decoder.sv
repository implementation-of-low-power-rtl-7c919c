// tb_mc_decoder: codes random words with the reference model in every coding
// and checks that the decoder restores them (32-bit and 10-bit instances).
module tb_mc_decoder;
  import mc_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [33:0] b32;
  logic [31:0] d32;
  logic [11:0] b10;
  logic [9:0]  d10;

  mc_decoder           u32 (.bus_i(b32), .data_o(d32));
  mc_decoder #(.W(10)) u10 (.bus_i(b10), .data_o(d10));

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
    for (int n = 0; n < 800; n++) begin
      logic [31:0] x;
      logic [9:0]  y;
      int c;
      c = n % 4;
      x = $urandom;
      y = 10'($urandom);
      b32 = {2'(c), 32'(ref_code(c, 64'(x), 32))};
      b10 = {2'(c), 10'(ref_code(c, 64'(y), 10))};
      #1;
      check("dec32", 64'(d32), 64'(x));
      check("dec10", 64'(d10), 64'(y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
