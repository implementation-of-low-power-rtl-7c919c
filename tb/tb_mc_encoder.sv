// tb_mc_encoder: clocked check of the full encoder at 32 bits (bus word and
// its distance, cycle by cycle, against a reference model that keeps its own
// previous word), of an 8-bit instance on random bytes, of reset clearing the
// previous word, of a held word keeping the same bus value, and of a decode
// of every bus word. Also reports the line toggles saved against the raw data.
module tb_mc_encoder;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  int checks = 0, failures = 0;
  int raw_toggles = 0, coded_toggles = 0;
  int code_seen [4];

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] d32;
  logic [33:0] b32;
  logic [5:0]  h32;
  logic [7:0]  d8;
  logic [9:0]  b8;
  logic [3:0]  h8;

  mc_encoder           u32 (.clk_i(clk), .rst_ni(rst_n), .data_i(d32), .bus_o(b32), .hd_o(h32));
  mc_encoder #(.W(8))  u8  (.clk_i(clk), .rst_ni(rst_n), .data_i(d8),  .bus_o(b8),  .hd_o(h8));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] p32, p8, raw_prev, w;
    int c;
    d32 = '0; d8 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    p32 = '0; p8 = '0; raw_prev = '0;
    for (int n = 0; n < 1000; n++) begin
      // every 10th word is held for a second cycle
      if (n % 10 != 1) begin
        d32 = $urandom;
        d8  = 8'($urandom);
      end
      #1;
      c = ref_best(64'(d32), p32, 32);
      w = ref_code(c, 64'(d32), 32);
      check("code32", 64'(b32[33:32]), 64'(c));
      check("word32", 64'(b32[31:0]), w);
      check("hd32", 64'(h32), 64'(ref_hd(w, p32, 32)));
      check("decode32", ref_code(int'(b32[33:32]), 64'(b32[31:0]), 32), 64'(d32));
      code_seen[c]++;
      coded_toggles += ref_hd(w, p32, 32);
      raw_toggles   += ref_hd(64'(d32), raw_prev, 32);
      raw_prev = 64'(d32);
      p32 = w;
      c = ref_best(64'(d8), p8, 8);
      w = ref_code(c, 64'(d8), 8);
      check("bus8", 64'(b8), 64'({2'(c), 8'(w)}));
      check("hd8", 64'(h8), 64'(ref_hd(w, p8, 8)));
      p8 = w;
      @(posedge clk);
      #1;
      if (n % 10 == 1) check("held word keeps bus", 64'(b32), 64'({2'(ref_best(64'(d32), p32, 32)), p32[31:0]}));
    end
    // reset clears the previous word
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    d32 = 32'h0000_00FF;
    #1;
    check("after reset: swap of low byte keeps 8 toggles", 64'(h32), 64'(8));
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (code_seen[k] == 0) begin
        failures++;
        $display("FAIL code %0d never chosen", k);
      end
    end
    $display("line toggles: raw %0d, coded %0d (data lines only)", raw_toggles, coded_toggles);
    checks++;
    if (coded_toggles >= raw_toggles) begin
      failures++;
      $display("FAIL coding did not reduce toggles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
