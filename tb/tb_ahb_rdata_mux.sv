// tb_ahb_rdata_mux: checks that HRDATA, HREADY and HRESP come from the slave
// selected in the previous address phase, and that the selection only moves
// on at edges where HREADY is high (so it holds through wait states).
module tb_ahb_rdata_mux;
  import ahb_pkg::*;

  int checks = 0, failures = 0, waits = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [3:0]  hsel;
  logic [31:0] rd [4];
  logic        ro [4];
  hresp_e      rs [4];
  logic [31:0] hrdata;
  logic        hready;
  hresp_e      hresp;

  ahb_rdata_mux u_dut (.hclk_i(clk), .hresetn_i(rst_n), .hsel_i(hsel), .hrdata_i(rd),
                       .hreadyout_i(ro), .hresp_i(rs), .hrdata_o(hrdata), .hready_o(hready),
                       .hresp_o(hresp));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dsel;
    hsel = 4'b0001;
    for (int s = 0; s < 4; s++) begin
      rd[s] = '0; ro[s] = 1'b1; rs[s] = HRESP_OKAY;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    dsel = 0;
    for (int n = 0; n < 2000; n++) begin
      logic ready_now;
      hsel = 4'(1 << $urandom_range(3));
      for (int s = 0; s < 4; s++) begin
        rd[s] = $urandom;
        ro[s] = ($urandom_range(3) != 0);
        rs[s] = hresp_e'($urandom_range(1));
      end
      #1;
      check("hrdata", 64'(hrdata), 64'(rd[dsel]));
      check("hready", 64'(hready), 64'(ro[dsel]));
      check("hresp",  64'(hresp),  64'(rs[dsel]));
      ready_now = ro[dsel];
      if (!ready_now) waits++;
      @(posedge clk);
      if (ready_now) dsel = $clog2(hsel);
      #1;
    end
    checks++;
    if (waits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
