// tb_ahb_arbiter: drives random bus requests and HREADY into the arbiter and
// checks HGRANT, HMASTER and the data-phase master every cycle against a
// model: the owner keeps the bus while it requests, otherwise the next
// requester in round-robin order takes it, nothing changes while HREADY is low.
// Also counts hand-overs and contended cycles.
module tb_ahb_arbiter;
  import ahb_pkg::*;

  int checks = 0, failures = 0, handovers = 0, contended = 0, stalls = 0;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [2:0] req;
  logic       hready;
  logic [2:0] grant;
  logic [3:0] hmaster, hmaster_d;

  ahb_arbiter u_dut (.hclk_i(clk), .hresetn_i(rst_n), .hbusreq_i(req), .hready_i(hready),
                     .hgrant_o(grant), .hmaster_o(hmaster), .hmaster_data_o(hmaster_d));

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
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
    int owner, hm, hmd, nxt;
    req = '0; hready = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    owner = 0; hm = 0; hmd = 0;
    check("reset grant", int'(grant), 1);
    for (int n = 0; n < 3000; n++) begin
      // requests tend to persist for a while
      if ($urandom_range(3) == 0) req = 3'($urandom);
      hready = ($urandom_range(4) != 0);
      if ($countones(req) > 1) contended++;
      if (!hready) stalls++;
      nxt = owner;
      if (!req[owner]) begin
        for (int k = 1; k <= 3; k++)
          if (req[(owner + k) % 3]) begin
            nxt = (owner + k) % 3;
            break;
          end
      end
      @(posedge clk);
      if (hready) begin
        hmd = hm;
        hm  = owner;
        if (nxt != owner) handovers++;
        owner = nxt;
      end
      #1;
      check("grant", int'(grant), 1 << owner);
      check("hmaster", int'(hmaster), hm);
      check("hmaster data", int'(hmaster_d), hmd);
    end
    $display("handovers %0d, contended cycles %0d, stalled cycles %0d", handovers, contended, stalls);
    checks++;
    if (handovers == 0 || contended == 0 || stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
