// tb_ahb_addr_decoder: checks that every address selects exactly the slave
// of its region (HADDR[31:30] with four slaves), at region edges and at random.
module tb_ahb_addr_decoder;
  int checks = 0, failures = 0;

  logic [31:0] addr;
  logic [3:0]  sel;

  ahb_addr_decoder u_dut (.haddr_i(addr), .hsel_o(sel));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s addr %h: got %b expected %b", what, addr, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] edges [8] = '{32'h0000_0000, 32'h3FFF_FFFC, 32'h4000_0000, 32'h7FFF_FFFC,
                               32'h8000_0000, 32'hBFFF_FFFC, 32'hC000_0000, 32'hFFFF_FFFC};

  initial begin
    for (int e = 0; e < 8; e++) begin
      addr = edges[e];
      #1;
      check("edge", int'(sel), 1 << (e / 2));
    end
    for (int n = 0; n < 500; n++) begin
      addr = $urandom;
      #1;
      check("random", int'(sel), 1 << (addr / 32'h4000_0000));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
