// tb_ahb_addr_mux: drives a different random address/control bundle from each
// master and checks that the one selected by HMASTER reaches the output, and
// that an HMASTER with no master behind it gives an IDLE transfer.
module tb_ahb_addr_mux;
  import ahb_pkg::*;

  int checks = 0, failures = 0;

  ahb_ctrl_t  ctrl [3];
  ahb_ctrl_t  out;
  logic [3:0] hmaster;

  ahb_addr_mux u_dut (.ctrl_i(ctrl), .hmaster_i(hmaster), .ctrl_o(out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      for (int m = 0; m < 3; m++) begin
        ctrl[m].haddr  = $urandom;
        ctrl[m].htrans = htrans_e'($urandom_range(3));
        ctrl[m].hwrite = 1'($urandom);
        ctrl[m].hsize  = 3'($urandom);
        ctrl[m].hburst = hburst_e'($urandom_range(7));
      end
      hmaster = (n % 50 == 49) ? 4'd9 : 4'(n % 3);
      #1;
      checks++;
      if (hmaster < 3) begin
        if (out !== ctrl[hmaster[1:0]]) begin
          failures++;
          $display("FAIL master %0d: got %h expected %h", hmaster, out, ctrl[hmaster[1:0]]);
        end
      end else if (out.htrans != HTRANS_IDLE) begin
        failures++;
        $display("FAIL no master: transfer not idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
