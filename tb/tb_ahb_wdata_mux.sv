// tb_ahb_wdata_mux: drives different random write data from each master and
// checks that the data-phase master's word is passed on.
module tb_ahb_wdata_mux;
  int checks = 0, failures = 0;

  logic [31:0] wd [3];
  logic [31:0] out;
  logic [3:0]  hm;

  ahb_wdata_mux u_dut (.hwdata_i(wd), .hmaster_data_i(hm), .hwdata_o(out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      for (int m = 0; m < 3; m++) wd[m] = $urandom;
      hm = 4'($urandom_range(2));
      #1;
      checks++;
      if (out !== wd[hm[1:0]]) begin
        failures++;
        $display("FAIL master %0d: got %h expected %h", hm, out, wd[hm[1:0]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
