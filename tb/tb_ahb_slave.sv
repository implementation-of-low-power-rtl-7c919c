// tb_ahb_slave: drives AHB transfers into a 16-word slave with two wait
// states: pipelined INCR4 write and read bursts, single transfers, IDLE
// cycles, and the two-cycle ERROR response for an address beyond the memory,
// a misaligned address and a byte-sized transfer. Checks read data, the number
// of wait cycles per beat and the response.
module tb_ahb_slave;
  import ahb_pkg::*;

  localparam int unsigned WAITS = 2;

  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        hsel;
  ahb_ctrl_t   ctrl;
  logic [31:0] hwdata, hrdata;
  logic        hreadyout;
  hresp_e      hresp;

  ahb_slave #(.MEM_WORDS(16), .WAIT_STATES(WAITS)) u_dut (
    .hclk_i(clk), .hresetn_i(rst_n), .hsel_i(hsel), .ctrl_i(ctrl), .hwdata_i(hwdata),
    .hready_i(hreadyout), .hreadyout_o(hreadyout), .hresp_o(hresp), .hrdata_o(hrdata));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  // Pipelined burst of n beats starting at addr; wd holds write data, rd gets
  // read data, waits/errs count per beat wait cycles and ERROR responses.
  task automatic burst(input logic wr, input logic [31:0] addr, input int n, input logic [2:0] size,
                       input logic [31:0] wd [16], output logic [31:0] rd [16],
                       output int waits [16], output int errs [16]);
    for (int k = 0; k <= n; k++) begin
      if (k < n) begin
        ctrl.haddr  = addr + 32'(4 * k);
        ctrl.htrans = (k == 0) ? HTRANS_NONSEQ : HTRANS_SEQ;
        ctrl.hwrite = wr;
        ctrl.hsize  = size;
        ctrl.hburst = (n == 4) ? HBURST_INCR4 : HBURST_SINGLE;
      end else begin
        ctrl.htrans = HTRANS_IDLE;
      end
      if (k > 0) begin
        hwdata = wd[k-1];
        waits[k-1] = 0;
        errs[k-1] = 0;
      end
      #1;
      while (!hreadyout) begin
        if (k > 0) begin
          waits[k-1]++;
          if (hresp == HRESP_ERROR) errs[k-1]++;
        end
        @(posedge clk);
        #1;
      end
      if (k > 0) begin
        rd[k-1] = hrdata;
        if (hresp == HRESP_ERROR) errs[k-1]++;
      end
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] wd [16], rd [16];
    int waits [16], errs [16];
    hsel = 1'b1;
    ctrl = '0;
    ctrl.htrans = HTRANS_IDLE;
    hwdata = '0;
    for (int i = 0; i < 16; i++) wd[i] = 32'h0203_0405 + 32'(i) * 32'h0404_0404;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1 check("idle ready", 64'(hreadyout), 1);
    // INCR4 write at word 4, then read it back
    burst(1'b1, 32'h0000_0010, 4, HSIZE_WORD, wd, rd, waits, errs);
    for (int k = 0; k < 4; k++) begin
      check("write waits", 64'(waits[k]), 64'(WAITS));
      check("write resp", 64'(errs[k]), 0);
    end
    burst(1'b0, 32'h0000_0010, 4, HSIZE_WORD, wd, rd, waits, errs);
    for (int k = 0; k < 4; k++) begin
      check("read data", 64'(rd[k]), 64'(wd[k]));
      check("read waits", 64'(waits[k]), 64'(WAITS));
    end
    // single write and read at the last word; the region bits are ignored
    wd[0] = 32'hDEAD_BEEF;
    burst(1'b1, 32'h4000_003C, 1, HSIZE_WORD, wd, rd, waits, errs);
    burst(1'b0, 32'h0000_003C, 1, HSIZE_WORD, wd, rd, waits, errs);
    check("single read", 64'(rd[0]), 64'(32'hDEAD_BEEF));
    // earlier data untouched
    burst(1'b0, 32'h0000_0014, 1, HSIZE_WORD, wd, rd, waits, errs);
    check("other word", 64'(rd[0]), 64'(32'h0607_0809));
    // ERROR: beyond the memory, misaligned, byte size. One wait cycle with
    // ERROR, then the completing cycle with ERROR.
    burst(1'b0, 32'h0000_0040, 1, HSIZE_WORD, wd, rd, waits, errs);
    check("range error waits", 64'(waits[0]), 1);
    check("range error resp", 64'(errs[0]), 2);
    burst(1'b1, 32'h0000_0002, 1, HSIZE_WORD, wd, rd, waits, errs);
    check("align error resp", 64'(errs[0]), 2);
    burst(1'b1, 32'h0000_0000, 1, 3'b000, wd, rd, waits, errs);
    check("size error resp", 64'(errs[0]), 2);
    // errored write must not have changed word 0 (written by no one yet: write it first)
    wd[0] = 32'h1111_2222;
    burst(1'b1, 32'h0000_0000, 1, HSIZE_WORD, wd, rd, waits, errs);
    wd[0] = 32'h3333_4444;
    burst(1'b1, 32'h0000_0002, 1, HSIZE_WORD, wd, rd, waits, errs);
    burst(1'b0, 32'h0000_0000, 1, HSIZE_WORD, wd, rd, waits, errs);
    check("errored write ignored", 64'(rd[0]), 64'(32'h1111_2222));
    // not selected: no response
    hsel = 1'b0;
    burst(1'b1, 32'h0000_0000, 1, HSIZE_WORD, wd, rd, waits, errs);
    check("unselected no waits", 64'(waits[0]), 0);
    hsel = 1'b1;
    burst(1'b0, 32'h0000_0000, 1, HSIZE_WORD, wd, rd, waits, errs);
    check("unselected write ignored", 64'(rd[0]), 64'(32'h1111_2222));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
