// tb_incr4_write_burst: the single-burst scenario of the system at default
// parameters. Master 0 writes an INCR4 burst of the words 02030405, 06070809,
// 0A0B0C0D, 0E0F1011 to addresses 0, 4, 8, C of slave 0 (no wait states) and
// reads them back. Checked: the address phases (NONSEQ then SEQ, HBURST 011,
// HSIZE 010, HMASTER 0), that the four data phases take exactly four cycles,
// that the coded write bus carries 34 bits whose decoded value at slave 0 is
// each written word in turn, and the read-back data.
module tb_incr4_write_burst;
  import ahb_pkg::*;

  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        cmd_valid [3];
  logic        cmd_ready [3];
  logic        cmd_write [3];
  logic [31:0] cmd_addr  [3];
  hburst_e     cmd_burst [3];
  logic [3:0]  wbeat     [3];
  logic [31:0] wdata     [3];
  logic        rvalid    [3];
  logic [3:0]  rbeat     [3];
  logic [31:0] rdata     [3];
  logic        done      [3];
  logic        err       [3];
  logic [2:0]  hgrant;
  logic [3:0]  hmaster;
  logic        hready;
  hresp_e      hresp;
  logic [33:0] hwbus;
  logic [5:0]  hwhd;

  ahb_mc_top u_dut (
    .hclk_i(clk), .hresetn_i(rst_n),
    .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready), .cmd_write_i(cmd_write),
    .cmd_addr_i(cmd_addr), .cmd_burst_i(cmd_burst), .wbeat_o(wbeat), .wdata_i(wdata),
    .rvalid_o(rvalid), .rbeat_o(rbeat), .rdata_o(rdata), .done_o(done), .err_o(err),
    .hgrant_o(hgrant), .hmaster_o(hmaster), .hready_o(hready), .hresp_o(hresp),
    .hwdata_bus_o(hwbus), .hwdata_hd_o(hwhd));

  always #5 clk = ~clk;

  function automatic logic [31:0] word_of(input logic [3:0] k);
    return 32'h0203_0405 + 32'(k) * 32'h0404_0404;
  endfunction

  assign wdata[0] = word_of(wbeat[0]);
  assign wdata[1] = '0;
  assign wdata[2] = '0;

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  // monitor of the slave side
  int abeats = 0, dbeats = 0, dcycles = 0;
  logic in_data = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_data) dcycles++;
      if (in_data && hready && u_dut.u_rdata_mux.sel_q[0] && cmd_write[0]) begin
        check("decoded write data at slave 0", 64'(u_dut.s_hwdata[0]), 64'(word_of(4'(dbeats))));
        check("decoded = uncoded", 64'(u_dut.s_hwdata[0]), 64'(u_dut.hwdata_plain));
        dbeats++;
      end
      if (hready) in_data = u_dut.ctrl_bus.htrans[1];
      if (hready && u_dut.ctrl_bus.htrans[1]) begin
        check("haddr", 64'(u_dut.ctrl_bus.haddr), 64'(32'(abeats % 4) * 32'd4));
        check("htrans", 64'(u_dut.ctrl_bus.htrans), 64'((abeats % 4 == 0) ? HTRANS_NONSEQ : HTRANS_SEQ));
        check("hburst", 64'(u_dut.ctrl_bus.hburst), 64'(HBURST_INCR4));
        check("hsize", 64'(u_dut.ctrl_bus.hsize), 64'(3'b010));
        check("hmaster", 64'(hmaster), 0);
        check("hsel", 64'(u_dut.hsel), 1);
        abeats++;
      end
      if (rvalid[0]) check("read back", 64'(rdata[0]), 64'(word_of(rbeat[0])));
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 3; m++) begin
      cmd_valid[m] = 1'b0; cmd_write[m] = 1'b0; cmd_addr[m] = '0; cmd_burst[m] = HBURST_SINGLE;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    cmd_write[0] = 1'b1; cmd_addr[0] = 32'h0; cmd_burst[0] = HBURST_INCR4; cmd_valid[0] = 1'b1;
    @(posedge clk);
    #1 cmd_valid[0] = 1'b0;
    while (!done[0]) begin
      @(posedge clk);
      #1;
    end
    check("no error", 64'(err[0]), 0);
    check("four data beats", 64'(dbeats), 4);
    check("four data cycles (one beat per cycle)", 64'(dcycles), 4);
    check("coded bus width", 64'($bits(hwbus)), 34);
    repeat (2) @(posedge clk);
    #1;
    cmd_write[0] = 1'b0; cmd_valid[0] = 1'b1;
    @(posedge clk);
    #1 cmd_valid[0] = 1'b0;
    while (!done[0]) begin
      @(posedge clk);
      #1;
    end
    check("address phases", 64'(abeats), 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
