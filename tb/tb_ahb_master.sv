// tb_ahb_master: runs random read and write commands of every burst type
// through one master against a behavioural slave (random wait states, ERROR
// for addresses with bit 15 set) and a grant that arrives after a random
// delay. Checks each address phase (address, NONSEQ/SEQ, burst, size, incrementing
// and wrapping addresses), the write data of each beat, the read data handed
// back, HBUSREQ being dropped from the second-to-last address phase, and done/err.
module tb_ahb_master;
  import ahb_pkg::*;

  int checks = 0, failures = 0, waits_seen = 0, errors_seen = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        cmd_valid, cmd_ready, cmd_write;
  logic [31:0] cmd_addr;
  hburst_e     cmd_burst;
  logic [3:0]  wbeat, rbeat;
  logic [31:0] wdata, rdata, hwdata, hrdata;
  logic        rvalid, done, err;
  logic        hbusreq, hgrant, hready;
  ahb_ctrl_t   ctrl;
  hresp_e      hresp;

  ahb_master u_dut (
    .hclk_i(clk), .hresetn_i(rst_n), .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready),
    .cmd_write_i(cmd_write), .cmd_addr_i(cmd_addr), .cmd_burst_i(cmd_burst), .wbeat_o(wbeat),
    .wdata_i(wdata), .rvalid_o(rvalid), .rbeat_o(rbeat), .rdata_o(rdata), .done_o(done),
    .err_o(err), .hbusreq_o(hbusreq), .hgrant_i(hgrant), .ctrl_o(ctrl), .hwdata_o(hwdata),
    .hready_i(hready), .hresp_i(hresp), .hrdata_i(hrdata));

  always #5 clk = ~clk;

  // write data of a beat, as the user would supply it
  assign wdata = 32'hA5A5_0000 ^ {cmd_id[15:0], 12'h0, wbeat};

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  // ---- expected address sequence of the current command
  logic [31:0] exp_addr [16];
  int          exp_beats;
  logic [31:0] cmd_id = 0;

  function automatic int beats_of(input hburst_e b);
    case (b)
      HBURST_INCR4, HBURST_WRAP4:   return 4;
      HBURST_INCR8, HBURST_WRAP8:   return 8;
      HBURST_INCR16, HBURST_WRAP16: return 16;
      default:                      return 1;
    endcase
  endfunction

  // ---- behavioural slave and grant
  logic        d_valid = 1'b0, d_write, d_err;
  logic [31:0] d_addr;
  logic [3:0]  d_beat;
  int          d_wait, d_wcnt, abeat, req_cnt, grant_dly;
  logic        any_err;
  logic [31:0] rexp [16];  // read data expected per beat, noted at the address phase

  always_comb begin
    if (!d_valid)   hready = 1'b1;
    else if (d_err) hready = (d_wcnt == 1);
    else            hready = (d_wcnt >= d_wait);
    hresp  = (d_valid && d_err) ? HRESP_ERROR : HRESP_OKAY;
    hrdata = (d_valid && !d_write) ? ~d_addr : 32'h0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // grant: after a random delay while requested, dropped when not
      if (hready) begin
        if (hbusreq) begin
          req_cnt <= req_cnt + 1;
          if (req_cnt >= grant_dly) hgrant <= 1'b1;
        end else begin
          hgrant  <= 1'b0;
          req_cnt <= 0;
        end
      end
      if (d_valid && !hready) d_wcnt <= d_wcnt + 1;
      if (hready) begin
        if (d_valid) begin
          if (d_write && !d_err) check("hwdata", 64'(hwdata), 64'(32'hA5A5_0000 ^ {cmd_id[15:0], 12'h0, d_beat}));
          if (d_wcnt > 0) waits_seen++;
        end
        d_valid <= ctrl.htrans[1];
        if (ctrl.htrans[1]) begin
          check("haddr", 64'(ctrl.haddr), 64'(exp_addr[abeat]));
          check("htrans", 64'(ctrl.htrans), 64'((abeat == 0) ? HTRANS_NONSEQ : HTRANS_SEQ));
          check("hburst", 64'(ctrl.hburst), 64'(cmd_burst));
          check("hsize", 64'(ctrl.hsize), 64'(HSIZE_WORD));
          check("hwrite", 64'(ctrl.hwrite), 64'(cmd_write));
          check("hbusreq dropped from the second-to-last beat", 64'(hbusreq), 64'(abeat + 2 < exp_beats));
          rexp[abeat] <= ~ctrl.haddr;
          d_write <= ctrl.hwrite;
          d_addr  <= ctrl.haddr;
          d_err   <= ctrl.haddr[15];
          d_beat  <= 4'(abeat);
          d_wait  <= $urandom_range(2);
          d_wcnt  <= 0;
          if (ctrl.haddr[15]) errors_seen++;
          abeat   <= abeat + 1;
        end
      end
      if (rvalid) check("rdata", 64'(rdata), 64'(rexp[rbeat]));
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nb, ndone;
    hgrant = 1'b0; req_cnt = 0; grant_dly = 0; abeat = 0;
    cmd_valid = 1'b0; cmd_write = 1'b0; cmd_addr = '0; cmd_burst = HBURST_SINGLE;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      logic [31:0] a, wm;
      cmd_id    = 32'(n);
      cmd_write = 1'($urandom);
      cmd_burst = hburst_e'(n % 8);
      a         = {16'h0, ($urandom_range(7) == 0), 9'($urandom), 6'h0} | 32'(4 * $urandom_range(15));
      cmd_addr  = a;
      nb        = beats_of(cmd_burst);
      exp_beats = nb;
      case (cmd_burst)
        HBURST_WRAP4:  wm = 32'd15;
        HBURST_WRAP8:  wm = 32'd31;
        HBURST_WRAP16: wm = 32'd63;
        default:       wm = 32'hFFFF_FFFF;
      endcase
      any_err = a[15];
      for (int k = 0; k < 16; k++) begin
        exp_addr[k] = a;
        a = (a & ~wm) | ((a + 4) & wm);
      end
      grant_dly = $urandom_range(3);
      abeat     = 0;
      check("ready when idle", 64'(cmd_ready), 1);
      cmd_valid = 1'b1;
      @(posedge clk);
      #1 cmd_valid = 1'b0;
      ndone = 0;
      while (!done) begin
        @(posedge clk);
        #1;
        if (++ndone > 200) break;
      end
      check("done", 64'(done), 1);
      check("beats", 64'(abeat), 64'(nb));
      check("err", 64'(err), 64'(any_err));
    end
    checks++;
    if (waits_seen == 0 || errors_seen == 0) begin
      failures++;
      $display("FAIL waits %0d errors %0d", waits_seen, errors_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
