// tb_ahb_mc_top: end-to-end test of the three-master, four-slave AHB with the
// multi-coded write data bus, at the default parameters.
//
// Each master runs a stream of random write and read bursts (SINGLE, INCR,
// INCR4/8/16, WRAP4/8/16) to random slaves, inside a window of each slave's
// memory of its own, so that one scoreboard per master can predict every read.
// A few commands go beyond the slave memory and must end with an error. Every
// clock the coded write bus is checked against a reference coder that keeps
// its own copy of the previous bus word, and every write reaches the slaves
// only through that coded bus, so the read-back checks the decoders too.
// Mechanisms counted (each must occur): bus hand-over between masters (also
// one with no idle cycle between the two masters' transfers), more
// than one master busy at once, wait states, ERROR responses, each of the four
// codes, each burst type. Line toggles of the coded and of the uncoded write
// data are reported.
module tb_ahb_mc_top;
  import ahb_pkg::*;
  import mc_ref_pkg::*;

  localparam int NM = 3;
  localparam int CMDS_PER_MASTER = 120;

  int checks = 0, failures = 0;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              cmd_valid [NM];
  logic              cmd_ready [NM];
  logic              cmd_write [NM];
  logic [31:0]       cmd_addr  [NM];
  hburst_e           cmd_burst [NM];
  logic [3:0]        wbeat     [NM];
  logic [31:0]       wdata     [NM];
  logic              rvalid    [NM];
  logic [3:0]        rbeat     [NM];
  logic [31:0]       rdata     [NM];
  logic              done      [NM];
  logic              err       [NM];
  logic [NM-1:0]     hgrant;
  logic [3:0]        hmaster;
  logic              hready;
  hresp_e            hresp;
  logic [33:0]       hwbus;
  logic [5:0]        hwhd;

  ahb_mc_top u_dut (
    .hclk_i(clk), .hresetn_i(rst_n),
    .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready), .cmd_write_i(cmd_write),
    .cmd_addr_i(cmd_addr), .cmd_burst_i(cmd_burst), .wbeat_o(wbeat), .wdata_i(wdata),
    .rvalid_o(rvalid), .rbeat_o(rbeat), .rdata_o(rdata), .done_o(done), .err_o(err),
    .hgrant_o(hgrant), .hmaster_o(hmaster), .hready_o(hready), .hresp_o(hresp),
    .hwdata_bus_o(hwbus), .hwdata_hd_o(hwhd));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  // ---- write data: a per-command seed mixed with the beat number
  logic [31:0] seed [NM];
  for (genvar m = 0; m < NM; m++) begin : g_wd
    assign wdata[m] = seed[m] ^ (32'(wbeat[m]) * 32'h9E37_79B9);
  end

  // ---- per-master scoreboards
  logic [31:0] model [NM][logic [31:0]];
  logic [31:0] beat_addr [NM][16];

  // ---- mechanism counters
  int handovers = 0, busy_together = 0, wait_cycles = 0, err_cycles = 0, err_cmds = 0;
  int code_cnt [4];
  int burst_cnt [8];
  int raw_toggles = 0, coded_toggles = 0;
  logic [63:0] pprev = '0, raw_prev = '0;
  logic [3:0]  last_hmaster = '0;
  int          b2b_handovers = 0;       // NONSEQ of a new master right after another's transfer
  logic        prev_active = 1'b0;
  logic [3:0]  prev_master = '0;

  always @(posedge clk) begin
    if (rst_n) begin
      int c, nbusy;
      logic [63:0] w, plain;
      plain = 64'(u_dut.hwdata_plain);
      c = ref_best(plain, pprev, 32);
      w = ref_code(c, plain, 32);
      check("coded bus", 64'(hwbus), 64'({2'(c), w[31:0]}));
      check("coded bus toggles", 64'(hwhd), 64'(ref_hd(w, pprev, 32)));
      code_cnt[c]++;
      coded_toggles += ref_hd(w, pprev, 32);
      raw_toggles   += ref_hd(plain, raw_prev, 32);
      pprev = w;
      raw_prev = plain;
      if (hmaster != last_hmaster) handovers++;
      if (hready) begin
        if (u_dut.ctrl_bus.htrans[1] && prev_active && hmaster != prev_master) b2b_handovers++;
        prev_active = u_dut.ctrl_bus.htrans[1];
        prev_master = hmaster;
      end
      last_hmaster = hmaster;
      nbusy = 0;
      for (int m = 0; m < NM; m++) if (!cmd_ready[m]) nbusy++;
      if (nbusy > 1) busy_together++;
      if (!hready && hresp == HRESP_OKAY) wait_cycles++;
      if (hresp == HRESP_ERROR) err_cycles++;
      for (int m = 0; m < NM; m++)
        if (rvalid[m] && model[m].exists(beat_addr[m][rbeat[m]]))
          check("read data", 64'(rdata[m]), 64'(model[m][beat_addr[m][rbeat[m]]]));
    end
  end

  function automatic int beats_of(input hburst_e b);
    case (b)
      HBURST_INCR4, HBURST_WRAP4:   return 4;
      HBURST_INCR8, HBURST_WRAP8:   return 8;
      HBURST_INCR16, HBURST_WRAP16: return 16;
      default:                      return 1;
    endcase
  endfunction

  task automatic run_master(input int m);
    for (int n = 0; n < CMDS_PER_MASTER; n++) begin
      logic [31:0] a, wm;
      logic        bad, wr;
      hburst_e     b;
      int          nb, t;
      b   = hburst_e'($urandom_range(7));
      wr  = (n < 20) ? 1'b1 : 1'($urandom);
      bad = ($urandom_range(19) == 0);
      // slave region, master window (256 words), offset leaving room for 16 beats
      a   = {2'($urandom_range(3)), 30'h0} | 32'(m * 1024) | 32'(4 * $urandom_range(240));
      if (bad) a = a | 32'h0001_0000;  // beyond the 1024-word memory
      case (b)
        HBURST_WRAP4:  wm = 32'd15;
        HBURST_WRAP8:  wm = 32'd31;
        HBURST_WRAP16: wm = 32'd63;
        default:       wm = 32'hFFFF_FFFF;
      endcase
      nb = beats_of(b);
      begin
        logic [31:0] x;
        x = a;
        for (int k = 0; k < 16; k++) begin
          beat_addr[m][k] = x;
          x = (x & ~wm) | ((x + 4) & wm);
        end
      end
      seed[m]      = $urandom;
      cmd_write[m] = wr;
      cmd_addr[m]  = a;
      cmd_burst[m] = b;
      cmd_valid[m] = 1'b1;
      @(posedge clk);
      #1 cmd_valid[m] = 1'b0;
      t = 0;
      while (!done[m]) begin
        @(posedge clk);
        #1;
        if (++t > 2000) break;
      end
      check("command done", 64'(done[m]), 1);
      check("error flag", 64'(err[m]), 64'(bad));
      if (bad) err_cmds++;
      burst_cnt[b]++;
      if (wr && !bad)
        for (int k = 0; k < nb; k++)
          model[m][beat_addr[m][k]] = seed[m] ^ (32'(k) * 32'h9E37_79B9);
      // idle gap of random length; at least one cycle so the last read beat
      // is checked against this command's addresses
      repeat (1 + $urandom_range(3)) @(posedge clk);
      #1;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input string what, input int cnt);
    checks++;
    $display("  %-28s %0d", what, cnt);
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    for (int m = 0; m < NM; m++) begin
      cmd_valid[m] = 1'b0; cmd_write[m] = 1'b0; cmd_addr[m] = '0;
      cmd_burst[m] = HBURST_SINGLE; seed[m] = '0;
      for (int k = 0; k < 16; k++) beat_addr[m][k] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      run_master(0);
      run_master(1);
      run_master(2);
    join
    repeat (5) @(posedge clk);
    $display("mechanisms:");
    need("bus hand-overs", handovers);
    need("hand-overs with no idle", b2b_handovers);
    need("cycles >1 master busy", busy_together);
    need("wait-state cycles", wait_cycles);
    need("ERROR response cycles", err_cycles);
    need("commands ending in error", err_cmds);
    for (int c = 0; c < 4; c++) need($sformatf("bus words with code %0d", c), code_cnt[c]);
    for (int b = 0; b < 8; b++) need($sformatf("commands with HBURST %0d", b), burst_cnt[b]);
    $display("write data line toggles: uncoded %0d, coded %0d", raw_toggles, coded_toggles);
    checks++;
    if (coded_toggles > raw_toggles) begin
      failures++;
      $display("FAIL coded bus toggled more than the uncoded one");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
