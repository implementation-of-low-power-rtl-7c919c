// ahb_mc_top: multi-master AHB whose write data bus is multi-coded for low
// transition activity.
//
// Three masters, an arbiter, the address and control mux, the write data mux,
// the read data mux, the address decoder and four memory slaves form an AMBA
// 2.0 AHB. The write data leaving the write data mux passes through the
// multi-coding encoder, which sends each 32-bit word in whichever of four
// codings (invert, swap adjacent bits, invert even bits, invert odd bits)
// toggles the fewest lines against the previous bus word, plus 2 code bits:
// the slaves see a 34-bit write bus (hwdata_bus_o). Each slave has its own
// decoder in front of its write data input. Read data is not coded.
//
// Each master is driven through its command port (see ahb_master): start
// address, direction and burst type, write data per beat, read data per beat
// and a done pulse. Observation ports give the bus owner, HREADY/HRESP, the
// coded write bus and its toggle count hwdata_hd_o for the current word.
//
// Follows the paper's bus diagram for the set of units and their connections and
// its encoder block diagram for the coder. Placing the encoder after the write
// data mux (one coder, one previous-word register for the shared bus), a
// decoder per slave, the memory map (HADDR[31:30] picks the slave), slave
// sizes and wait states are this design's choices.
module ahb_mc_top
  import ahb_pkg::*;
#(
  parameter int unsigned N_MASTERS   = 3,
  parameter int unsigned N_SLAVES    = 4,
  parameter int unsigned MEM_WORDS   = 1024,
  parameter int unsigned WAIT_STATES [N_SLAVES] = '{0, 0, 1, 2}
) (
  input  logic                 hclk_i,
  input  logic                 hresetn_i,
  // per-master command ports
  input  logic                 cmd_valid_i [N_MASTERS],
  output logic                 cmd_ready_o [N_MASTERS],
  input  logic                 cmd_write_i [N_MASTERS],
  input  logic [ADDR_W-1:0]    cmd_addr_i  [N_MASTERS],
  input  hburst_e              cmd_burst_i [N_MASTERS],
  output logic [3:0]           wbeat_o     [N_MASTERS],
  input  logic [DATA_W-1:0]    wdata_i     [N_MASTERS],
  output logic                 rvalid_o    [N_MASTERS],
  output logic [3:0]           rbeat_o     [N_MASTERS],
  output logic [DATA_W-1:0]    rdata_o     [N_MASTERS],
  output logic                 done_o      [N_MASTERS],
  output logic                 err_o       [N_MASTERS],
  // observation
  output logic [N_MASTERS-1:0] hgrant_o,
  output logic [HMASTER_W-1:0] hmaster_o,
  output logic                 hready_o,
  output hresp_e               hresp_o,
  output logic [DATA_W+1:0]    hwdata_bus_o,
  output logic [$clog2(DATA_W+1)-1:0] hwdata_hd_o
);

  localparam int unsigned DEC_BITS = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1;

  ahb_ctrl_t            m_ctrl   [N_MASTERS];
  logic [DATA_W-1:0]    m_hwdata [N_MASTERS];
  logic [N_MASTERS-1:0] hbusreq;
  logic [HMASTER_W-1:0] hmaster_data;
  ahb_ctrl_t            ctrl_bus;
  logic [N_SLAVES-1:0]  hsel;
  logic [DATA_W-1:0]    hwdata_plain;
  logic [DATA_W-1:0]    hrdata;
  logic [DATA_W-1:0]    s_hwdata    [N_SLAVES];
  logic [DATA_W-1:0]    s_hrdata    [N_SLAVES];
  logic                 s_hreadyout [N_SLAVES];
  hresp_e               s_hresp     [N_SLAVES];

  for (genvar m = 0; m < N_MASTERS; m++) begin : g_master
    ahb_master u_master (
      .hclk_i      (hclk_i),
      .hresetn_i   (hresetn_i),
      .cmd_valid_i (cmd_valid_i[m]),
      .cmd_ready_o (cmd_ready_o[m]),
      .cmd_write_i (cmd_write_i[m]),
      .cmd_addr_i  (cmd_addr_i[m]),
      .cmd_burst_i (cmd_burst_i[m]),
      .wbeat_o     (wbeat_o[m]),
      .wdata_i     (wdata_i[m]),
      .rvalid_o    (rvalid_o[m]),
      .rbeat_o     (rbeat_o[m]),
      .rdata_o     (rdata_o[m]),
      .done_o      (done_o[m]),
      .err_o       (err_o[m]),
      .hbusreq_o   (hbusreq[m]),
      .hgrant_i    (hgrant_o[m]),
      .ctrl_o      (m_ctrl[m]),
      .hwdata_o    (m_hwdata[m]),
      .hready_i    (hready_o),
      .hresp_i     (hresp_o),
      .hrdata_i    (hrdata)
    );
  end

  ahb_arbiter #(.N_MASTERS(N_MASTERS)) u_arbiter (
    .hclk_i         (hclk_i),
    .hresetn_i      (hresetn_i),
    .hbusreq_i      (hbusreq),
    .hready_i       (hready_o),
    .hgrant_o       (hgrant_o),
    .hmaster_o      (hmaster_o),
    .hmaster_data_o (hmaster_data)
  );

  ahb_addr_mux #(.N_MASTERS(N_MASTERS)) u_addr_mux (
    .ctrl_i    (m_ctrl),
    .hmaster_i (hmaster_o),
    .ctrl_o    (ctrl_bus)
  );

  ahb_addr_decoder #(.N_SLAVES(N_SLAVES)) u_addr_dec (
    .haddr_i (ctrl_bus.haddr),
    .hsel_o  (hsel)
  );

  ahb_wdata_mux #(.N_MASTERS(N_MASTERS), .W(DATA_W)) u_wdata_mux (
    .hwdata_i       (m_hwdata),
    .hmaster_data_i (hmaster_data),
    .hwdata_o       (hwdata_plain)
  );

  mc_encoder #(.W(DATA_W)) u_encoder (
    .clk_i  (hclk_i),
    .rst_ni (hresetn_i),
    .data_i (hwdata_plain),
    .bus_o  (hwdata_bus_o),
    .hd_o   (hwdata_hd_o)
  );

  for (genvar s = 0; s < N_SLAVES; s++) begin : g_slave
    mc_decoder #(.W(DATA_W)) u_decoder (
      .bus_i  (hwdata_bus_o),
      .data_o (s_hwdata[s])
    );

    ahb_slave #(.MEM_WORDS(MEM_WORDS), .WAIT_STATES(WAIT_STATES[s]), .DEC_BITS(DEC_BITS)) u_slave (
      .hclk_i      (hclk_i),
      .hresetn_i   (hresetn_i),
      .hsel_i      (hsel[s]),
      .ctrl_i      (ctrl_bus),
      .hwdata_i    (s_hwdata[s]),
      .hready_i    (hready_o),
      .hreadyout_o (s_hreadyout[s]),
      .hresp_o     (s_hresp[s]),
      .hrdata_o    (s_hrdata[s])
    );
  end

  ahb_rdata_mux #(.N_SLAVES(N_SLAVES), .W(DATA_W)) u_rdata_mux (
    .hclk_i      (hclk_i),
    .hresetn_i   (hresetn_i),
    .hsel_i      (hsel),
    .hrdata_i    (s_hrdata),
    .hreadyout_i (s_hreadyout),
    .hresp_i     (s_hresp),
    .hrdata_o    (hrdata),
    .hready_o    (hready_o),
    .hresp_o     (hresp_o)
  );

endmodule
