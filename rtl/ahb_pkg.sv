// ahb_pkg: AMBA 2.0 AHB transfer encodings and the bus sizes of this system.
//
// The encodings are those of the AHB specification. The system size (three
// masters, four slaves, 32-bit address and data, 4-bit HMASTER) is the one of
// the paper's bus diagram; the memory map (slave select from HADDR[31:30]) is this
// design's own choice.
package ahb_pkg;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'b000,
    HBURST_INCR   = 3'b001,
    HBURST_WRAP4  = 3'b010,
    HBURST_INCR4  = 3'b011,
    HBURST_WRAP8  = 3'b100,
    HBURST_INCR8  = 3'b101,
    HBURST_WRAP16 = 3'b110,
    HBURST_INCR16 = 3'b111
  } hburst_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  localparam logic [2:0] HSIZE_WORD = 3'b010;

  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned DATA_W   = 32;
  localparam int unsigned HMASTER_W = 4;

  // Address and control of one address phase, as driven by a master and
  // routed by the address and control mux.
  typedef struct packed {
    logic [ADDR_W-1:0] haddr;
    htrans_e           htrans;
    logic              hwrite;
    logic [2:0]        hsize;
    hburst_e           hburst;
  } ahb_ctrl_t;

endpackage
