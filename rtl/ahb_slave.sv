// ahb_slave: AHB memory slave with programmable wait states and error
// response.
//
// The slave samples a transfer in the address phase (HSEL, HREADY and a
// NONSEQ or SEQ HTRANS at a clock edge) and serves it in the next cycle(s):
// it inserts WAIT_STATES cycles with HREADYOUT low and then completes with
// OKAY, writing HWDATA into, or reading HRDATA from, its MEM_WORDS-word
// memory. The top DEC_BITS address bits belong to the address decoder and are
// ignored here. A transfer outside the memory, not word-aligned or not word-sized
// gets the two-cycle ERROR response of AHB (HREADYOUT low, then high, HRESP
// = ERROR in both). IDLE and BUSY get a zero-wait OKAY.
//
// Timing: HRDATA is read combinationally from the memory during the data
// phase; a write is stored at the edge that ends the data phase. The memory
// is not reset. The paper says only that a slave answers transfers in its
// address range and reports wait, success or failure; the memory, its size,
// the wait states and the error rules are this design's choices.
// Reset: hresetn_i, active low.
module ahb_slave
  import ahb_pkg::*;
#(
  parameter int unsigned MEM_WORDS   = 1024,
  parameter int unsigned WAIT_STATES = 0,   // 0..255
  parameter int unsigned DEC_BITS    = 2   // top address bits used by the address decoder
) (
  input  logic              hclk_i,
  input  logic              hresetn_i,
  input  logic              hsel_i,
  input  ahb_ctrl_t         ctrl_i,
  input  logic [DATA_W-1:0] hwdata_i,
  input  logic              hready_i,
  output logic              hreadyout_o,
  output hresp_e            hresp_o,
  output logic [DATA_W-1:0] hrdata_o
);

  localparam int unsigned IDX_W = (MEM_WORDS > 1) ? $clog2(MEM_WORDS) : 1;

  logic [DATA_W-1:0] mem [MEM_WORDS];

  logic             dvalid_q, dwrite_q, derr_q, err2_q;
  logic [IDX_W-1:0] didx_q;
  logic [7:0]       wcnt_q;
  logic             a_valid, a_err;
  logic [ADDR_W-3-DEC_BITS:0] a_word;  // word offset inside the slave's region

  assign a_valid = hsel_i && hready_i && ctrl_i.htrans[1];
  assign a_word  = ctrl_i.haddr[ADDR_W-1-DEC_BITS:2];
  assign a_err   = (32'(a_word) >= MEM_WORDS) || (ctrl_i.haddr[1:0] != 2'b00)
                   || (ctrl_i.hsize != HSIZE_WORD);

  always_comb begin
    if (!dvalid_q)   hreadyout_o = 1'b1;
    else if (derr_q) hreadyout_o = err2_q;
    else             hreadyout_o = (wcnt_q == 8'(WAIT_STATES));
    hresp_o  = (dvalid_q && derr_q) ? HRESP_ERROR : HRESP_OKAY;
    hrdata_o = (dvalid_q && !derr_q && !dwrite_q) ? mem[didx_q] : '0;
  end

  always_ff @(posedge hclk_i or negedge hresetn_i) begin
    if (!hresetn_i) begin
      dvalid_q <= 1'b0;
      dwrite_q <= 1'b0;
      derr_q   <= 1'b0;
      err2_q   <= 1'b0;
      didx_q   <= '0;
      wcnt_q   <= '0;
    end else begin
      if (dvalid_q && !hreadyout_o) begin
        if (derr_q) err2_q <= 1'b1;
        else        wcnt_q <= wcnt_q + 8'd1;
      end
      if (hready_i) begin
        dvalid_q <= a_valid;
        dwrite_q <= ctrl_i.hwrite;
        derr_q   <= a_err;
        err2_q   <= 1'b0;
        didx_q   <= IDX_W'(a_word);
        wcnt_q   <= '0;
      end
    end
  end

  always_ff @(posedge hclk_i) begin
    if (dvalid_q && hready_i && dwrite_q && !derr_q) mem[didx_q] <= hwdata_i;
  end

  // ERROR is a two-cycle response: a cycle with HREADYOUT low, then one high.
  a_error_two_cycles: assert property (@(posedge hclk_i) disable iff (!hresetn_i)
    (hresp_o == HRESP_ERROR && !hreadyout_o) |=> (hresp_o == HRESP_ERROR && hreadyout_o));

endmodule
