// ahb_master: AHB bus master that runs one read or write burst per command.
//
// A command (cmd_valid_i while cmd_ready_o) gives the direction, the start
// address and HBURST. The master raises HBUSREQ, waits for an edge where
// HGRANT and HREADY are both high, then issues the address phases: NONSEQ for
// the first beat, SEQ for the rest, word size (HSIZE = 010), addresses
// incrementing by 4, or wrapping at the burst boundary for WRAP bursts.
// SINGLE and INCR (undefined length) run one beat; INCR4/8/16 and WRAP4/8/16
// run 4, 8 or 16 beats. HBUSREQ is dropped during the second-to-last address
// phase (during the only one of a single transfer). The arbiter can then move
// the grant while the last address phase is still on the bus, and the next
// master starts its first address phase right after it: after a burst the
// bus changes hands with no idle cycle, after a single transfer with one.
//
// Write data: during each write data phase wbeat_o names the beat and the
// user returns its data on wdata_i in the same cycle (combinational path to
// HWDATA). Read data: rvalid_o pulses with rdata_o and rbeat_o when a read
// beat completes. done_o pulses when the last data phase completes, with
// err_o set if any beat got an ERROR response; the master finishes the burst
// after an ERROR rather than cancelling it (AHB permits either).
//
// The paper describes the master only as the unit that starts reads and
// writes with address and control; the command interface, burst support and
// error handling are this design's choices. Reset: hresetn_i, active low.
module ahb_master
  import ahb_pkg::*;
(
  input  logic              hclk_i,
  input  logic              hresetn_i,
  // command side
  input  logic              cmd_valid_i,
  output logic              cmd_ready_o,
  input  logic              cmd_write_i,
  input  logic [ADDR_W-1:0] cmd_addr_i,
  input  hburst_e           cmd_burst_i,
  output logic [3:0]        wbeat_o,
  input  logic [DATA_W-1:0] wdata_i,
  output logic              rvalid_o,
  output logic [3:0]        rbeat_o,
  output logic [DATA_W-1:0] rdata_o,
  output logic              done_o,
  output logic              err_o,
  // AHB side
  output logic              hbusreq_o,
  input  logic              hgrant_i,
  output ahb_ctrl_t         ctrl_o,
  output logic [DATA_W-1:0] hwdata_o,
  input  logic              hready_i,
  input  hresp_e            hresp_i,
  input  logic [DATA_W-1:0] hrdata_i
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_ADDR, S_LAST} state_e;

  state_e            state_q;
  logic              write_q;
  hburst_e           burst_q;
  logic [ADDR_W-1:0] addr_q;
  logic [3:0]        abeat_q;     // beat of the current address phase
  logic [3:0]        last_beat;   // index of the final beat
  logic              dvalid_q;    // a data phase of ours is in progress
  logic              dwrite_q;
  logic [3:0]        dbeat_q;
  logic              err_q;
  logic              start, a_accept, d_done;
  logic [ADDR_W-1:0] addr_inc, wrap_mask;

  always_comb begin
    unique case (burst_q)
      HBURST_INCR4,  HBURST_WRAP4:  last_beat = 4'd3;
      HBURST_INCR8,  HBURST_WRAP8:  last_beat = 4'd7;
      HBURST_INCR16, HBURST_WRAP16: last_beat = 4'd15;
      default:                      last_beat = 4'd0;
    endcase
    unique case (burst_q)
      HBURST_WRAP4:  wrap_mask = ADDR_W'(15);
      HBURST_WRAP8:  wrap_mask = ADDR_W'(31);
      HBURST_WRAP16: wrap_mask = ADDR_W'(63);
      default:       wrap_mask = '1;
    endcase
    addr_inc = (addr_q & ~wrap_mask) | ((addr_q + ADDR_W'(4)) & wrap_mask);
  end

  assign cmd_ready_o = (state_q == S_IDLE);
  assign hbusreq_o   = (state_q == S_REQ)
                    || (state_q == S_ADDR && {1'b0, abeat_q} + 5'd1 < {1'b0, last_beat});
  assign start       = (state_q == S_REQ) && hgrant_i && hready_i;
  assign a_accept    = (state_q == S_ADDR) && hready_i;
  assign d_done      = dvalid_q && hready_i;

  always_comb begin
    ctrl_o.haddr  = addr_q;
    ctrl_o.hwrite = write_q;
    ctrl_o.hsize  = HSIZE_WORD;
    ctrl_o.hburst = burst_q;
    if (state_q == S_ADDR) ctrl_o.htrans = (abeat_q == '0) ? HTRANS_NONSEQ : HTRANS_SEQ;
    else                   ctrl_o.htrans = HTRANS_IDLE;
  end

  assign wbeat_o  = dbeat_q;
  assign hwdata_o = wdata_i;

  always_ff @(posedge hclk_i or negedge hresetn_i) begin
    if (!hresetn_i) begin
      state_q  <= S_IDLE;
      write_q  <= 1'b0;
      burst_q  <= HBURST_SINGLE;
      addr_q   <= '0;
      abeat_q  <= '0;
      dvalid_q <= 1'b0;
      dwrite_q <= 1'b0;
      dbeat_q  <= '0;
      err_q    <= 1'b0;
      rvalid_o <= 1'b0;
      rbeat_o  <= '0;
      rdata_o  <= '0;
      done_o   <= 1'b0;
      err_o    <= 1'b0;
    end else begin
      rvalid_o <= 1'b0;
      done_o   <= 1'b0;

      // data phase completion
      if (d_done) begin
        if (!dwrite_q) begin
          rvalid_o <= 1'b1;
          rbeat_o  <= dbeat_q;
          rdata_o  <= hrdata_i;
        end
        if (hresp_i == HRESP_ERROR) err_q <= 1'b1;
        dvalid_q <= 1'b0;
      end

      unique case (state_q)
        S_IDLE: if (cmd_valid_i) begin
          state_q <= S_REQ;
          write_q <= cmd_write_i;
          burst_q <= cmd_burst_i;
          addr_q  <= cmd_addr_i;
          abeat_q <= '0;
          err_q   <= 1'b0;
        end
        S_REQ: if (start) state_q <= S_ADDR;
        S_ADDR: if (a_accept) begin
          dvalid_q <= 1'b1;
          dwrite_q <= write_q;
          dbeat_q  <= abeat_q;
          if (abeat_q == last_beat) state_q <= S_LAST;
          else begin
            abeat_q <= abeat_q + 4'd1;
            addr_q  <= addr_inc;
          end
        end
        S_LAST: if (d_done) begin
          state_q <= S_IDLE;
          done_o  <= 1'b1;
          err_o   <= err_q || (hresp_i == HRESP_ERROR);
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A burst is never interrupted: the grant is held for as long as the
  // master requests it during its address phases.
  a_grant_held: assert property (@(posedge hclk_i) disable iff (!hresetn_i)
    (state_q == S_ADDR && hbusreq_o) |-> hgrant_i);

endmodule
