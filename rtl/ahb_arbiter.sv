// ahb_arbiter: AHB bus arbiter for N_MASTERS masters.
//
// Only one master owns the address bus at a time. The grant is re-evaluated
// on every clock edge where HREADY is high: while the owner keeps HBUSREQ
// asserted it keeps the bus (so a burst is never broken); once it lets go,
// the next requesting master in round-robin order after the owner gets the
// grant. With no request the grant stays parked on the last owner. A master
// that lets go one address phase before its last one still owns HMASTER for
// that last phase, and the next master follows it with no idle cycle.
//
// Timing: hgrant_o is registered. HMASTER (hmaster_o, address-phase owner)
// follows the grant one HREADY edge later, at the same edge where the newly
// granted master sees HGRANT and HREADY high and starts its first address
// phase; hmaster_data_o is HMASTER delayed by one more HREADY edge and steers
// the write data mux during the data phase. Reset (hresetn_i, active low)
// grants master 0. The paper leaves the arbitration scheme open, naming
// round robin among the choices; round robin, parking and hand-over timing
// are this design's choices.
module ahb_arbiter
  import ahb_pkg::*;
#(
  parameter int unsigned N_MASTERS = 3
) (
  input  logic                 hclk_i,
  input  logic                 hresetn_i,
  input  logic [N_MASTERS-1:0] hbusreq_i,
  input  logic                 hready_i,
  output logic [N_MASTERS-1:0] hgrant_o,
  output logic [HMASTER_W-1:0] hmaster_o,
  output logic [HMASTER_W-1:0] hmaster_data_o
);

  logic [HMASTER_W-1:0] owner_q, next_owner;
  logic                 owner_req;
  int unsigned          cand;

  always_comb begin
    owner_req  = 1'b0;
    cand       = 0;
    next_owner = owner_q;
    for (int unsigned m = 0; m < N_MASTERS; m++)
      if (owner_q == HMASTER_W'(m)) owner_req = hbusreq_i[m];
    if (!owner_req) begin
      // Search the masters after the owner, nearest last so that it wins.
      for (int unsigned k = N_MASTERS; k >= 1; k--) begin
        cand = (32'(owner_q) + k) % N_MASTERS;
        for (int unsigned m = 0; m < N_MASTERS; m++)
          if (cand == m && hbusreq_i[m]) next_owner = HMASTER_W'(m);
      end
    end
  end

  always_ff @(posedge hclk_i or negedge hresetn_i) begin
    if (!hresetn_i) begin
      owner_q        <= '0;
      hmaster_o      <= '0;
      hmaster_data_o <= '0;
    end else if (hready_i) begin
      owner_q        <= next_owner;
      hmaster_o      <= owner_q;
      hmaster_data_o <= hmaster_o;
    end
  end

  always_comb begin
    for (int unsigned m = 0; m < N_MASTERS; m++)
      hgrant_o[m] = (owner_q == HMASTER_W'(m));
  end

  // Exactly one master is granted at any time.
  a_one_grant: assert property (@(posedge hclk_i) disable iff (!hresetn_i) $onehot(hgrant_o));

endmodule
