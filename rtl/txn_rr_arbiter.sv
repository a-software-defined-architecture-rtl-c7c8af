// txn_rr_arbiter: an input-queued NINx1 switch with a transaction-aware round-robin arbiter.
//
// It feeds one output (a lane Tx pipeline, a master port or a slave port) from NIN queues. When
// idle it grants the first requesting queue after the one granted last, and then keeps the grant
// until the flit with eot=1 has been taken, so all flits of one memory transaction leave
// back-to-back and are never interleaved with another transaction's. There is no crossbar: the
// output is single. This behaviour follows the document; the search order is this design's.
//
// Timing: combinational from the queue heads to the output, one flit per cycle, no bubble when
// the grant moves from one transaction to the next.
module txn_rr_arbiter
  import dmc_pkg::*;
#(
  parameter int NIN = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NIN-1:0]  in_valid,
  output logic [NIN-1:0]  in_ready,
  input  flit_t           in_flit [NIN],
  output logic            out_valid,
  input  logic            out_ready,
  output flit_t           out_flit,
  output logic [((NIN > 1) ? $clog2(NIN) : 1)-1:0] grant   // input being served (valid with out_valid)
);
  localparam int GW = (NIN > 1) ? $clog2(NIN) : 1;

  logic          locked_q;
  logic [GW-1:0] lock_idx_q;
  logic [GW-1:0] last_q;
  logic [GW-1:0] pick;
  logic          any;

  // Round-robin choice: first valid input after last_q, wrapping around.
  always_comb begin
    pick = last_q;
    any  = 1'b0;
    for (int k = 1; k <= NIN; k++) begin
      logic [GW-1:0] j;
      j = GW'((int'(last_q) + k) % NIN);
      if (!any && in_valid[j]) begin
        pick = j;
        any  = 1'b1;
      end
    end
  end

  assign grant = locked_q ? lock_idx_q : pick;

  always_comb begin
    out_valid = locked_q ? in_valid[lock_idx_q] : any;
    out_flit  = in_flit[grant];
    in_ready  = '0;
    in_ready[grant] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q   <= 1'b0;
      lock_idx_q <= '0;
      last_q     <= GW'(NIN - 1);
    end else if (out_valid && out_ready) begin
      locked_q   <= !out_flit.eot;
      lock_idx_q <= grant;
      last_q     <= grant;
    end
  end

  // Transactions are not interleaved: while locked, the grant does not move.
  property p_locked;
    @(posedge clk) disable iff (!rst_n) locked_q |-> (grant == lock_idx_q);
  endproperty
  assert property (p_locked);

endmodule
