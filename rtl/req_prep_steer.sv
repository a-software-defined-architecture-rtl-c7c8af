// req_prep_steer: Memory Request Preparation and Steering for one master port.
//
// Each request flit stream from a master port passes through this unit. It owns the port's
// MemPort Lookup Structure and does three things:
//  * CFG flits are in-band configuration: they write one lookup entry and go no further.
//  * A header flit (AW or AR) is looked up by address; on a hit its address is offset into the
//    memory brick's address space, the master tag is set to MASTER_ID so the response can find
//    its way back, and the whole transaction is steered through a 1xN crossbar to the queue of
//    the lane named by the entry's OutPort. W beats follow their header on the same route.
//  * On a miss the transaction is discarded and lookup_miss pulses for one cycle.
// The translate-tag-steer function follows the document; the miss handling and the CFG flit are
// this design's choices.
//
// Timing: combinational; the lane queue that follows registers the flit. A full queue stalls
// the master port (in_ready low).
module req_prep_steer
  import dmc_pkg::*;
#(
  parameter int N         = 2,
  parameter int ENTRIES   = 4,
  parameter int MASTER_ID = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  flit_t         in_flit,
  output logic [N-1:0]  out_valid,
  input  logic [N-1:0]  out_ready,
  output flit_t         out_flit,
  output logic          lookup_miss,
  output logic          cfg_write
);
  logic                lk_hit;
  logic [ADDR_W-1:0]   lk_addr_out;
  logic [OUTP_W-1:0]   lk_outport;
  logic                is_cfg;
  logic                first;
  flit_t               prep;

  assign is_cfg = (in_flit.kind == K_CFG);

  memport_lookup #(.ENTRIES(ENTRIES)) u_lookup (
    .clk, .rst_n,
    .cfg_we    (cfg_write),
    .cfg_idx   (cfg_index(in_flit.body)),
    .cfg_data  (cfg_entry(in_flit.body)),
    .lk_addr   (in_flit.body[ADDR_W-1:0]),
    .lk_hit, .lk_addr_out, .lk_outport
  );

  // Request preparation: translate the address and tag the originating master.
  always_comb begin
    prep = in_flit;
    if (is_header(in_flit.kind)) begin
      prep.body[ADDR_W-1:0] = lk_addr_out;
      prep.mtag             = MTAG_W'(MASTER_ID);
    end
  end

  txn_steer #(.NOUT(N), .DW(OUTP_W)) u_xbar (
    .clk, .rst_n,
    .in_valid, .in_ready,
    .in_flit    (prep),
    .in_dest    (lk_outport),
    .in_discard (is_cfg || !is_header(in_flit.kind) || !lk_hit),
    .out_valid, .out_ready, .out_flit,
    .first
  );

  assign cfg_write   = in_valid && in_ready && first && is_cfg;
  assign lookup_miss = in_valid && in_ready && first && !is_cfg && !(is_header(in_flit.kind) && lk_hit);

endmodule
