// txn_steer: a 1xNOUT crossbar that steers whole transactions.
//
// The destination (in_dest) and a discard request (in_discard) are sampled with the first flit
// of a transaction and held until the flit with eot=1 has passed, so a multi-flit transaction is
// never split between outputs. Only the selected output sees out_valid; its ready is returned
// as in_ready, so a full queue stalls the input (back pressure). A discarded transaction is
// consumed at one flit per cycle and forwarded nowhere. A destination at or above NOUT is
// discarded too.
//
// In the compute brick this is the Response Steering of each lane (destination = master tag);
// the memory brick uses it for both directions. The crossbar itself follows the document;
// holding the route until eot and the discard input are this design's choices.
//
// Timing: combinational from input to outputs; the only state is the held route.
module txn_steer
  import dmc_pkg::*;
#(
  parameter int NOUT = 2,
  parameter int DW   = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  flit_t            in_flit,
  input  logic [DW-1:0]    in_dest,     // used at the first flit of a transaction
  input  logic             in_discard,  // used at the first flit of a transaction
  output logic [NOUT-1:0]  out_valid,
  input  logic [NOUT-1:0]  out_ready,
  output flit_t            out_flit,
  output logic             first        // current flit is the first of its transaction
);
  logic          in_txn_q;
  logic [DW-1:0] dest_q;
  logic          disc_q;
  logic [DW-1:0] dest;
  logic          disc;

  assign first    = !in_txn_q;
  assign dest     = in_txn_q ? dest_q : in_dest;
  assign disc     = in_txn_q ? disc_q : (in_discard || (int'(in_dest) >= NOUT));
  assign out_flit = in_flit;

  always_comb begin
    out_valid = '0;
    in_ready  = 1'b1;
    if (!disc) begin
      for (int i = 0; i < NOUT; i++) begin
        if (int'(dest) == i) begin
          out_valid[i] = in_valid;
          in_ready     = out_ready[i];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_txn_q <= 1'b0;
      dest_q   <= '0;
      disc_q   <= 1'b0;
    end else if (in_valid && in_ready) begin
      in_txn_q <= !in_flit.eot;
      dest_q   <= dest;
      disc_q   <= disc;
    end
  end

endmodule
