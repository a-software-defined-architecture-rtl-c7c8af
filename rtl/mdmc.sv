// mdmc: the Disaggregated Memory Controller of a memory brick.
//
// The memory brick is passive: it only serves requests arriving on its N lanes from S local
// memory-controller slave ports, and returns each response on the lane the request came in on.
//
// Request path, per lane n: an upsizer rebuilds 152-bit flits, an edge buffer absorbs them (no
// back pressure reaches the lane: a flit arriving at a full buffer is dropped and rx_drop
// pulses, the overflow the compute-side rate limiters exist to prevent), the lane index is
// written into the flit's link tag, and a crossbar steers the transaction to queue (n, s) of the
// slave s that holds its address. Per slave a round-robin arbiter drains its N queues.
// Response path, per slave s: a crossbar steers each response, by the link tag the slave copied
// from its request, to queue (s, n); per lane a round-robin arbiter and a downsizer send it.
//
// Serving requests from lanes and returning responses on the originating lane follow the
// document. Choosing the slave from address bits (addr >> SLAVE_LSB) mod S, tagging with the
// lane index, queue depths and the drop pulses are this design's choices. One clock domain.
module mdmc
  import dmc_pkg::*;
#(
  parameter int N         = 2,
  parameter int S         = 2,
  parameter int QDEPTH    = 8,
  parameter int SLAVE_LSB = 30
) (
  input  logic              clk,
  input  logic              rst_n,
  // lanes
  input  logic [N-1:0]      rx_valid,
  input  logic [LANE_W-1:0] rx_data [N],
  output logic [N-1:0]      tx_valid,
  output logic [LANE_W-1:0] tx_data [N],
  // slave ports: requests out, responses in
  output logic [S-1:0]      s_req_valid,
  input  logic [S-1:0]      s_req_ready,
  output flit_t             s_req_flit [S],
  input  logic [S-1:0]      s_rsp_valid,
  output logic [S-1:0]      s_rsp_ready,
  input  flit_t             s_rsp_flit [S],
  // status
  output logic [N-1:0]      rx_drop
);
  localparam int CW  = $clog2(QDEPTH + 1);
  localparam int SDW = (S > 1) ? $clog2(S) : 1;

  // ---------------- request path ----------------
  logic [N-1:0] rq_valid [S];   // indexed [slave][lane]
  logic [N-1:0] rq_ready [S];
  flit_t        rq_flit  [S][N];

  for (genvar n = 0; n < N; n++) begin : g_lane_rx
    logic  up_valid, buf_ready, buf_valid, buf_pop, unused_first;
    flit_t up_flit, buf_flit, tagd, st_flit;
    logic [S-1:0] st_valid, st_ready;
    logic [SDW-1:0] dest;
    logic [CW-1:0] unused_count;

    flit_upsizer u_up (
      .clk, .rst_n,
      .rx_valid  (rx_valid[n]),
      .rx_data   (rx_data[n]),
      .out_valid (up_valid),
      .out_flit  (up_flit)
    );
    edge_fifo #(.WIDTH(FLIT_W), .DEPTH(QDEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid  (up_valid),
      .in_ready  (buf_ready),
      .in_data   (up_flit),
      .out_valid (buf_valid),
      .out_ready (buf_pop),
      .out_data  (buf_flit),
      .count     (unused_count)
    );
    assign rx_drop[n] = up_valid && !buf_ready;

    always_comb begin
      tagd      = buf_flit;
      tagd.ltag = LTAG_W'(n);
      dest        = SDW'((buf_flit.body[ADDR_W-1:0] >> SLAVE_LSB) % S);
    end

    txn_steer #(.NOUT(S), .DW(SDW)) u_steer (
      .clk, .rst_n,
      .in_valid   (buf_valid),
      .in_ready   (buf_pop),
      .in_flit    (tagd),
      .in_dest    (dest),
      .in_discard (!is_header(buf_flit.kind)),
      .out_valid  (st_valid),
      .out_ready  (st_ready),
      .out_flit   (st_flit),
      .first      (unused_first)
    );
    for (genvar s = 0; s < S; s++) begin : g_q
      logic [CW-1:0] unused_qcount;
      edge_fifo #(.WIDTH(FLIT_W), .DEPTH(QDEPTH)) u_q (
        .clk, .rst_n,
        .in_valid  (st_valid[s]),
        .in_ready  (st_ready[s]),
        .in_data   (st_flit),
        .out_valid (rq_valid[s][n]),
        .out_ready (rq_ready[s][n]),
        .out_data  (rq_flit[s][n]),
        .count     (unused_qcount)
      );
    end
  end

  for (genvar s = 0; s < S; s++) begin : g_slave_req
    logic [((N > 1) ? $clog2(N) : 1)-1:0] unused_grant;
    txn_rr_arbiter #(.NIN(N)) u_arb (
      .clk, .rst_n,
      .in_valid  (rq_valid[s]),
      .in_ready  (rq_ready[s]),
      .in_flit   (rq_flit[s]),
      .out_valid (s_req_valid[s]),
      .out_ready (s_req_ready[s]),
      .out_flit  (s_req_flit[s]),
      .grant     (unused_grant)
    );
  end

  // ---------------- response path ----------------
  logic [S-1:0] pq_valid [N];   // indexed [lane][slave]
  logic [S-1:0] pq_ready [N];
  flit_t        pq_flit  [N][S];

  for (genvar s = 0; s < S; s++) begin : g_slave_rsp
    logic [N-1:0] st_valid, st_ready;
    flit_t        st_flit;
    logic         unused_first;
    txn_steer #(.NOUT(N), .DW(LTAG_W)) u_steer (
      .clk, .rst_n,
      .in_valid   (s_rsp_valid[s]),
      .in_ready   (s_rsp_ready[s]),
      .in_flit    (s_rsp_flit[s]),
      .in_dest    (s_rsp_flit[s].ltag),
      .in_discard (1'b0),
      .out_valid  (st_valid),
      .out_ready  (st_ready),
      .out_flit   (st_flit),
      .first      (unused_first)
    );
    for (genvar n = 0; n < N; n++) begin : g_q
      logic [CW-1:0] unused_qcount;
      edge_fifo #(.WIDTH(FLIT_W), .DEPTH(QDEPTH)) u_q (
        .clk, .rst_n,
        .in_valid  (st_valid[n]),
        .in_ready  (st_ready[n]),
        .in_data   (st_flit),
        .out_valid (pq_valid[n][s]),
        .out_ready (pq_ready[n][s]),
        .out_data  (pq_flit[n][s]),
        .count     (unused_qcount)
      );
    end
  end

  for (genvar n = 0; n < N; n++) begin : g_lane_tx
    logic  arb_valid, arb_ready;
    flit_t arb_flit;
    logic [((S > 1) ? $clog2(S) : 1)-1:0] unused_grant;
    txn_rr_arbiter #(.NIN(S)) u_arb (
      .clk, .rst_n,
      .in_valid  (pq_valid[n]),
      .in_ready  (pq_ready[n]),
      .in_flit   (pq_flit[n]),
      .out_valid (arb_valid),
      .out_ready (arb_ready),
      .out_flit  (arb_flit),
      .grant     (unused_grant)
    );
    flit_downsizer u_down (
      .clk, .rst_n,
      .in_valid (arb_valid),
      .in_ready (arb_ready),
      .in_flit  (arb_flit),
      .tx_valid (tx_valid[n]),
      .tx_data  (tx_data[n])
    );
  end

endmodule
