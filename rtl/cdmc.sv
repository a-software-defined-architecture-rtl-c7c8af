// cdmc: the Disaggregated Memory Controller of a compute brick.
//
// It sits on the compute brick's memory bus behind M master ports and drives N serial lanes,
// each of which a circuit switch connects to one memory brick.
//
// Tx path, per master port m: req_prep_steer translates and tags each request and steers it to
// queue (m, n) of the lane n its segment lives behind. Per lane n: a round-robin arbiter drains
// the M queues (m, n) one whole transaction at a time, the rate limiter set by the control plane
// paces it, and a downsizer cuts the 152-bit flits into 64-bit lane words.
//
// Rx path, per lane n: an upsizer rebuilds flits, an edge buffer absorbs them (the lane has no
// back pressure, so a flit arriving at a full buffer is dropped and rx_drop pulses), and the
// response steering crossbar uses the master tag copied back by the memory brick to push each
// response into queue (n, m). Per master port m a round-robin arbiter delivers them.
//
// So the design uses M*N queues on each path, as the document states. All of this structure
// follows the document; queue depths, the lane edge buffer and the status pulses are this
// design's choices. One clock domain.
module cdmc
  import dmc_pkg::*;
#(
  parameter int M       = 2,
  parameter int N       = 2,
  parameter int ENTRIES = 4,
  parameter int QDEPTH  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // master ports: requests in, responses out
  input  logic [M-1:0]      m_req_valid,
  output logic [M-1:0]      m_req_ready,
  input  flit_t             m_req_flit [M],
  output logic [M-1:0]      m_rsp_valid,
  input  logic [M-1:0]      m_rsp_ready,
  output flit_t             m_rsp_flit [M],
  // rate limiter configuration, one set per lane
  input  logic [N-1:0]      rl_en,
  input  logic [8:0]        rl_rate  [N],
  input  logic [7:0]        rl_burst [N],
  // lanes to and from the serDES pipelines
  output logic [N-1:0]      tx_valid,
  output logic [LANE_W-1:0] tx_data [N],
  input  logic [N-1:0]      rx_valid,
  input  logic [LANE_W-1:0] rx_data [N],
  // status
  output logic [M-1:0]      lookup_miss,
  output logic [M-1:0]      cfg_write,
  output logic [N-1:0]      throttled,
  output logic [N-1:0]      rx_drop
);
  localparam int CW = $clog2(QDEPTH + 1);

  // ---------------- Tx path ----------------
  logic [N-1:0] st_valid [M];
  logic [N-1:0] st_ready [M];
  flit_t        st_flit  [M];

  logic [M-1:0] txq_valid [N];  // indexed [lane][master]
  logic [M-1:0] txq_ready [N];
  flit_t        txq_flit  [N][M];

  for (genvar m = 0; m < M; m++) begin : g_master_tx
    req_prep_steer #(.N(N), .ENTRIES(ENTRIES), .MASTER_ID(m)) u_prep (
      .clk, .rst_n,
      .in_valid    (m_req_valid[m]),
      .in_ready    (m_req_ready[m]),
      .in_flit     (m_req_flit[m]),
      .out_valid   (st_valid[m]),
      .out_ready   (st_ready[m]),
      .out_flit    (st_flit[m]),
      .lookup_miss (lookup_miss[m]),
      .cfg_write   (cfg_write[m])
    );
    for (genvar n = 0; n < N; n++) begin : g_q
      logic [CW-1:0] unused_count;
      edge_fifo #(.WIDTH(FLIT_W), .DEPTH(QDEPTH)) u_q (
        .clk, .rst_n,
        .in_valid  (st_valid[m][n]),
        .in_ready  (st_ready[m][n]),
        .in_data   (st_flit[m]),
        .out_valid (txq_valid[n][m]),
        .out_ready (txq_ready[n][m]),
        .out_data  (txq_flit[n][m]),
        .count     (unused_count)
      );
    end
  end

  for (genvar n = 0; n < N; n++) begin : g_lane_tx
    logic  arb_valid, arb_ready, rl_valid, rl_ready;
    flit_t arb_flit, rl_flit;
    logic [((M > 1) ? $clog2(M) : 1)-1:0] unused_grant;

    txn_rr_arbiter #(.NIN(M)) u_arb (
      .clk, .rst_n,
      .in_valid  (txq_valid[n]),
      .in_ready  (txq_ready[n]),
      .in_flit   (txq_flit[n]),
      .out_valid (arb_valid),
      .out_ready (arb_ready),
      .out_flit  (arb_flit),
      .grant     (unused_grant)
    );
    rate_limiter u_rl (
      .clk, .rst_n,
      .cfg_en    (rl_en[n]),
      .cfg_rate  (rl_rate[n]),
      .cfg_burst (rl_burst[n]),
      .in_valid  (arb_valid),
      .in_ready  (arb_ready),
      .in_flit   (arb_flit),
      .out_valid (rl_valid),
      .out_ready (rl_ready),
      .out_flit  (rl_flit),
      .throttled (throttled[n])
    );
    flit_downsizer u_down (
      .clk, .rst_n,
      .in_valid (rl_valid),
      .in_ready (rl_ready),
      .in_flit  (rl_flit),
      .tx_valid (tx_valid[n]),
      .tx_data  (tx_data[n])
    );
  end

  // ---------------- Rx path ----------------
  logic [N-1:0] rxq_valid [M];  // indexed [master][lane]
  logic [N-1:0] rxq_ready [M];
  flit_t        rxq_flit  [M][N];

  for (genvar n = 0; n < N; n++) begin : g_lane_rx
    logic  up_valid, buf_ready, buf_valid, buf_pop, unused_first;
    flit_t up_flit, buf_flit, rs_flit;
    logic [M-1:0] rs_valid, rs_ready;
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

    txn_steer #(.NOUT(M), .DW(MTAG_W)) u_rsteer (
      .clk, .rst_n,
      .in_valid   (buf_valid),
      .in_ready   (buf_pop),
      .in_flit    (buf_flit),
      .in_dest    (buf_flit.mtag),
      .in_discard (1'b0),
      .out_valid  (rs_valid),
      .out_ready  (rs_ready),
      .out_flit   (rs_flit),
      .first      (unused_first)
    );
    for (genvar m = 0; m < M; m++) begin : g_q
      logic [CW-1:0] unused_qcount;
      edge_fifo #(.WIDTH(FLIT_W), .DEPTH(QDEPTH)) u_q (
        .clk, .rst_n,
        .in_valid  (rs_valid[m]),
        .in_ready  (rs_ready[m]),
        .in_data   (rs_flit),
        .out_valid (rxq_valid[m][n]),
        .out_ready (rxq_ready[m][n]),
        .out_data  (rxq_flit[m][n]),
        .count     (unused_qcount)
      );
    end
  end

  for (genvar m = 0; m < M; m++) begin : g_master_rx
    logic [((N > 1) ? $clog2(N) : 1)-1:0] unused_grant;
    txn_rr_arbiter #(.NIN(N)) u_arb (
      .clk, .rst_n,
      .in_valid  (rxq_valid[m]),
      .in_ready  (rxq_ready[m]),
      .in_flit   (rxq_flit[m]),
      .out_valid (m_rsp_valid[m]),
      .out_ready (m_rsp_ready[m]),
      .out_flit  (m_rsp_flit[m]),
      .grant     (unused_grant)
    );
  end

endmodule
