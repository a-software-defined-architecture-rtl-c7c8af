// dmc_prototype: the complete two-brick memory disaggregation data path, AXI4 to AXI4.
//
// Compute brick: each of the M AXI4 master ports of the processor's memory bus feeds a
// cbrick_streamer, which packs the AXI4 channels into flits for the compute-brick DMC. Memory
// brick: each of the S slave ports of the memory-brick DMC feeds an mbrick_streamer, which
// unpacks the flits into AXI4 requests for a memory controller. Between the two DMCs run N
// serial lanes; their serDES cores and the circuit-switched path are not part of this RTL, so
// the lane words of both bricks are ports (c_* on the compute brick, d_* on the memory brick).
//
// Software reaches a remote segment once the control plane has (1) written the segment into the
// lookup table of a master port, by AXI4 writes into that port's configuration window, and
// (2) set up the lane circuit. Rate limiters are set through the rl_* ports.
//
// Defaults are the prototype's: two master ports, two lanes, two memory slave ports.
module dmc_prototype
  import dmc_pkg::*;
#(
  parameter int                M         = 2,
  parameter int                N         = 2,
  parameter int                S         = 2,
  parameter int                ENTRIES   = 4,
  parameter int                QDEPTH    = 8,
  parameter int                SLAVE_LSB = 30,
  parameter logic [ADDR_W-1:0] CFG_BASE  = 40'h00_A000_0000
) (
  input  logic              clk,
  input  logic              rst_n,
  // compute brick: AXI4 slave side of each master port
  input  logic [M-1:0]      m_awvalid,
  output logic [M-1:0]      m_awready,
  input  axi_ax_t           m_aw [M],
  input  logic [M-1:0]      m_wvalid,
  output logic [M-1:0]      m_wready,
  input  axi_w_t            m_w [M],
  output logic [M-1:0]      m_bvalid,
  input  logic [M-1:0]      m_bready,
  output axi_b_t            m_b [M],
  input  logic [M-1:0]      m_arvalid,
  output logic [M-1:0]      m_arready,
  input  axi_ax_t           m_ar [M],
  output logic [M-1:0]      m_rvalid,
  input  logic [M-1:0]      m_rready,
  output axi_r_t            m_r [M],
  // compute brick: rate limiters
  input  logic [N-1:0]      rl_en,
  input  logic [8:0]        rl_rate  [N],
  input  logic [7:0]        rl_burst [N],
  // lanes
  output logic [N-1:0]      c_tx_valid,
  output logic [LANE_W-1:0] c_tx_data [N],
  input  logic [N-1:0]      c_rx_valid,
  input  logic [LANE_W-1:0] c_rx_data [N],
  input  logic [N-1:0]      d_rx_valid,
  input  logic [LANE_W-1:0] d_rx_data [N],
  output logic [N-1:0]      d_tx_valid,
  output logic [LANE_W-1:0] d_tx_data [N],
  // memory brick: AXI4 master side of each slave port
  output logic [S-1:0]      s_awvalid,
  input  logic [S-1:0]      s_awready,
  output axi_sax_t          s_aw [S],
  output logic [S-1:0]      s_wvalid,
  input  logic [S-1:0]      s_wready,
  output axi_w_t            s_w [S],
  input  logic [S-1:0]      s_bvalid,
  output logic [S-1:0]      s_bready,
  input  axi_sb_t           s_b [S],
  output logic [S-1:0]      s_arvalid,
  input  logic [S-1:0]      s_arready,
  output axi_sax_t          s_ar [S],
  input  logic [S-1:0]      s_rvalid,
  output logic [S-1:0]      s_rready,
  input  axi_sr_t           s_r [S],
  // status
  output logic [M-1:0]      lookup_miss,
  output logic [M-1:0]      cfg_write,
  output logic [N-1:0]      throttled,
  output logic [N-1:0]      c_rx_drop,
  output logic [N-1:0]      d_rx_drop
);
  logic [M-1:0] mreq_valid, mreq_ready, mrsp_valid, mrsp_ready;
  flit_t        mreq_flit [M], mrsp_flit [M];
  logic [S-1:0] sreq_valid, sreq_ready, srsp_valid, srsp_ready;
  flit_t        sreq_flit [S], srsp_flit [S];

  for (genvar m = 0; m < M; m++) begin : g_cstream
    cbrick_streamer #(.CFG_BASE(CFG_BASE)) u_str (
      .clk, .rst_n,
      .awvalid (m_awvalid[m]), .awready (m_awready[m]), .aw (m_aw[m]),
      .wvalid  (m_wvalid[m]),  .wready  (m_wready[m]),  .w  (m_w[m]),
      .bvalid  (m_bvalid[m]),  .bready  (m_bready[m]),  .b  (m_b[m]),
      .arvalid (m_arvalid[m]), .arready (m_arready[m]), .ar (m_ar[m]),
      .rvalid  (m_rvalid[m]),  .rready  (m_rready[m]),  .r  (m_r[m]),
      .req_valid (mreq_valid[m]), .req_ready (mreq_ready[m]), .req_flit (mreq_flit[m]),
      .rsp_valid (mrsp_valid[m]), .rsp_ready (mrsp_ready[m]), .rsp_flit (mrsp_flit[m])
    );
  end

  dmc_system #(.M(M), .N(N), .S(S), .ENTRIES(ENTRIES), .QDEPTH(QDEPTH), .SLAVE_LSB(SLAVE_LSB)) u_dmc (
    .clk, .rst_n,
    .m_req_valid (mreq_valid), .m_req_ready (mreq_ready), .m_req_flit (mreq_flit),
    .m_rsp_valid (mrsp_valid), .m_rsp_ready (mrsp_ready), .m_rsp_flit (mrsp_flit),
    .rl_en, .rl_rate, .rl_burst,
    .c_tx_valid, .c_tx_data, .c_rx_valid, .c_rx_data,
    .d_rx_valid, .d_rx_data, .d_tx_valid, .d_tx_data,
    .s_req_valid (sreq_valid), .s_req_ready (sreq_ready), .s_req_flit (sreq_flit),
    .s_rsp_valid (srsp_valid), .s_rsp_ready (srsp_ready), .s_rsp_flit (srsp_flit),
    .lookup_miss, .cfg_write, .throttled, .c_rx_drop, .d_rx_drop
  );

  for (genvar s = 0; s < S; s++) begin : g_mstream
    mbrick_streamer u_str (
      .clk, .rst_n,
      .req_valid (sreq_valid[s]), .req_ready (sreq_ready[s]), .req_flit (sreq_flit[s]),
      .rsp_valid (srsp_valid[s]), .rsp_ready (srsp_ready[s]), .rsp_flit (srsp_flit[s]),
      .awvalid (s_awvalid[s]), .awready (s_awready[s]), .aw (s_aw[s]),
      .wvalid  (s_wvalid[s]),  .wready  (s_wready[s]),  .w  (s_w[s]),
      .bvalid  (s_bvalid[s]),  .bready  (s_bready[s]),  .b  (s_b[s]),
      .arvalid (s_arvalid[s]), .arready (s_arready[s]), .ar (s_ar[s]),
      .rvalid  (s_rvalid[s]),  .rready  (s_rready[s]),  .r  (s_r[s])
    );
  end

endmodule
