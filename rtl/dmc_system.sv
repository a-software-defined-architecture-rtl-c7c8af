// dmc_system: the disaggregated memory data path of one compute brick and one memory brick.
//
// A compute brick maps remote memory segments into its own physical address space. Its DMC
// (cdmc) intercepts bus requests to those segments, rewrites their addresses into the memory
// brick's space, and sends them as flits over serial lanes; the memory brick's DMC (mdmc)
// hands them to its memory controllers and returns the responses on the same lanes. The lanes
// run through serDES cores and a circuit switch that sit outside this RTL, so both DMCs' lane
// ports are brought out here: a system connects cdmc lane n to an mdmc lane through a
// point-to-point circuit. Likewise the master-port and slave-port flit streams are ports.
//
// The prototype configuration is the default: two master ports, two lanes, two slave ports.
module dmc_system
  import dmc_pkg::*;
#(
  parameter int M         = 2,
  parameter int N         = 2,
  parameter int S         = 2,
  parameter int ENTRIES   = 4,
  parameter int QDEPTH    = 8,
  parameter int SLAVE_LSB = 30
) (
  input  logic              clk,
  input  logic              rst_n,
  // compute brick: master ports
  input  logic [M-1:0]      m_req_valid,
  output logic [M-1:0]      m_req_ready,
  input  flit_t             m_req_flit [M],
  output logic [M-1:0]      m_rsp_valid,
  input  logic [M-1:0]      m_rsp_ready,
  output flit_t             m_rsp_flit [M],
  // compute brick: rate limiter configuration from the control plane
  input  logic [N-1:0]      rl_en,
  input  logic [8:0]        rl_rate  [N],
  input  logic [7:0]        rl_burst [N],
  // compute brick: lanes
  output logic [N-1:0]      c_tx_valid,
  output logic [LANE_W-1:0] c_tx_data [N],
  input  logic [N-1:0]      c_rx_valid,
  input  logic [LANE_W-1:0] c_rx_data [N],
  // memory brick: lanes
  input  logic [N-1:0]      d_rx_valid,
  input  logic [LANE_W-1:0] d_rx_data [N],
  output logic [N-1:0]      d_tx_valid,
  output logic [LANE_W-1:0] d_tx_data [N],
  // memory brick: slave ports
  output logic [S-1:0]      s_req_valid,
  input  logic [S-1:0]      s_req_ready,
  output flit_t             s_req_flit [S],
  input  logic [S-1:0]      s_rsp_valid,
  output logic [S-1:0]      s_rsp_ready,
  input  flit_t             s_rsp_flit [S],
  // status
  output logic [M-1:0]      lookup_miss,
  output logic [M-1:0]      cfg_write,
  output logic [N-1:0]      throttled,
  output logic [N-1:0]      c_rx_drop,
  output logic [N-1:0]      d_rx_drop
);

  cdmc #(.M(M), .N(N), .ENTRIES(ENTRIES), .QDEPTH(QDEPTH)) u_cdmc (
    .clk, .rst_n,
    .m_req_valid, .m_req_ready, .m_req_flit,
    .m_rsp_valid, .m_rsp_ready, .m_rsp_flit,
    .rl_en, .rl_rate, .rl_burst,
    .tx_valid (c_tx_valid), .tx_data (c_tx_data),
    .rx_valid (c_rx_valid), .rx_data (c_rx_data),
    .lookup_miss, .cfg_write, .throttled,
    .rx_drop  (c_rx_drop)
  );

  mdmc #(.N(N), .S(S), .QDEPTH(QDEPTH), .SLAVE_LSB(SLAVE_LSB)) u_mdmc (
    .clk, .rst_n,
    .rx_valid (d_rx_valid), .rx_data (d_rx_data),
    .tx_valid (d_tx_valid), .tx_data (d_tx_data),
    .s_req_valid, .s_req_ready, .s_req_flit,
    .s_rsp_valid, .s_rsp_ready, .s_rsp_flit,
    .rx_drop  (d_rx_drop)
  );

endmodule
