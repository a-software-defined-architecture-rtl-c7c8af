// mbrick_streamer: the streamer of a memory-brick slave port.
//
// It sits between one slave port of the memory-brick DMC and the AXI4 interconnect in front of
// a memory controller (this module is the AXI4 master), and turns the 152-bit flit path back
// into AXI4 channels:
//   * an AR flit issues an AR; an AW flit issues an AW and the W flits that follow it drive the
//     W channel (wlast = end of transaction);
//   * the master tag and link tag of the request are carried in the upper bits of the AXI id,
//     so every R and B coming back can be tagged for the way home without a lookup table;
//   * R and B responses are merged into one flit stream; an R burst is never interrupted.
// Delivery of requests to AXI4 slaves and the return path follow the document; carrying the
// tags in the id and the R/B merge order are this design's choices.
//
// Timing: combinational between the flit path and the channels; one flit per cycle.
module mbrick_streamer
  import dmc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // flit path from and to the DMC slave port
  input  logic     req_valid,
  output logic     req_ready,
  input  flit_t    req_flit,
  output logic     rsp_valid,
  input  logic     rsp_ready,
  output flit_t    rsp_flit,
  // AXI4 master
  output logic     awvalid,
  input  logic     awready,
  output axi_sax_t aw,
  output logic     wvalid,
  input  logic     wready,
  output axi_w_t   w,
  input  logic     bvalid,
  output logic     bready,
  input  axi_sb_t  b,
  output logic     arvalid,
  input  logic     arready,
  output axi_sax_t ar,
  input  logic     rvalid,
  output logic     rready,
  input  axi_sr_t  r
);
  logic in_w_q;      // W beats of an accepted AW are flowing
  logic in_r_q;      // an R burst is being forwarded
  logic sel_r;
  axi_sax_t ax;

  // ---------------- requests ----------------
  always_comb begin
    ax.id    = {req_flit.ltag, req_flit.mtag, req_flit.body[58:53]};
    ax.addr  = req_flit.body[ADDR_W-1:0];
    ax.len   = req_flit.body[47:40];
    ax.size  = req_flit.body[50:48];
    ax.burst = req_flit.body[52:51];
    aw = ax;
    ar = ax;
    w.data = req_flit.body[127:0];
    w.strb = req_flit.body[143:128];
    w.last = req_flit.eot;
    awvalid = 1'b0;
    wvalid  = 1'b0;
    arvalid = 1'b0;
    if (in_w_q) begin
      wvalid    = req_valid;
      req_ready = wready;
    end else if (req_flit.kind == K_AW) begin
      awvalid   = req_valid;
      req_ready = awready;
    end else if (req_flit.kind == K_AR) begin
      arvalid   = req_valid;
      req_ready = arready;
    end else begin
      req_ready = 1'b1;   // not a request: drop it
    end
  end

  // ---------------- responses ----------------
  assign sel_r = in_r_q || !bvalid;

  always_comb begin
    rsp_flit = '0;
    if (sel_r) begin
      rsp_valid             = rvalid;
      rsp_flit.kind         = K_R;
      rsp_flit.eot          = r.last;
      {rsp_flit.ltag, rsp_flit.mtag} = r.id[AXI_SID_W-1:AXI_ID_W];
      rsp_flit.body[127:0]   = r.data;
      rsp_flit.body[129:128] = r.resp;
      rsp_flit.body[135:130] = r.id[AXI_ID_W-1:0];
    end else begin
      rsp_valid             = bvalid;
      rsp_flit.kind         = K_B;
      rsp_flit.eot          = 1'b1;
      {rsp_flit.ltag, rsp_flit.mtag} = b.id[AXI_SID_W-1:AXI_ID_W];
      rsp_flit.body[1:0]    = b.resp;
      rsp_flit.body[7:2]    = b.id[AXI_ID_W-1:0];
    end
    rready = sel_r && rsp_ready;
    bready = !sel_r && rsp_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_w_q <= 1'b0;
      in_r_q <= 1'b0;
    end else begin
      if (awvalid && awready) in_w_q <= 1'b1;
      else if (wvalid && wready && w.last) in_w_q <= 1'b0;
      if (rvalid && rready) in_r_q <= !r.last;
    end
  end

endmodule
