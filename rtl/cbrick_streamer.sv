// cbrick_streamer: the streamer of a compute-brick master port.
//
// It sits between one AXI4 master port of the processor's memory bus (this module is the AXI4
// slave) and one master port of the compute-brick DMC, and time-multiplexes the five AXI4
// channels onto the single 152-bit flit path in both directions:
//   * an AR becomes one AR flit; an AW becomes an AW flit followed by its W beats, the last one
//     marked end-of-transaction. Reads and writes take turns when both wait.
//   * R flits coming back drive the R channel (rlast = end of transaction) and B flits the B
//     channel.
//   * A write into the configuration window [CFG_BASE, CFG_BASE + 4 KiB) is the in-band path to
//     the MemPort Lookup Structure: each of its W beats becomes one CFG flit (the beat's low 127
//     bits are the entry, see dmc_pkg) and the streamer answers the write with its own B.
// The time multiplexing onto one 152-bit path follows the document; the channel order, the
// configuration window and its address are this design's choices.
//
// Timing: combinational between channels and the flit path (no added cycle); one flit per cycle.
module cbrick_streamer
  import dmc_pkg::*;
#(
  parameter logic [ADDR_W-1:0] CFG_BASE = 40'h00_A000_0000
) (
  input  logic    clk,
  input  logic    rst_n,
  // AXI4 slave
  input  logic    awvalid,
  output logic    awready,
  input  axi_ax_t aw,
  input  logic    wvalid,
  output logic    wready,
  input  axi_w_t  w,
  output logic    bvalid,
  input  logic    bready,
  output axi_b_t  b,
  input  logic    arvalid,
  output logic    arready,
  input  axi_ax_t ar,
  output logic    rvalid,
  input  logic    rready,
  output axi_r_t  r,
  // flit path to and from the DMC master port
  output logic    req_valid,
  input  logic    req_ready,
  output flit_t   req_flit,
  input  logic    rsp_valid,
  output logic    rsp_ready,
  input  flit_t   rsp_flit
);
  typedef enum logic [1:0] { S_IDLE, S_WDATA, S_CFGW, S_CFGB } state_e;
  state_e              state_q;
  logic                prefer_w_q;   // round robin between the read and write channels
  logic [AXI_ID_W-1:0] cfg_id_q;
  logic                pick_w, aw_cfg;

  function automatic flit_t ax_flit(input flit_kind_e k, input axi_ax_t a);
    flit_t f = '0;
    f.kind = k;
    f.eot  = (k == K_AR);
    f.body[ADDR_W-1:0] = a.addr;
    f.body[47:40]      = a.len;
    f.body[50:48]      = a.size;
    f.body[52:51]      = a.burst;
    f.body[58:53]      = a.id;
    return f;
  endfunction

  assign aw_cfg = (aw.addr[ADDR_W-1:12] == CFG_BASE[ADDR_W-1:12]);
  assign pick_w = awvalid && (!arvalid || prefer_w_q);

  // ---------------- requests ----------------
  always_comb begin
    req_valid = 1'b0;
    req_flit  = '0;
    awready   = 1'b0;
    wready    = 1'b0;
    arready   = 1'b0;
    case (state_q)
      S_IDLE: begin
        if (pick_w) begin
          if (aw_cfg) awready = 1'b1;
          else begin
            req_valid = 1'b1;
            req_flit  = ax_flit(K_AW, aw);
            awready   = req_ready;
          end
        end else if (arvalid) begin
          req_valid = 1'b1;
          req_flit  = ax_flit(K_AR, ar);
          arready   = req_ready;
        end
      end
      S_WDATA: begin
        req_valid = wvalid;
        req_flit.kind = K_W;
        req_flit.eot  = w.last;
        req_flit.body = {w.strb, w.data};
        wready    = req_ready;
      end
      S_CFGW: begin
        req_valid = wvalid;
        req_flit.kind = K_CFG;
        req_flit.eot  = 1'b1;
        req_flit.body = {16'h0, w.data};
        wready    = req_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      prefer_w_q <= 1'b0;
      cfg_id_q   <= '0;
    end else begin
      case (state_q)
        S_IDLE: begin
          if (awvalid && awready) begin
            state_q    <= aw_cfg ? S_CFGW : S_WDATA;
            cfg_id_q   <= aw.id;
            prefer_w_q <= 1'b0;
          end else if (arvalid && arready) begin
            prefer_w_q <= 1'b1;
          end
        end
        S_WDATA: if (wvalid && wready && w.last) state_q <= S_IDLE;
        S_CFGW:  if (wvalid && wready && w.last) state_q <= S_CFGB;
        S_CFGB:  if (bready) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ---------------- responses ----------------
  always_comb begin
    rvalid    = 1'b0;
    bvalid    = 1'b0;
    rsp_ready = 1'b0;
    r.id   = rsp_flit.body[135:130];
    r.data = rsp_flit.body[127:0];
    r.resp = rsp_flit.body[129:128];
    r.last = rsp_flit.eot;
    b.id   = rsp_flit.body[7:2];
    b.resp = rsp_flit.body[1:0];
    if (state_q == S_CFGB) begin
      // the local answer to a configuration write goes first
      bvalid = 1'b1;
      b.id   = cfg_id_q;
      b.resp = 2'b00;
    end else if (rsp_valid && rsp_flit.kind == K_B) begin
      bvalid    = 1'b1;
      rsp_ready = bready;
    end
    if (rsp_valid && rsp_flit.kind == K_R) begin
      rvalid    = 1'b1;
      rsp_ready = rready;
    end else if (rsp_valid && rsp_flit.kind != K_B) begin
      rsp_ready = 1'b1;   // nothing else is a response: drop it
    end
  end

endmodule
