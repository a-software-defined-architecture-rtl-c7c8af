// tb_dmc_system: end-to-end test of the compute-brick and memory-brick DMCs at their default
// (prototype) configuration: 2 master ports, 2 lanes, 2 memory slave ports.
//
// Both DMCs are joined lane to lane by 57-cycle lane models in each direction, and each memory
// slave port is served by a flit-level memory model. The test:
//   1. writes four segment entries in-band (two per master port), each master reaching both
//      lanes and, through them, both memory slaves;
//   2. measures the round trip of one read with an idle system and a zero-delay memory and
//      checks it against the 134-cycle round trip quoted for the prototype;
//   3. runs concurrent random write bursts from both masters, then reads everything back and
//      compares data, ids and the master each response returns to;
//   4. sends a request to an unmapped address (lookup miss: dropped, no response);
//   5. enables a lane's rate limiter and checks the lane's flit rate;
//   6. stalls the memory slaves and floods the lanes until the memory brick's edge buffers
//      overflow (the case the rate limiters exist to prevent).
// Mechanisms counted, each of which must occur: master-port stall (back pressure), lane arbiter
// switching masters, slave arbiter switching lanes, in-band config write, lookup miss,
// throttling, memory-brick overflow.
module tb_dmc_system;
  import dmc_pkg::*;
  localparam int M = 2, N = 2, S = 2, LINK_LAT = 57;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [M-1:0] m_req_valid, m_req_ready, m_rsp_valid, m_rsp_ready;
  flit_t m_req_flit [M], m_rsp_flit [M];
  logic [N-1:0] rl_en; logic [8:0] rl_rate [N]; logic [7:0] rl_burst [N];
  logic [N-1:0] c_tx_valid, c_rx_valid, d_rx_valid, d_tx_valid;
  logic [63:0] c_tx_data [N], c_rx_data [N], d_rx_data [N], d_tx_data [N];
  logic [S-1:0] s_req_valid, s_req_ready, s_rsp_valid, s_rsp_ready;
  flit_t s_req_flit [S], s_rsp_flit [S];
  logic [M-1:0] lookup_miss, cfg_write;
  logic [N-1:0] throttled, c_rx_drop, d_rx_drop;
  logic [S-1:0] stall;
  int n_req [S], perr [S];

  dmc_system dut (.*);

  for (genvar n = 0; n < N; n++) begin : g_links
    aurora_link_model #(.LAT(LINK_LAT)) u_fwd (.clk, .rst_n, .in_valid(c_tx_valid[n]), .in_data(c_tx_data[n]),
                                              .out_valid(d_rx_valid[n]), .out_data(d_rx_data[n]));
    aurora_link_model #(.LAT(LINK_LAT)) u_rev (.clk, .rst_n, .in_valid(d_tx_valid[n]), .in_data(d_tx_data[n]),
                                              .out_valid(c_rx_valid[n]), .out_data(c_rx_data[n]));
  end
  for (genvar s = 0; s < S; s++) begin : g_mem
    flit_mem_model u_mem (.clk, .rst_n, .stall(stall[s]),
      .req_valid(s_req_valid[s]), .req_ready(s_req_ready[s]), .req_flit(s_req_flit[s]),
      .rsp_valid(s_rsp_valid[s]), .rsp_ready(s_rsp_ready[s]), .rsp_flit(s_rsp_flit[s]),
      .n_requests(n_req[s]), .protocol_errors(perr[s]));
  end

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", msg, cyc); end
  endtask

  // ---------------- segment map ----------------
  // compute-brick base, memory-brick base, lane, per master and segment
  logic [39:0] seg_lo [M][2] = '{'{40'h08_0000_0000, 40'h08_2000_0000}, '{40'h09_0000_0000, 40'h09_2000_0000}};
  logic [39:0] seg_rb [M][2] = '{'{40'h00_0000_0000, 40'h00_4000_0000}, '{40'h00_2000_0000, 40'h00_6000_0000}};
  int          seg_ln [M][2] = '{'{0, 1}, '{1, 0}};

  // ---------------- master drivers and response monitors ----------------
  flit_t mq [M][$];
  typedef struct { bit is_read; logic [39:0] addr; int len; int beat; int issue_cyc; } ost_t;
  ost_t ost [M][int];       // outstanding transactions by id
  logic [127:0] golden [logic [39:0]];
  int n_stall = 0, n_rsp = 0, first_rsp_cyc = -1;
  int n_cfg = 0, n_miss = 0, n_throttle = 0, n_overflow = 0, lane0_words = 0;
  int cur_rsp_id [M];
  int last_rd_latency = -1;

  initial begin
    m_req_valid = '0; m_rsp_ready = '0;
    for (int m = 0; m < M; m++) begin m_req_flit[m] = '0; cur_rsp_id[m] = -1; end
    @(posedge rst_n);
    forever begin
      bit fire [M];
      @(negedge clk);
      for (int m = 0; m < M; m++) begin
        m_req_valid[m] = mq[m].size() > 0;
        m_req_flit[m]  = (mq[m].size() > 0) ? mq[m][0] : '0;
        m_rsp_ready[m] = ($urandom % 100) < 90;
      end
      #1;
      for (int m = 0; m < M; m++) begin
        fire[m] = m_req_valid[m] && m_req_ready[m];
        if (m_req_valid[m] && !m_req_ready[m]) n_stall++;
        if (fire[m] && is_header(m_req_flit[m].kind) && ost[m].exists(int'(m_req_flit[m].body[58:53])))
          ost[m][int'(m_req_flit[m].body[58:53])].issue_cyc = cyc;
        if (m_rsp_valid[m] && m_rsp_ready[m]) check_rsp(m, m_rsp_flit[m]);
      end
      if (cfg_write != 0) n_cfg += $countones(cfg_write);
      if (lookup_miss != 0) n_miss += $countones(lookup_miss);
      if (throttled != 0) n_throttle++;
      if (d_rx_drop != 0) n_overflow++;
      if (c_tx_valid[0]) lane0_words++;
      @(posedge clk);
      for (int m = 0; m < M; m++) if (fire[m]) void'(mq[m].pop_front());
    end
  end

  task automatic check_rsp(input int m, input flit_t f);
    int id = (f.kind == K_B) ? int'(f.body[7:2]) : int'(f.body[135:130]);
    chk(f.mtag == MTAG_W'(m), "response returned to its master port");
    if (!ost[m].exists(id)) begin chk(0, $sformatf("unexpected response id %0d at master %0d", id, m)); return; end
    if (first_rsp_cyc < 0) first_rsp_cyc = cyc;
    if (ost[m][id].is_read) begin
      automatic logic [39:0] a = ost[m][id].addr + 40'(16 * ost[m][id].beat);
      chk(f.kind == K_R, "read answered by R");
      chk(golden.exists(a) && f.body[127:0] == golden[a], $sformatf("read data at %h", a));
      if (ost[m][id].beat == 0) last_rd_latency = cyc - ost[m][id].issue_cyc;
      chk(f.eot == (ost[m][id].beat == ost[m][id].len), "R burst length");
      ost[m][id].beat++;
    end else chk(f.kind == K_B && f.eot, "write answered by B");
    if (f.eot) begin ost[m].delete(id); n_rsp++; end
  endtask

  function automatic flit_t hdr(flit_kind_e k, logic [39:0] a, int len, int id);
    flit_t f = '0;
    f.kind = k; f.eot = (k == K_AR) || (k == K_CFG); f.body[39:0] = a; f.body[47:40] = 8'(len);
    f.body[50:48] = 3'd4; f.body[52:51] = 2'b01; f.body[58:53] = 6'(id);
    return f;
  endfunction

  int next_id [M] = '{0, 0};
  task automatic issue(input int m, input bit rd, input logic [39:0] a, input int len);
    int id = next_id[m]; next_id[m] = (next_id[m] + 1) % 64;
    ost[m][id] = '{rd, a, len, 0, -1};
    mq[m].push_back(hdr(rd ? K_AR : K_AW, a, len, id));
    if (!rd) for (int b = 0; b <= len; b++) begin
      automatic flit_t w = '0;
      automatic logic [127:0] d = {$urandom, $urandom, $urandom, $urandom};
      w.kind = K_W; w.eot = (b == len); w.body[127:0] = d; w.body[143:128] = 16'hFFFF;
      mq[m].push_back(w);
      golden[a + 40'(16 * b)] = d;
    end
  endtask

  task automatic wait_idle(input int limit, input string what);
    int t = 0;
    while ((mq[0].size() + mq[1].size() + ost[0].size() + ost[1].size()) > 0 && t < limit) begin
      @(posedge clk); t++;
    end
    chk(t < limit, {"all responses received: ", what});
  endtask

  // ---------------- mechanism observers at the memory slave ports ----------------
  int last_mtag_on_lane [N] = '{-1, -1}, last_lane_on_slave [S] = '{-1, -1};
  int n_lane_switch = 0, n_slave_switch = 0;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < S; s++)
      if (s_req_valid[s] && s_req_ready[s] && is_header(s_req_flit[s].kind)) begin
        automatic int ln = int'(s_req_flit[s].ltag), mt = int'(s_req_flit[s].mtag);
        if (last_mtag_on_lane[ln] >= 0 && last_mtag_on_lane[ln] != mt) n_lane_switch++;
        if (last_lane_on_slave[s] >= 0 && last_lane_on_slave[s] != ln) n_slave_switch++;
        last_mtag_on_lane[ln] = mt; last_lane_on_slave[s] = ln;
      end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  initial begin
    int latency, t0, w0;
    stall = '0; rl_en = '0;
    for (int n = 0; n < N; n++) begin rl_rate[n] = 9'd256; rl_burst[n] = 8'd4; end
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk);

    // 1. in-band configuration
    for (int m = 0; m < M; m++)
      for (int g = 0; g < 2; g++) begin
        automatic flit_t c = '0;
        c.kind = K_CFG; c.eot = 1;
        c.body[39:0] = seg_lo[m][g]; c.body[79:40] = seg_lo[m][g] + 40'h1FFF_FFFF;
        c.body[119:80] = seg_rb[m][g] - seg_lo[m][g]; c.body[121:120] = 2'(seg_ln[m][g]);
        c.body[125:122] = 4'(g); c.body[126] = 1'b1;
        mq[m].push_back(c);
      end
    repeat (20) @(posedge clk);
    chk(n_cfg == 4, "four in-band lookup writes");

    // 2. round-trip latency of one read; seed the location first
    issue(0, 0, seg_lo[0][0] + 40'h100, 0);
    wait_idle(2000, "seed write");
    repeat (20) @(posedge clk);
    issue(0, 1, seg_lo[0][0] + 40'h100, 0);
    first_rsp_cyc = -1;
    wait_idle(2000, "latency read");
    latency = last_rd_latency;
    // zero-delay memory and 57-cycle lanes: the whole round trip must fit the quoted 134 cycles
    chk(latency > 2 * LINK_LAT && latency <= 134, $sformatf("read round trip %0d cycles", latency));

    // 3. concurrent random writes, then read back
    for (int k = 0; k < 40; k++)
      for (int m = 0; m < M; m++) begin
        automatic int g = $urandom % 2;
        issue(m, 0, seg_lo[m][g] + {24'h0, 10'($urandom), 6'h0}, $urandom % 4);
      end
    wait_idle(40000, "write phase");
    for (int m = 0; m < M; m++) begin
      // read back every written 16-byte word, as cache-line reads
      foreach (golden[a]) begin
        automatic logic [39:0] base = {a[39:6], 6'h0};
        if (a[5:0] == 6'h0 && a >= seg_lo[m][0] && a < seg_lo[m][0] + 40'h4000_0000) begin
          automatic int len = 0;
          automatic logic [39:0] step = 40'd16;
          while (len < 3 && golden.exists(base + step)) begin len++; step += 40'd16; end
          issue(m, 1, base, len);
          if (ost[m].size() >= 48) wait_idle(40000, "read batch");
        end
      end
    end
    wait_idle(40000, "read phase");
    chk(perr[0] == 0 && perr[1] == 0, "memory slaves saw whole, well-formed transactions");
    chk(n_req[0] > 0 && n_req[1] > 0, "both memory slaves served requests");

    // 4. unmapped address
    begin
      automatic flit_t h = hdr(K_AR, 40'h0C_0000_0000, 0, 63);
      mq[1].push_back(h);
      repeat (300) @(posedge clk);
      chk(n_miss == 1, "unmapped request reported as lookup miss");
    end

    // 5. rate limiter on lane 0: 1/8 flit per cycle, bucket of 2 flits
    @(negedge clk); rl_rate[0] = 9'd32; rl_burst[0] = 8'd2; rl_en[0] = 1'b1;
    w0 = lane0_words; t0 = cyc;
    for (int k = 0; k < 30; k++) issue(0, 0, seg_lo[0][0] + 40'h10_0000 + 40'(64 * k), 3);
    wait_idle(40000, "rate-limited writes");
    begin
      automatic int flits = (lane0_words - w0) / LANE_WORDS;
      automatic int span  = cyc - t0;
      chk(flits >= 150, "rate-limited phase carried its writes");
      chk(flits <= 2 + (span * 32) / 256 + 1, $sformatf("lane 0 rate: %0d flits in %0d cycles", flits, span));
    end
    @(negedge clk); rl_en[0] = 1'b0;

    // 6. memory slaves stalled, lanes flooded: the memory brick overflows
    stall = '1;
    for (int k = 0; k < 30; k++)
      for (int m = 0; m < M; m++) issue(m, 0, seg_lo[m][k % 2] + 40'h20_0000 + 40'(64 * k), 3);
    repeat (3000) @(posedge clk);

    $display("latency=%0d stalls=%0d lane_switch=%0d slave_switch=%0d cfg=%0d miss=%0d throttle=%0d overflow=%0d",
             latency, n_stall, n_lane_switch, n_slave_switch, n_cfg, n_miss, n_throttle, n_overflow);
    chk(n_stall > 0, "master port stalled by back pressure");
    chk(n_lane_switch > 0, "lane arbiter switched between masters");
    chk(n_slave_switch > 0, "slave arbiter switched between lanes");
    chk(n_throttle > 0, "rate limiter throttled");
    chk(n_overflow > 0, "memory-brick edge buffer overflowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
