// tb_dmc_prototype: end-to-end test of the whole data path, AXI4 master ports of the compute
// brick to AXI4 memory slaves of the memory brick, at the default (prototype) configuration:
// 2 master ports, 2 lanes, 2 memory slave ports, lanes of 57 cycles each way.
//
//   1. the control plane writes two segments per master port through each port's AXI4
//      configuration window (answered locally with B OKAY);
//   2. one read crosses an idle system: its round trip, AR accepted to first R beat, with a
//      zero-delay memory, must fit the 134 cycles quoted for the prototype;
//   3. both ports write random bursts to both segments, then read everything back: data, ids,
//      burst lengths and the port each response returns to are checked;
//   4. a read to an unmapped address is dropped and reported as a lookup miss;
//   5. a rate limiter paces lane 0 and its flit rate is checked;
//   6. with the memories stalled, the lanes are flooded until the memory brick overflows.
// Mechanisms counted, each of which must occur: master-port back pressure, in-band
// configuration, lookup miss, throttling, memory-brick overflow, read/write channel
// alternation in a streamer.
module tb_dmc_prototype;
  import dmc_pkg::*;
  localparam int M = 2, N = 2, S = 2, LINK_LAT = 57;
  localparam logic [39:0] CFG_BASE = 40'h00_A000_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [M-1:0] m_awvalid, m_awready, m_wvalid, m_wready, m_bvalid, m_bready;
  logic [M-1:0] m_arvalid, m_arready, m_rvalid, m_rready;
  axi_ax_t m_aw [M], m_ar [M]; axi_w_t m_w [M]; axi_b_t m_b [M]; axi_r_t m_r [M];
  logic [N-1:0] rl_en; logic [8:0] rl_rate [N]; logic [7:0] rl_burst [N];
  logic [N-1:0] c_tx_valid, c_rx_valid, d_rx_valid, d_tx_valid;
  logic [63:0] c_tx_data [N], c_rx_data [N], d_rx_data [N], d_tx_data [N];
  logic [S-1:0] s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic [S-1:0] s_arvalid, s_arready, s_rvalid, s_rready;
  axi_sax_t s_aw [S], s_ar [S]; axi_w_t s_w [S]; axi_sb_t s_b [S]; axi_sr_t s_r [S];
  logic [M-1:0] lookup_miss, cfg_write;
  logic [N-1:0] throttled, c_rx_drop, d_rx_drop;
  logic [S-1:0] stall;
  int n_req [S], perr [S];

  dmc_prototype dut (.*);

  for (genvar n = 0; n < N; n++) begin : g_links
    aurora_link_model #(.LAT(LINK_LAT)) u_fwd (.clk, .rst_n, .in_valid(c_tx_valid[n]), .in_data(c_tx_data[n]),
                                              .out_valid(d_rx_valid[n]), .out_data(d_rx_data[n]));
    aurora_link_model #(.LAT(LINK_LAT)) u_rev (.clk, .rst_n, .in_valid(d_tx_valid[n]), .in_data(d_tx_data[n]),
                                              .out_valid(c_rx_valid[n]), .out_data(c_rx_data[n]));
  end
  for (genvar s = 0; s < S; s++) begin : g_mem
    axi_mem_model u_mem (.clk, .rst_n, .stall(stall[s]),
      .awvalid(s_awvalid[s]), .awready(s_awready[s]), .aw(s_aw[s]),
      .wvalid(s_wvalid[s]), .wready(s_wready[s]), .w(s_w[s]),
      .bvalid(s_bvalid[s]), .bready(s_bready[s]), .b(s_b[s]),
      .arvalid(s_arvalid[s]), .arready(s_arready[s]), .ar(s_ar[s]),
      .rvalid(s_rvalid[s]), .rready(s_rready[s]), .r(s_r[s]),
      .n_requests(n_req[s]), .protocol_errors(perr[s]));
  end

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", msg, cyc); end
  endtask

  logic [39:0] seg_lo [M][2] = '{'{40'h08_0000_0000, 40'h08_2000_0000}, '{40'h09_0000_0000, 40'h09_2000_0000}};
  logic [39:0] seg_rb [M][2] = '{'{40'h00_0000_0000, 40'h00_4000_0000}, '{40'h00_2000_0000, 40'h00_6000_0000}};
  int          seg_ln [M][2] = '{'{0, 1}, '{1, 0}};

  // ---------------- AXI4 masters ----------------
  axi_ax_t awq [M][$], arq [M][$]; axi_w_t wq [M][$];
  typedef struct { bit rd; logic [39:0] addr; int len; int beat; int issue_cyc; } ost_t;
  ost_t ost [M][int];
  logic [127:0] golden [logic [39:0]];
  int next_id [M] = '{0, 0};
  int n_stall = 0, n_cfg = 0, n_miss = 0, n_throttle = 0, n_overflow = 0, lane0_words = 0;
  int n_alternate = 0, last_rd_latency = -1, n_local_b = 0;
  int last_kind [M] = '{-1, -1};
  logic [39:0] written [$];

  function automatic axi_ax_t ax(input logic [39:0] a, input int len, input int id);
    axi_ax_t x;
    x.id = 6'(id); x.addr = a; x.len = 8'(len); x.size = 3'd4; x.burst = 2'b01;
    return x;
  endfunction

  task automatic issue(input int m, input bit rd, input logic [39:0] a, input int len);
    automatic int id = next_id[m];
    next_id[m] = (next_id[m] + 1) % 64;
    ost[m][id] = '{rd, a, len, 0, -1};
    if (rd) arq[m].push_back(ax(a, len, id));
    else begin
      awq[m].push_back(ax(a, len, id));
      for (int b = 0; b <= len; b++) begin
        automatic axi_w_t x;
        x.data = {$urandom, $urandom, $urandom, $urandom}; x.strb = '1; x.last = (b == len);
        wq[m].push_back(x);
        if (a[39:12] != CFG_BASE[39:12]) golden[a + 40'(16 * b)] = x.data;
      end
    end
  endtask

  task automatic cfg_write_entries(input int m);
    automatic int id = next_id[m];
    next_id[m] = (next_id[m] + 1) % 64;
    ost[m][id] = '{0, CFG_BASE, 1, 0, -1};
    awq[m].push_back(ax(CFG_BASE, 1, id));
    for (int g = 0; g < 2; g++) begin
      automatic axi_w_t x = '0;
      x.data[39:0] = seg_lo[m][g]; x.data[79:40] = seg_lo[m][g] + 40'h1FFF_FFFF;
      x.data[119:80] = seg_rb[m][g] - seg_lo[m][g]; x.data[121:120] = 2'(seg_ln[m][g]);
      x.data[125:122] = 4'(g); x.data[126] = 1'b1; x.strb = '1; x.last = (g == 1);
      wq[m].push_back(x);
    end
  endtask

  initial begin
    m_awvalid = '0; m_wvalid = '0; m_arvalid = '0; m_bready = '0; m_rready = '0;
    for (int m = 0; m < M; m++) begin m_aw[m] = '0; m_ar[m] = '0; m_w[m] = '0; end
    @(posedge rst_n);
    forever begin
      bit faw [M], fw [M], far [M];
      @(negedge clk);
      for (int m = 0; m < M; m++) begin
        m_awvalid[m] = awq[m].size() > 0; if (awq[m].size() > 0) m_aw[m] = awq[m][0];
        m_wvalid[m]  = wq[m].size() > 0;  if (wq[m].size() > 0)  m_w[m]  = wq[m][0];
        m_arvalid[m] = arq[m].size() > 0; if (arq[m].size() > 0) m_ar[m] = arq[m][0];
        m_bready[m]  = ($urandom % 100) < 90;
        m_rready[m]  = ($urandom % 100) < 90;
      end
      #1;
      for (int m = 0; m < M; m++) begin
        faw[m] = m_awvalid[m] && m_awready[m];
        fw[m]  = m_wvalid[m] && m_wready[m];
        far[m] = m_arvalid[m] && m_arready[m];
        if ((m_awvalid[m] && !m_awready[m] && !m_arready[m]) || (m_wvalid[m] && !m_wready[m])) n_stall++;
        if (far[m] && ost[m].exists(int'(m_ar[m].id))) ost[m][int'(m_ar[m].id)].issue_cyc = cyc;
        if (faw[m] || far[m]) begin
          if (m_awvalid[m] && m_arvalid[m] && last_kind[m] >= 0 && last_kind[m] != int'(far[m])) n_alternate++;
          last_kind[m] = int'(far[m]);
        end
        if (m_bvalid[m] && m_bready[m]) check_b(m, m_b[m]);
        if (m_rvalid[m] && m_rready[m]) check_r(m, m_r[m]);
      end
      if (cfg_write != 0) n_cfg += $countones(cfg_write);
      if (lookup_miss != 0) n_miss += $countones(lookup_miss);
      if (throttled != 0) n_throttle++;
      if (d_rx_drop != 0) n_overflow++;
      if (c_tx_valid[0]) lane0_words++;
      @(posedge clk);
      for (int m = 0; m < M; m++) begin
        if (faw[m]) void'(awq[m].pop_front());
        if (fw[m])  void'(wq[m].pop_front());
        if (far[m]) void'(arq[m].pop_front());
      end
    end
  end

  task automatic check_b(input int m, input axi_b_t b);
    automatic int id = int'(b.id);
    chk(ost[m].exists(id) && !ost[m][id].rd, $sformatf("B id %0d matches a write of port %0d", id, m));
    chk(b.resp == 2'b00, "B OKAY");
    if (ost[m].exists(id)) begin
      if (ost[m][id].addr == CFG_BASE) n_local_b++;
      ost[m].delete(id);
    end
  endtask

  task automatic check_r(input int m, input axi_r_t r);
    automatic int id = int'(r.id);
    chk(ost[m].exists(id) && ost[m][id].rd, $sformatf("R id %0d matches a read of port %0d", id, m));
    if (ost[m].exists(id)) begin
      automatic logic [39:0] a = ost[m][id].addr + 40'(16 * ost[m][id].beat);
      chk(golden.exists(a) && r.data == golden[a], $sformatf("read data at %h", a));
      chk(r.last == (ost[m][id].beat == ost[m][id].len), "rlast");
      if (ost[m][id].beat == 0) last_rd_latency = cyc - ost[m][id].issue_cyc;
      ost[m][id].beat++;
      if (r.last) ost[m].delete(id);
    end
  endtask

  task automatic wait_idle(input int limit, input string what);
    int t = 0;
    while ((awq[0].size() + awq[1].size() + wq[0].size() + wq[1].size() + arq[0].size() + arq[1].size()
            + ost[0].size() + ost[1].size()) > 0 && t < limit) begin
      @(posedge clk); t++;
    end
    chk(t < limit, {"all responses received: ", what});
    if (t >= limit) $display("  left: aw %0d/%0d w %0d/%0d ar %0d/%0d outstanding %0d/%0d", awq[0].size(), awq[1].size(),
                             wq[0].size(), wq[1].size(), arq[0].size(), arq[1].size(), ost[0].size(), ost[1].size());
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, w0, round_trip;
    stall = '0; rl_en = '0;
    for (int n = 0; n < N; n++) begin rl_rate[n] = 9'd256; rl_burst[n] = 8'd4; end
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk);

    // 1. configuration through the AXI4 window
    for (int m = 0; m < M; m++) cfg_write_entries(m);
    wait_idle(200, "configuration writes");
    chk(n_cfg == 4 && n_local_b == 2, "four lookup entries written in-band, answered locally");

    // 2. round trip of one read on an idle system
    issue(0, 0, seg_lo[0][0] + 40'h200, 0);
    wait_idle(2000, "seed write");
    repeat (20) @(posedge clk);
    issue(0, 1, seg_lo[0][0] + 40'h200, 0);
    wait_idle(2000, "latency read");
    round_trip = last_rd_latency;
    chk(round_trip > 2 * LINK_LAT && round_trip <= 134, $sformatf("read round trip %0d cycles", round_trip));

    // 3. random writes from both ports, then read back (reads and writes mixed per port)
    for (int k = 0; k < 40; k++)
      for (int m = 0; m < M; m++) issue(m, 0, seg_lo[m][$urandom % 2] + {24'h0, 10'($urandom), 6'h0}, $urandom % 4);
    wait_idle(40000, "write phase");
    foreach (golden[a]) written.push_back(a);
    for (int m = 0; m < M; m++)
      foreach (written[i]) if (written[i][5:0] == 0 && written[i] >= seg_lo[m][0] && written[i] < seg_lo[m][0] + 40'h4000_0000) begin
        automatic logic [39:0] a = written[i];
        automatic int len = 0;
        automatic logic [39:0] step = 40'd16;
        while (len < 3 && golden.exists(a + step)) begin len++; step += 40'd16; end
        issue(m, 1, a, len);
        // a write to a fresh location in the same stream exercises read/write alternation
        issue(m, 0, seg_lo[m][1] + 40'h0100_0000 + {24'h0, 10'(next_id[m]), 6'h0}, 0);
        if (ost[m].size() >= 40) wait_idle(40000, "read batch");
      end
    wait_idle(40000, "read phase");
    chk(perr[0] == 0 && perr[1] == 0, "memory slaves saw well-formed bursts");
    chk(n_req[0] > 0 && n_req[1] > 0, "both memory slaves served requests");

    // 4. unmapped read: dropped
    arq[1].push_back(ax(40'h0C_0000_0000, 0, 63));
    repeat (300) @(posedge clk);
    chk(n_miss == 1, "unmapped read reported as lookup miss");

    // 5. lane 0 limited to 1/8 flit per cycle, bucket of 2
    @(negedge clk); rl_rate[0] = 9'd32; rl_burst[0] = 8'd2; rl_en[0] = 1'b1;
    w0 = lane0_words; t0 = cyc;
    for (int k = 0; k < 30; k++) issue(0, 0, seg_lo[0][0] + 40'h10_0000 + 40'(64 * k), 3);
    wait_idle(40000, "rate-limited writes");
    begin
      automatic int flits = (lane0_words - w0) / LANE_WORDS;
      automatic int span  = cyc - t0;
      chk(flits >= 150 && flits <= 2 + (span * 32) / 256 + 1, $sformatf("lane 0 rate: %0d flits in %0d cycles", flits, span));
    end
    @(negedge clk); rl_en[0] = 1'b0;

    // 6. stalled memories, flooded lanes
    stall = '1;
    for (int k = 0; k < 30; k++) for (int m = 0; m < M; m++) issue(m, 0, seg_lo[m][k % 2] + 40'h20_0000 + 40'(64 * k), 3);
    repeat (3000) @(posedge clk);

    $display("latency=%0d stalls=%0d alternate=%0d cfg=%0d localB=%0d miss=%0d throttle=%0d overflow=%0d",
             round_trip, n_stall, n_alternate, n_cfg, n_local_b, n_miss, n_throttle, n_overflow);
    chk(n_stall > 0, "master port back pressure");
    chk(n_alternate > 0, "streamer alternated between read and write channels");
    chk(n_throttle > 0, "rate limiter throttled");
    chk(n_overflow > 0, "memory-brick edge buffer overflowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
