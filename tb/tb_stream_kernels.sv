// tb_stream_kernels: the four STREAM kernels run over the default prototype (dmc_prototype with
// no parameter overrides), with remote memory behind it: first by one processor port over one
// lane, then sum with more reads in flight behind a rate limit, then a copy by both ports
// sharing lane 0, then a copy by both ports after port 1's
// segment has been moved to lane 1 by an in-band configuration write (two lanes in parallel).
//
// Each port has its own three arrays a, b, c of NL cache lines (64 bytes, four 16-byte beats, two 64-bit elements per
// beat) live in one 512 MiB remote segment, mapped at 0x8_0000_0000 on the compute brick and at
// 0x2000_0000 on the memory brick, reached over lane 0. The kernels, in STREAM's order, are:
//   copy  c = a      scale b = 3c      sum c = a + b      triad a = b + 3c
// (integer arithmetic on 64-bit elements stands in for the floating-point operations). Each
// destination line is written, as one 4-beat burst, once all its source lines have been read,
// like a cache write-back; up to OUT lines are in flight, as several cores or a prefetcher
// would keep them. A reference image of the remote memory checks every read beat, and a final
// pass reads all three arrays back.
//
// Per kernel the testbench measures bytes moved per cycle (STREAM's count: source plus
// destination bytes) and compares it with the lane bound: per line the request lane carries
// nsrc AR flits + 1 AW + 4 W flits, the response lane 4*nsrc R flits + 1 B flit, and a flit
// takes three lane cycles; the bound is per lane used. Each run must reach at least 70 % of its
// bound and never exceed it.
// Array size and OUT are this testbench's choices; the kernels and the 64-byte line are the
// benchmark's. OUT = 16 lines (32 read bursts for sum and triad) is about the most one lane
// takes unlimited: a read request is one flit but its answer four, so with 24 lines (48 reads)
// in flight the requests pile up at the memory brick faster than the return lane drains them,
// and its edge buffer overflows. One run therefore repeats sum with 24 lines in flight and
// lane 0 rate-limited to 48/256 flit per cycle, the remedy of a control plane, and requires
// no loss and at least 50 % of the lane bound.
module tb_stream_kernels;
  import dmc_pkg::*;
  localparam int M = 2, N = 2, S = 2, LINK_LAT = 57;
  localparam int NL = 192, OUT = 16;
  localparam logic [39:0] CFG_BASE = 40'h00_A000_0000;
  localparam logic [39:0] SEG_LO = 40'h08_0000_0000, SEG_RB = 40'h00_2000_0000;
  localparam logic [39:0] ARR [3] = '{40'h0, 40'h10_0000, 40'h20_0000};   // a, b, c
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
  int n_req [S], perr [S];

  dmc_prototype dut (.*);

  for (genvar n = 0; n < N; n++) begin : g_lane
    aurora_link_model #(.LAT(LINK_LAT)) u_fwd (.clk, .rst_n, .in_valid(c_tx_valid[n]), .in_data(c_tx_data[n]),
                                              .out_valid(d_rx_valid[n]), .out_data(d_rx_data[n]));
    aurora_link_model #(.LAT(LINK_LAT)) u_rev (.clk, .rst_n, .in_valid(d_tx_valid[n]), .in_data(d_tx_data[n]),
                                              .out_valid(c_rx_valid[n]), .out_data(c_rx_data[n]));
  end
  for (genvar s = 0; s < S; s++) begin : g_mem
    axi_mem_model u_mem (.clk, .rst_n, .stall(1'b0),
      .awvalid(s_awvalid[s]), .awready(s_awready[s]), .aw(s_aw[s]),
      .wvalid(s_wvalid[s]), .wready(s_wready[s]), .w(s_w[s]),
      .bvalid(s_bvalid[s]), .bready(s_bready[s]), .b(s_b[s]),
      .arvalid(s_arvalid[s]), .arready(s_arready[s]), .ar(s_ar[s]),
      .rvalid(s_rvalid[s]), .rready(s_rready[s]), .r(s_r[s]),
      .n_requests(n_req[s]), .protocol_errors(perr[s]));
  end

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference image of remote memory, one 16-byte beat per compute-brick address
  logic [127:0] golden [logic [39:0]];
  function automatic logic [127:0] ref_beat(input logic [39:0] a);
    return golden.exists(a) ? golden[a] : {88'h0, a - SEG_LO + SEG_RB};   // unwritten: own address
  endfunction

  function automatic axi_ax_t ax(input logic [39:0] a, input int len, input int id);
    axi_ax_t x;
    x.id = 6'(id); x.addr = a; x.len = 8'(len); x.size = 3'd4; x.burst = 2'b01;
    return x;
  endfunction

  // per-port state (the ports play the role of processor cores, each with its own arrays)
  axi_ax_t awq [M][$], arq [M][$]; axi_w_t wq [M][$];
  int rd_line [M][64], rd_src [M][64], rd_beat [M][64];   // per read id: line, source slot, next beat
  logic [127:0] buf_data [M][NL][2][4];
  int got [M][NL], inflight [M], writes_done = 0, n_b = 0;
  int k_nsrc, k_dst; int k_src [2]; int k_kind;            // current kernel

  function automatic logic [39:0] line_addr(input int p, input int arr, input int l);
    return SEG_LO + ARR[arr] + 40'(p) * 40'h100_0000 + 40'(64 * l);
  endfunction

  // kernel arithmetic on two 64-bit elements per beat
  function automatic logic [127:0] combine(input int kind, input logic [127:0] x, input logic [127:0] y);
    logic [127:0] o;
    for (int e = 0; e < 2; e++)
      case (kind)
        0: o[64*e +: 64] = x[64*e +: 64];
        1: o[64*e +: 64] = 64'd3 * x[64*e +: 64];
        2: o[64*e +: 64] = x[64*e +: 64] + y[64*e +: 64];
        default: o[64*e +: 64] = x[64*e +: 64] + 64'd3 * y[64*e +: 64];
      endcase
    return o;
  endfunction

  // AXI4 channel drivers and response handling, one per port
  for (genvar p = 0; p < M; p++) begin : g_drv
    initial begin
      m_awvalid[p] = 1'b0; m_wvalid[p] = 1'b0; m_arvalid[p] = 1'b0; m_bready[p] = 1'b1; m_rready[p] = 1'b1;
      m_aw[p] = '0; m_ar[p] = '0; m_w[p] = '0;
      @(posedge rst_n);
      forever begin
        bit faw, fw, far;
        @(negedge clk);
        m_awvalid[p] = awq[p].size() > 0; if (awq[p].size() > 0) m_aw[p] = awq[p][0];
        m_wvalid[p]  = wq[p].size() > 0;  if (wq[p].size() > 0)  m_w[p]  = wq[p][0];
        m_arvalid[p] = arq[p].size() > 0; if (arq[p].size() > 0) m_ar[p] = arq[p][0];
        #1;
        faw = m_awvalid[p] && m_awready[p]; fw = m_wvalid[p] && m_wready[p]; far = m_arvalid[p] && m_arready[p];
        if (m_bvalid[p]) begin
          chk(m_b[p].resp == 2'b00, "B OKAY");
          n_b++;
          if (int'(m_b[p].id) != 63) begin inflight[p]--; writes_done++; end
        end
        if (m_rvalid[p]) begin
          automatic int id = int'(m_r[p].id);
          automatic int l = rd_line[p][id], k = rd_src[p][id], bt = rd_beat[p][id];
          automatic logic [39:0] a = line_addr(p, k_src[k], l) + 40'(16 * bt);
          chk(m_r[p].data == ref_beat(a), $sformatf("read beat at %h", a));
          chk(m_r[p].last == (bt == 3), "rlast");
          buf_data[p][l][k][bt] = m_r[p].data;
          rd_beat[p][id]++;
          if (m_r[p].last) begin
            got[p][l]++;
            if (got[p][l] == k_nsrc) begin
              if (k_dst < 0) inflight[p]--;
              else begin
                automatic logic [39:0] d = line_addr(p, k_dst, l);
                awq[p].push_back(ax(d, 3, l % 32));
                for (int i = 0; i < 4; i++) begin
                  automatic axi_w_t x;
                  x.data = combine(k_kind, buf_data[p][l][0][i], buf_data[p][l][1][i]);
                  x.strb = '1; x.last = (i == 3);
                  wq[p].push_back(x);
                  golden[d + 40'(16 * i)] = x.data;
                end
              end
            end
          end
        end
        @(posedge clk);
        if (faw) void'(awq[p].pop_front());
        if (fw)  void'(wq[p].pop_front());
        if (far) void'(arq[p].pop_front());
      end
    end
  end

  task automatic issue_lines(input int p, input int nsrc, input int s0, input int s1, input int out);
    for (int l = 0; l < NL; l++) begin
      while (inflight[p] >= out) @(negedge clk);
      inflight[p]++;
      for (int k = 0; k < nsrc; k++) begin
        automatic int id = (2 * l + k) % 64;
        rd_line[p][id] = l; rd_src[p][id] = k; rd_beat[p][id] = 0;
        arq[p].push_back(ax(line_addr(p, k == 0 ? s0 : s1, l), 3, id));
      end
    end
    while (inflight[p] > 0) @(negedge clk);
  endtask

  // write lookup entry 0 of port p through its configuration window: the test segment on lane
  task automatic map_segment(input int p, input int lane);
    automatic axi_w_t x = '0;
    automatic int nb = n_b;
    x.data[39:0] = SEG_LO; x.data[79:40] = SEG_LO + 40'h1FFF_FFFF; x.data[119:80] = SEG_RB - SEG_LO;
    x.data[121:120] = 2'(lane); x.data[125:122] = 4'd0; x.data[126] = 1'b1;   // entry 0, valid
    x.strb = '1; x.last = 1'b1;
    awq[p].push_back(ax(CFG_BASE, 0, 63)); wq[p].push_back(x);
    while (n_b == nb) @(negedge clk);
  endtask

  // one kernel over all NL lines of each of nports ports, out lines in flight per port;
  // dst < 0 only reads (and measures nothing). lanes = lanes the ports' traffic is spread over.
  task automatic run_kernel(input string name, input int kind, input int nsrc, input int s0, input int s1,
                            input int dst, input int nports = 1, input int out = OUT, input int lanes = 1,
                            input int min_pct = 70);
    int t0, t1, bytes, bound_milli, meas_milli, tx, rx;
    k_kind = kind; k_nsrc = nsrc; k_src[0] = s0; k_src[1] = s1; k_dst = dst;
    for (int p = 0; p < M; p++) begin inflight[p] = 0; for (int l = 0; l < NL; l++) got[p][l] = 0; end
    @(negedge clk); t0 = cyc;
    for (int p = 0; p < nports; p++)
      fork
        automatic int pp = p;
        issue_lines(pp, nsrc, s0, s1, out);
      join_none
    wait fork;
    t1 = cyc;
    if (dst < 0) return;
    bytes = 64 * NL * (nsrc + 1) * nports;
    tx = nsrc + 5; rx = 4 * nsrc + 1;
    bound_milli = lanes * 1000 * 64 * (nsrc + 1) / (3 * (tx > rx ? tx : rx));
    meas_milli  = 1000 * bytes / (t1 - t0);
    $display("%-6s %0d port(s) %0d lane(s): %0d bytes in %0d cycles: %0d.%03d B/cycle = %0d MiB/s at 156.25 MHz (bound %0d.%03d B/cycle)",
             name, nports, lanes, bytes, t1 - t0, meas_milli / 1000, meas_milli % 1000,
             int'(longint'(meas_milli) * 156250 / 1048576), bound_milli / 1000, bound_milli % 1000);
    chk(meas_milli <= bound_milli, {name, " bandwidth within the lane bound"});
    chk(meas_milli * 100 >= bound_milli * min_pct, $sformatf("%s bandwidth at least %0d %% of the lane bound", name, min_pct));
  endtask

  initial begin
    rl_en = '0;
    for (int n = 0; n < N; n++) begin rl_rate[n] = 9'd256; rl_burst[n] = 8'd4; end
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk);
    // one 512 MiB segment, written in-band through each port's configuration window; both
    // ports first reach it over lane 0
    map_segment(0, 0);
    map_segment(1, 0);
    // one port, one lane: the four kernels
    run_kernel("copy",  0, 1, 0, 0, 2);
    run_kernel("scale", 1, 1, 2, 2, 1);
    run_kernel("sum",   2, 2, 0, 1, 2);
    run_kernel("triad", 3, 2, 1, 2, 0);
    // sum with 24 lines (48 read bursts) in flight overflows the memory brick unless the control
    // plane limits the lane: at 48/256 flit per cycle it runs clean
    @(negedge clk); rl_rate[0] = 9'd48; rl_burst[0] = 8'd1; rl_en[0] = 1'b1;
    run_kernel("sum",   2, 2, 0, 1, 2, 1, 24, 1, 50);
    chk(n_throttled > 0, "rate limiter throttled lane 0");
    @(negedge clk); rl_en[0] = 1'b0;
    // two ports sharing lane 0, half the lines in flight each: the lane saturates
    run_kernel("copy",  0, 1, 0, 0, 2, 2, OUT / 2, 1);
    // port 1 remapped in-band to lane 1: the two lanes work in parallel
    map_segment(1, 1);
    run_kernel("copy",  0, 1, 0, 0, 2, 2, OUT, 2);
    chk(lane1_words > 0, "lane 1 carried traffic after the remap");
    // read everything back
    for (int k = 0; k < 3; k++) run_kernel("check", 0, 1, k, k, -1, 2);
    chk(writes_done == 9 * NL, "every destination line written");
    chk(perr[0] == 0 && perr[1] == 0, "memory saw well-formed bursts");
    chk(c_rx_drop == 0 && d_rx_drop == 0, "no flit lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lane1_words = 0, n_throttled = 0;
  always @(posedge clk) begin
    if (c_tx_valid[1]) lane1_words++;
    if (throttled[0]) n_throttled++;
  end

  // no flit may be lost at any time
  always @(posedge clk) if (rst_n && (c_rx_drop != 0 || d_rx_drop != 0)) begin
    failures++; $display("FAIL edge buffer overflow at %0t", $time);
  end
endmodule
