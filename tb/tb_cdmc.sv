// tb_cdmc: the compute-brick DMC with its lanes looped through a testbench model of a memory
// brick that works at lane-word level (three 64-bit words per flit, low word first).
// Checks: requests leave on the lane chosen by the segment, with the translated address and the
// master tag; W beats follow their header; responses (R data derived from the address, B) come
// back to the right master port; a low rate-limit setting throttles a lane; and with the
// master ports refusing responses, the lane edge buffer overflows and reports drops.
module tb_cdmc;
  import dmc_pkg::*;
  localparam int M = 2, N = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [M-1:0] m_req_valid, m_req_ready, m_rsp_valid, m_rsp_ready;
  flit_t m_req_flit [M], m_rsp_flit [M];
  logic [N-1:0] rl_en; logic [8:0] rl_rate [N]; logic [7:0] rl_burst [N];
  logic [N-1:0] tx_valid, rx_valid;
  logic [63:0] tx_data [N], rx_data [N];
  logic [M-1:0] lookup_miss, cfg_write;
  logic [N-1:0] throttled, rx_drop;

  cdmc #(.M(M), .N(N), .ENTRIES(4), .QDEPTH(8)) dut (.*);

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  logic [39:0] seg_lo [M] = '{40'h08_0000_0000, 40'h09_0000_0000};
  logic [39:0] seg_rb [M] = '{40'h00_1000_0000, 40'h00_5000_0000};
  // segment g of master m is at seg_lo[m] + g*512MiB and uses lane (m+g)%2

  function automatic logic [127:0] rdata(input logic [39:0] a);
    return {a, ~a, 48'h5A5A_0000_0000};
  endfunction

  // ---------- memory-brick model at lane level ----------
  logic [63:0] wbuf [N][3]; int wcnt [N] = '{0, 0};
  flit_t rsp_out [N][$];
  flit_t cur_aw [N]; bit in_wr [N] = '{0, 0};
  typedef struct { int lane; logic [39:0] maddr; } exp_t;
  exp_t exp_req [M][int];
  int n_req_ok = 0, n_throttle = 0, n_drop = 0, hold_rsp = 0;

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) if (tx_valid[n]) begin
      wbuf[n][wcnt[n]] = tx_data[n];
      wcnt[n]++;
      if (wcnt[n] == 3) begin
        automatic flit_t f = flit_t'({wbuf[n][2][23:0], wbuf[n][1], wbuf[n][0]});
        wcnt[n] = 0;
        if (is_header(f.kind)) begin
          automatic int m = int'(f.mtag), id = int'(f.body[58:53]);
          chk(exp_req[m].exists(id), "request tagged with a master that sent it");
          if (exp_req[m].exists(id)) begin
            chk(exp_req[m][id].lane == n, "request on the segment's lane");
            chk(f.body[39:0] == exp_req[m][id].maddr, "translated address");
            n_req_ok++;
          end
          if (f.kind == K_AR) begin
            for (int b = 0; b <= int'(f.body[47:40]); b++) begin
              automatic flit_t r = '0;
              r.kind = K_R; r.eot = (b == int'(f.body[47:40])); r.mtag = f.mtag;
              r.body[127:0] = rdata(f.body[39:0] + 40'(16 * b)); r.body[135:130] = f.body[58:53];
              rsp_out[n].push_back(r);
            end
          end else begin cur_aw[n] = f; in_wr[n] = 1; end
        end else if (f.kind == K_W) begin
          chk(in_wr[n], "W beat follows its header on the lane");
          if (f.eot) begin
            automatic flit_t r = '0;
            r.kind = K_B; r.eot = 1; r.mtag = cur_aw[n].mtag; r.body[7:2] = cur_aw[n].body[58:53];
            rsp_out[n].push_back(r); in_wr[n] = 0;
          end
        end else chk(0, "unexpected flit kind on lane");
      end
    end
  end

  // lane transmitter: three words per response flit, no back pressure
  int rw [N] = '{0, 0};
  always @(posedge clk) begin
    for (int n = 0; n < N; n++) begin
      if (rsp_out[n].size() > 0) begin
        automatic logic [191:0] wide = {40'h0, rsp_out[n][0]};
        rx_valid[n] <= 1'b1; rx_data[n] <= wide[64*rw[n] +: 64];
        rw[n]++;
        if (rw[n] == 3) begin rw[n] = 0; void'(rsp_out[n].pop_front()); end
      end else begin rx_valid[n] <= 1'b0; rx_data[n] <= '0; end
    end
  end

  // ---------- master side ----------
  flit_t mq [M][$];
  typedef struct { bit rd; logic [39:0] maddr; int len; int beat; } ost_t;
  ost_t ost [M][int];
  int next_id [M] = '{0, 0};

  task automatic issue(input int m, input int g, input bit rd, input logic [39:0] off, input int len);
    automatic int id = next_id[m];
    automatic flit_t h = '0;
    automatic logic [39:0] maddr = seg_rb[m] + 40'(g) * 40'h2000_0000 + off;
    next_id[m] = (next_id[m] + 1) % 64;
    h.kind = rd ? K_AR : K_AW; h.eot = rd; h.body[39:0] = seg_lo[m] + 40'(g) * 40'h2000_0000 + off;
    h.body[47:40] = 8'(len); h.body[58:53] = 6'(id);
    mq[m].push_back(h);
    exp_req[m][id] = '{(m + g) % 2, maddr};
    ost[m][id] = '{rd, maddr, len, 0};
    if (!rd) for (int b = 0; b <= len; b++) begin
      automatic flit_t w = '0;
      w.kind = K_W; w.eot = (b == len); w.body[127:0] = {4{$urandom}};
      mq[m].push_back(w);
    end
  endtask

  initial begin
    m_req_valid = '0; m_rsp_ready = '0;
    for (int m = 0; m < M; m++) m_req_flit[m] = '0;
    @(posedge rst_n);
    forever begin
      bit fire [M];
      @(negedge clk);
      for (int m = 0; m < M; m++) begin
        m_req_valid[m] = mq[m].size() > 0;
        m_req_flit[m]  = (mq[m].size() > 0) ? mq[m][0] : '0;
        m_rsp_ready[m] = (hold_rsp == 0) && ($urandom % 100) < 85;
      end
      #1;
      if (throttled != 0) n_throttle++;
      if (rx_drop != 0) n_drop++;
      for (int m = 0; m < M; m++) begin
        fire[m] = m_req_valid[m] && m_req_ready[m];
        if (m_rsp_valid[m] && m_rsp_ready[m]) begin
          automatic flit_t f = m_rsp_flit[m];
          automatic int id = (f.kind == K_B) ? int'(f.body[7:2]) : int'(f.body[135:130]);
          chk(ost[m].exists(id), "response reaches the master that issued it");
          if (ost[m].exists(id)) begin
            if (ost[m][id].rd) begin
              chk(f.body[127:0] == rdata(ost[m][id].maddr + 40'(16 * ost[m][id].beat)), "read data");
              ost[m][id].beat++;
            end else chk(f.kind == K_B, "B response");
            if (f.eot) begin ost[m].delete(id); exp_req[m].delete(id); end
          end
        end
      end
      @(posedge clk);
      for (int m = 0; m < M; m++) if (fire[m]) void'(mq[m].pop_front());
    end
  end

  task automatic wait_idle(input int limit);
    int t = 0;
    while ((mq[0].size() + mq[1].size() + ost[0].size() + ost[1].size()) > 0 && t < limit) begin
      @(posedge clk); t++;
    end
    chk(t < limit, "all responses received");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rl_en = '0;
    for (int n = 0; n < N; n++) begin rl_rate[n] = 9'd256; rl_burst[n] = 8'd4; rx_valid[n] = 0; rx_data[n] = 0; end
    repeat (4) @(posedge clk); rst_n = 1;
    // in-band configuration of two segments per master
    for (int m = 0; m < M; m++)
      for (int g = 0; g < 2; g++) begin
        automatic flit_t c = '0;
        automatic logic [39:0] lo = seg_lo[m] + 40'(g) * 40'h2000_0000;
        c.kind = K_CFG; c.eot = 1; c.body[39:0] = lo; c.body[79:40] = lo + 40'h1FFF_FFFF;
        c.body[119:80] = (seg_rb[m] + 40'(g) * 40'h2000_0000) - lo; c.body[121:120] = 2'((m + g) % 2);
        c.body[125:122] = 4'(g); c.body[126] = 1'b1;
        mq[m].push_back(c);
      end
    repeat (10) @(posedge clk);
    for (int k = 0; k < 60; k++)
      for (int m = 0; m < M; m++) begin
        issue(m, int'($urandom % 2), $urandom % 2 != 0, {20'h0, 14'($urandom), 6'h0}, $urandom % 4);
        if (ost[m].size() > 40) wait_idle(20000);
      end
    wait_idle(20000);
    chk(n_req_ok >= 120, "all requests seen on the lanes");
    // rate limiter on lane 1
    rl_en[1] = 1; rl_rate[1] = 9'd16; rl_burst[1] = 8'd1;
    for (int k = 0; k < 10; k++) issue(0, 1, 1, 40'(64 * k), 0);
    wait_idle(20000);
    chk(n_throttle > 0, "lane 1 throttled");
    rl_en[1] = 0;
    // responses refused: the lane edge buffers fill and drop
    hold_rsp = 1;
    for (int k = 0; k < 12; k++) for (int m = 0; m < M; m++) issue(m, 0, 1, 40'(64 * k), 3);
    repeat (2000) @(posedge clk);
    chk(n_drop > 0, "lane edge buffer overflow reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
