// tb_mdmc: the memory-brick DMC driven at lane-word level by a testbench model of a compute
// brick, with a memory model on each slave port. Checks: each request reaches the slave chosen
// by address bit 30 with the link tag of its lane; responses leave on the lane the request
// arrived on with the master tag preserved; read data equals what was written; and with the
// slaves stalled, a flooded lane overflows its edge buffer and reports drops.
module tb_mdmc;
  import dmc_pkg::*;
  localparam int N = 2, S = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] rx_valid, tx_valid, rx_drop;
  logic [63:0] rx_data [N], tx_data [N];
  logic [S-1:0] s_req_valid, s_req_ready, s_rsp_valid, s_rsp_ready, stall;
  flit_t s_req_flit [S], s_rsp_flit [S];
  int n_req [S], perr [S];

  mdmc #(.N(N), .S(S), .QDEPTH(8), .SLAVE_LSB(30)) dut (.*);

  for (genvar s = 0; s < S; s++) begin : g_mem
    flit_mem_model u_mem (.clk, .rst_n, .stall(stall[s]),
      .req_valid(s_req_valid[s]), .req_ready(s_req_ready[s]), .req_flit(s_req_flit[s]),
      .rsp_valid(s_rsp_valid[s]), .rsp_ready(s_rsp_ready[s]), .rsp_flit(s_rsp_flit[s]),
      .n_requests(n_req[s]), .protocol_errors(perr[s]));
  end

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  // ---------- compute-brick side: lane transmitters ----------
  flit_t lane_q [N][$];
  int rw [N] = '{0, 0};
  always @(posedge clk) begin
    for (int n = 0; n < N; n++) begin
      if (rst_n && lane_q[n].size() > 0) begin
        automatic logic [191:0] wide = {40'h0, lane_q[n][0]};
        rx_valid[n] <= 1'b1; rx_data[n] <= wide[64*rw[n] +: 64];
        rw[n]++;
        if (rw[n] == 3) begin rw[n] = 0; void'(lane_q[n].pop_front()); end
      end else begin rx_valid[n] <= 1'b0; rx_data[n] <= '0; end
    end
  end

  // outstanding by {lane, mtag, id}
  typedef struct { bit rd; logic [39:0] addr; int len; int beat; } ost_t;
  ost_t ost [int];
  logic [127:0] golden [logic [39:0]];
  int nid = 0;

  task automatic issue(input int n, input int mt, input bit rd, input logic [39:0] a, input int len);
    automatic flit_t h = '0;
    automatic int id = nid; nid = (nid + 1) % 64;
    h.kind = rd ? K_AR : K_AW; h.eot = rd; h.mtag = 2'(mt); h.body[39:0] = a; h.body[47:40] = 8'(len);
    h.body[58:53] = 6'(id);
    lane_q[n].push_back(h);
    ost[(n * 4 + mt) * 64 + id] = '{rd, a, len, 0};
    if (!rd) for (int b = 0; b <= len; b++) begin
      automatic flit_t w = '0;
      automatic logic [127:0] d = {$urandom, $urandom, $urandom, $urandom};
      w.kind = K_W; w.eot = (b == len); w.body[127:0] = d;
      lane_q[n].push_back(w);
      golden[a + 40'(16 * b)] = d;
    end
  endtask

  // ---------- slave-port observers ----------
  always @(posedge clk) if (rst_n)
    for (int s = 0; s < S; s++)
      if (s_req_valid[s] && s_req_ready[s] && is_header(s_req_flit[s].kind)) begin
        chk(int'(s_req_flit[s].body[30]) == s, "request reaches the slave owning its address");
        chk(ost.exists((int'(s_req_flit[s].ltag) * 4 + int'(s_req_flit[s].mtag)) * 64 + int'(s_req_flit[s].body[58:53])),
            "link tag names the lane the request came on");
      end

  // ---------- lane receivers ----------
  logic [63:0] wbuf [N][3]; int wcnt [N] = '{0, 0}; int n_drop = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_drop != 0) n_drop++;
    for (int n = 0; n < N; n++) if (tx_valid[n]) begin
      wbuf[n][wcnt[n]] = tx_data[n]; wcnt[n]++;
      if (wcnt[n] == 3) begin
        automatic flit_t f = flit_t'({wbuf[n][2][23:0], wbuf[n][1], wbuf[n][0]});
        automatic int id = (f.kind == K_B) ? int'(f.body[7:2]) : int'(f.body[135:130]);
        automatic int key = (n * 4 + int'(f.mtag)) * 64 + id;
        wcnt[n] = 0;
        chk(f.ltag == LTAG_W'(n), "response on its originating lane");
        chk(ost.exists(key), "response matches an outstanding request of this lane and master");
        if (ost.exists(key)) begin
          if (ost[key].rd) begin
            automatic logic [39:0] a = ost[key].addr + 40'(16 * ost[key].beat);
            chk(f.kind == K_R && golden.exists(a) && f.body[127:0] == golden[a], "read data");
            ost[key].beat++;
          end else chk(f.kind == K_B, "B response");
          if (f.eot) ost.delete(key);
        end
      end
    end
  end

  task automatic wait_idle(input int limit);
    int t = 0;
    while ((lane_q[0].size() + lane_q[1].size() + ost.size()) > 0 && t < limit) begin @(posedge clk); t++; end
    chk(t < limit, "all responses received");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stall = '0;
    for (int n = 0; n < N; n++) begin rx_valid[n] = 0; rx_data[n] = 0; end
    repeat (4) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk);
    // writes from both lanes to both slaves (bit 30 selects the slave)
    for (int k = 0; k < 40; k++) begin
      issue(k % 2, $urandom % 4, 0, {9'h0, 1'($urandom), 14'h0, 10'(k), 6'h0}, $urandom % 4);
      if (ost.size() > 30) wait_idle(20000);
    end
    wait_idle(20000);
    // read everything back through the other lane
    begin
      automatic int k = 0;
      foreach (golden[a]) if (a[5:0] == 0) begin
        issue(k % 2, k % 4, 1, a, 0); k++;
        if (ost.size() > 30) wait_idle(20000);
      end
    end
    wait_idle(20000);
    chk(n_req[0] > 0 && n_req[1] > 0 && perr[0] == 0 && perr[1] == 0, "both slaves served well-formed transactions");
    // stalled slaves: flooding lane 0 overflows its edge buffer
    stall = '1;
    for (int k = 0; k < 20; k++) issue(0, 0, 0, 40'(64 * k), 3);
    repeat (1000) @(posedge clk);
    chk(n_drop > 0, "edge buffer overflow reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
