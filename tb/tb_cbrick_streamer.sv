// tb_cbrick_streamer: random AXI4 reads, writes and configuration-window writes on the slave
// side, random back pressure on the flit side. Checks that every AR becomes one AR flit and
// every AW one AW flit followed at once by its W beats (last one end-of-transaction), in each
// channel's order; that configuration beats become CFG flits and get a local B with their id;
// and that R and B flits coming back appear on the R and B channels with their fields.
// Configuration-window writes use ids 32..63 and returned B flits ids 0..31 so the two B
// sources can be told apart.
module tb_cbrick_streamer;
  import dmc_pkg::*;
  localparam logic [39:0] CFG_BASE = 40'h00_A000_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  axi_ax_t aw, ar; axi_w_t w; axi_b_t b; axi_r_t r;
  logic req_valid, req_ready, rsp_valid, rsp_ready;
  flit_t req_flit, rsp_flit;

  cbrick_streamer #(.CFG_BASE(CFG_BASE)) dut (.*);

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  axi_ax_t awq [$], arq [$]; axi_w_t wq [$];
  flit_t exp_w [$];           // expected flit stream of writes (AW/CFG + beats)
  flit_t exp_r [$];           // expected AR flits
  int exp_local_b [$];
  flit_t rspq [$];            // response flits to inject
  axi_r_t exp_rch [$]; axi_b_t exp_bch [$];
  int in_write = 0, n_cfg = 0;

  function automatic flit_t axf(input flit_kind_e k, input axi_ax_t a);
    flit_t f = '0;
    f.kind = k; f.eot = (k == K_AR);
    f.body[39:0] = a.addr; f.body[47:40] = a.len; f.body[50:48] = a.size; f.body[52:51] = a.burst; f.body[58:53] = a.id;
    return f;
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // build the stimulus
    for (int t = 0; t < 150; t++) begin
      automatic axi_ax_t a;
      automatic int kind = $urandom % 5;   // 0,1 read; 2,3 write; 4 config write
      a.id = (kind == 4) ? 6'(32 + t % 32) : 6'(t); a.len = 8'($urandom % 4); a.size = 3'd4; a.burst = 2'b01;
      a.addr = (kind == 4) ? CFG_BASE + 40'(16 * int'($urandom % 8)) : {8'h08, 26'($urandom), 6'h0};
      if (kind < 2) begin arq.push_back(a); exp_r.push_back(axf(K_AR, a)); end
      else begin
        awq.push_back(a);
        if (kind < 4) exp_w.push_back(axf(K_AW, a)); else exp_local_b.push_back(int'(a.id));
        for (int i = 0; i <= int'(a.len); i++) begin
          automatic axi_w_t x; automatic flit_t f = '0;
          x.data = {$urandom, $urandom, $urandom, $urandom}; x.strb = 16'($urandom); x.last = (i == int'(a.len));
          wq.push_back(x);
          if (kind < 4) begin f.kind = K_W; f.eot = x.last; f.body = {x.strb, x.data}; end
          else begin f.kind = K_CFG; f.eot = 1; f.body = {16'h0, x.data}; end
          exp_w.push_back(f);
        end
      end
    end
    for (int t = 0; t < 120; t++) begin
      automatic flit_t f = '0;
      if ($urandom % 2 != 0) begin
        automatic int len = $urandom % 4;
        for (int i = 0; i <= len; i++) begin
          automatic axi_r_t x;
          f = '0; f.kind = K_R; f.eot = (i == len); f.body[127:0] = {4{$urandom}}; f.body[129:128] = 2'($urandom);
          f.body[135:130] = 6'(t); rspq.push_back(f);
          x.id = 6'(t); x.data = f.body[127:0]; x.resp = f.body[129:128]; x.last = f.eot; exp_rch.push_back(x);
        end
      end else begin
        f.kind = K_B; f.eot = 1; f.body[1:0] = 2'($urandom); f.body[7:2] = 6'(t % 32); rspq.push_back(f);
        exp_bch.push_back('{id: 6'(t % 32), resp: f.body[1:0]});
      end
    end
    awvalid = 0; wvalid = 0; arvalid = 0; bready = 0; rready = 0; req_ready = 0; rsp_valid = 0;
    aw = '0; ar = '0; w = '0; rsp_flit = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    while (awq.size() + wq.size() + arq.size() + rspq.size() + exp_bch.size() + exp_local_b.size() > 0) begin
      bit faw, fw, far, freq, frsp;
      @(negedge clk);
      awvalid = awq.size() > 0 && ($urandom % 4 != 0); if (awq.size() > 0) aw = awq[0];
      wvalid  = wq.size() > 0 && ($urandom % 4 != 0);  if (wq.size() > 0) w = wq[0];
      arvalid = arq.size() > 0 && ($urandom % 4 != 0); if (arq.size() > 0) ar = arq[0];
      req_ready = ($urandom % 100) < 70;
      rsp_valid = rspq.size() > 0; if (rspq.size() > 0) rsp_flit = rspq[0];
      bready = ($urandom % 100) < 70; rready = ($urandom % 100) < 70;
      #1;
      faw = awvalid && awready; fw = wvalid && wready; far = arvalid && arready;
      freq = req_valid && req_ready; frsp = rsp_valid && rsp_ready;
      if (freq) begin
        if (req_flit.kind == K_AR) begin
          chk(in_write == 0, "no read inside a write burst");
          chk(exp_r.size() > 0 && req_flit == exp_r[0], "AR flit");
          if (exp_r.size() > 0) void'(exp_r.pop_front());
        end else begin
          chk(exp_w.size() > 0 && req_flit == exp_w[0], $sformatf("write-stream flit kind %0d", req_flit.kind));
          if (exp_w.size() > 0) void'(exp_w.pop_front());
          if (req_flit.kind == K_AW) in_write = 1;
          if (req_flit.kind == K_W && req_flit.eot) in_write = 0;
          if (req_flit.kind == K_CFG) n_cfg++;
        end
      end
      if (bvalid && bready) begin
        if (b.id[5]) begin   // configuration ids are 32..63, B-flit ids 0..31
          chk(exp_local_b.size() > 0 && int'(b.id) == exp_local_b[0], "local B id");
          if (exp_local_b.size() > 0) void'(exp_local_b.pop_front());
          chk(b.resp == 2'b00, "local B OKAY");
        end else begin
          chk(exp_bch.size() > 0 && b == exp_bch[0], "B from a B flit");
          if (exp_bch.size() > 0) void'(exp_bch.pop_front());
        end
      end
      if (rvalid && rready) begin
        chk(exp_rch.size() > 0 && r == exp_rch[0], "R from an R flit");
        if (exp_rch.size() > 0) void'(exp_rch.pop_front());
      end
      @(posedge clk);
      if (faw) void'(awq.pop_front());
      if (fw)  void'(wq.pop_front());
      if (far) void'(arq.pop_front());
      if (frsp) void'(rspq.pop_front());
    end
    repeat (5) @(posedge clk);
    chk(exp_w.size() == 0 && exp_r.size() == 0 && exp_rch.size() == 0, "all flits and beats seen");
    chk(n_cfg > 0, "configuration beats became CFG flits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
