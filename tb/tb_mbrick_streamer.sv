// tb_mbrick_streamer: random AW+W and AR request flits with random tags in, random AXI4 ready
// and response traffic on the master side. Checks that AW/AR carry address, length and the id
// widened by link tag and master tag; that W beats follow with wlast on the last; and that R
// and B responses come back as flits with their tags restored, with no B inside an R burst.
module tb_mbrick_streamer;
  import dmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid, req_ready, rsp_valid, rsp_ready;
  flit_t req_flit, rsp_flit;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  axi_sax_t aw, ar; axi_w_t w; axi_sb_t b; axi_sr_t r;

  mbrick_streamer dut (.*);

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  flit_t src [$];
  axi_sax_t exp_aw [$], exp_ar [$]; axi_w_t exp_w [$];
  axi_sr_t rq [$]; axi_sb_t bq [$];
  flit_t exp_rsp_r [$], exp_rsp_b [$];
  bit in_r = 0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 150; t++) begin
      automatic flit_t h = '0; automatic axi_sax_t a;
      automatic bit wr = ($urandom % 2 != 0); automatic int len = $urandom % 4;
      h.kind = wr ? K_AW : K_AR; h.eot = !wr; h.mtag = 2'($urandom); h.ltag = 2'($urandom);
      h.body[39:0] = {$urandom, 8'h0}; h.body[47:40] = 8'(len); h.body[50:48] = 3'd4; h.body[52:51] = 2'b01;
      h.body[58:53] = 6'(t);
      src.push_back(h);
      a.id = {h.ltag, h.mtag, h.body[58:53]}; a.addr = h.body[39:0]; a.len = 8'(len); a.size = 3'd4; a.burst = 2'b01;
      if (wr) begin
        exp_aw.push_back(a);
        for (int i = 0; i <= len; i++) begin
          automatic flit_t f = '0; automatic axi_w_t x;
          f.kind = K_W; f.eot = (i == len); f.body = {16'($urandom), $urandom, $urandom, $urandom, $urandom};
          src.push_back(f);
          x.data = f.body[127:0]; x.strb = f.body[143:128]; x.last = f.eot; exp_w.push_back(x);
        end
      end else exp_ar.push_back(a);
    end
    for (int t = 0; t < 100; t++) begin
      automatic logic [9:0] id = 10'($urandom);
      if ($urandom % 2 != 0) begin
        automatic int len = $urandom % 4;
        for (int i = 0; i <= len; i++) begin
          automatic axi_sr_t x; automatic flit_t f = '0;
          x.id = id; x.data = {4{$urandom}}; x.resp = 2'($urandom); x.last = (i == len); rq.push_back(x);
          f.kind = K_R; f.eot = x.last; {f.ltag, f.mtag} = id[9:6]; f.body[127:0] = x.data;
          f.body[129:128] = x.resp; f.body[135:130] = id[5:0]; exp_rsp_r.push_back(f);
        end
      end else begin
        automatic flit_t f = '0;
        bq.push_back('{id: id, resp: 2'($urandom)});
        f.kind = K_B; f.eot = 1; {f.ltag, f.mtag} = id[9:6]; f.body[1:0] = bq[$].resp; f.body[7:2] = id[5:0];
        exp_rsp_b.push_back(f);
      end
    end
    req_valid = 0; req_flit = '0; rsp_ready = 0; awready = 0; wready = 0; arready = 0;
    bvalid = 0; rvalid = 0; b = '0; r = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    while (src.size() + rq.size() + bq.size() > 0) begin
      bit freq, frq, fbq;
      @(negedge clk);
      req_valid = src.size() > 0 && ($urandom % 4 != 0); if (src.size() > 0) req_flit = src[0];
      awready = $urandom % 3 != 0; wready = $urandom % 3 != 0; arready = $urandom % 3 != 0;
      rvalid = rq.size() > 0 && ($urandom % 4 != 0); if (rq.size() > 0) r = rq[0];
      bvalid = bq.size() > 0 && ($urandom % 4 != 0); if (bq.size() > 0) b = bq[0];
      rsp_ready = ($urandom % 100) < 75;
      #1;
      freq = req_valid && req_ready; frq = rvalid && rready; fbq = bvalid && bready;
      if (awvalid && awready) begin chk(exp_aw.size() > 0 && aw == exp_aw[0], "AW"); if (exp_aw.size() > 0) void'(exp_aw.pop_front()); end
      if (arvalid && arready) begin chk(exp_ar.size() > 0 && ar == exp_ar[0], "AR"); if (exp_ar.size() > 0) void'(exp_ar.pop_front()); end
      if (wvalid && wready)   begin chk(exp_w.size() > 0 && w == exp_w[0], "W");    if (exp_w.size() > 0) void'(exp_w.pop_front()); end
      chk(!(awvalid && wvalid) && !(arvalid && wvalid), "one request channel at a time");
      if (rsp_valid && rsp_ready) begin
        if (rsp_flit.kind == K_R) begin
          chk(exp_rsp_r.size() > 0 && rsp_flit == exp_rsp_r[0], "R flit");
          if (exp_rsp_r.size() > 0) void'(exp_rsp_r.pop_front());
          in_r = !rsp_flit.eot;
        end else begin
          chk(!in_r, "no B inside an R burst");
          chk(exp_rsp_b.size() > 0 && rsp_flit == exp_rsp_b[0], "B flit");
          if (exp_rsp_b.size() > 0) void'(exp_rsp_b.pop_front());
        end
      end
      @(posedge clk);
      if (freq) void'(src.pop_front());
      if (frq) void'(rq.pop_front());
      if (fbq) void'(bq.pop_front());
    end
    chk(exp_aw.size() + exp_ar.size() + exp_w.size() + exp_rsp_r.size() + exp_rsp_b.size() == 0, "everything delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
