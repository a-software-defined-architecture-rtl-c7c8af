// tb_req_prep_steer: configures the lookup table of master port 1 with in-band CFG flits, then
// sends random write (AW + W beats) and read (AR) transactions, some to unmapped addresses.
// Checks on the two lane outputs: translated address, master tag = 1, the lane chosen by the
// segment, W beats untouched and following their header, unmapped requests dropped with a
// lookup_miss pulse, CFG flits not forwarded, and stalls under back pressure.
module tb_req_prep_steer;
  import dmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, lookup_miss, cfg_write;
  flit_t in_flit, out_flit;
  logic [1:0] out_valid, out_ready;

  req_prep_steer #(.N(2), .ENTRIES(4), .MASTER_ID(1)) dut (.*);

  flit_t src [$]; flit_t exp_q [2][$];
  int exp_miss = 0, got_miss = 0, exp_cfg = 0, got_cfg = 0, stalls = 0;
  logic [39:0] seg_lo [3] = '{40'h08_0000_0000, 40'h08_2000_0000, 40'h09_0000_0000};
  logic [39:0] seg_rb [3] = '{40'h00_2000_0000, 40'h00_0000_0000, 40'h00_4000_0000};
  int          seg_ln [3] = '{0, 1, 1};

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  function automatic flit_t mk_cfg(int idx, logic [39:0] lo, logic [39:0] hi, logic [39:0] rb, int ln);
    flit_t f = '0;
    f.kind = K_CFG; f.eot = 1;
    f.body[39:0] = lo; f.body[79:40] = hi; f.body[119:80] = rb - lo;
    f.body[121:120] = 2'(ln); f.body[125:122] = 4'(idx); f.body[126] = 1'b1;
    return f;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++) begin
      src.push_back(mk_cfg(i, seg_lo[i], seg_lo[i] + 40'h1FFF_FFFF, seg_rb[i], seg_ln[i]));
      exp_cfg++;
    end
    for (int t = 0; t < 200; t++) begin
      automatic int s = $urandom % 4;      // 3 = unmapped
      automatic logic [39:0] off = 40'({$urandom} % 32'h2000_0000) & ~40'hF;
      automatic logic [39:0] a = (s < 3) ? seg_lo[s] + off : 40'h0C_0000_0000 + off;
      automatic bit wr = ($urandom % 2 != 0);
      automatic int len = wr ? ($urandom % 4) : 0;
      automatic flit_t h = '0;
      h.kind = wr ? K_AW : K_AR; h.eot = !wr; h.body[39:0] = a; h.body[47:40] = 8'(len);
      h.body[58:53] = 6'(t); h.mtag = 2'd3;
      src.push_back(h);
      if (s < 3) begin
        automatic flit_t e = h;
        e.body[39:0] = seg_rb[s] + off; e.mtag = 2'd1;
        exp_q[seg_ln[s]].push_back(e);
      end else exp_miss++;
      if (wr) for (int b = 0; b <= len; b++) begin
        automatic flit_t w = '0;
        w.kind = K_W; w.eot = (b == len); w.body[127:0] = {$urandom, $urandom, $urandom, $urandom};
        src.push_back(w);
        if (s < 3) exp_q[seg_ln[s]].push_back(w);
      end
    end
    in_valid = 0; in_flit = '0; out_ready = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    while (src.size() > 0) begin
      bit fire;
      @(negedge clk);
      in_valid = ($urandom % 100) < 85; in_flit = src[0];
      out_ready[0] = ($urandom % 100) < 60; out_ready[1] = ($urandom % 100) < 60;
      #1;
      for (int i = 0; i < 2; i++)
        if (out_valid[i] && out_ready[i]) begin
          chk(exp_q[i].size() > 0 && out_flit == exp_q[i][0], $sformatf("flit on lane %0d", i));
          if (exp_q[i].size() > 0) void'(exp_q[i].pop_front());
        end
      if (lookup_miss) got_miss++;
      if (cfg_write) got_cfg++;
      if (in_valid && !in_ready) stalls++;
      fire = in_valid && in_ready;
      @(posedge clk);
      if (fire) void'(src.pop_front());
    end
    chk(exp_q[0].size() == 0 && exp_q[1].size() == 0, "all requests delivered");
    chk(got_miss == exp_miss, $sformatf("lookup misses %0d expected %0d", got_miss, exp_miss));
    chk(got_cfg == exp_cfg, "config writes");
    chk(stalls > 0, "back pressure stalled the master port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
