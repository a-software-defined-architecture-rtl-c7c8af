// tb_txn_steer: random transactions of 1-4 flits with random destinations (some out of range,
// some flagged for discard) through a 1x3 steering crossbar with random back pressure. The
// destination input is scrambled on every non-first flit, so routing must be held per
// transaction. Each output's flit sequence is compared with the expected one.
module tb_txn_steer;
  import dmc_pkg::*;
  localparam int NOUT = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, in_discard, first;
  flit_t in_flit, out_flit;
  logic [1:0] in_dest;
  logic [NOUT-1:0] out_valid, out_ready;

  txn_steer #(.NOUT(NOUT), .DW(2)) dut (.*);

  flit_t exp_q [NOUT][$];
  flit_t src [$]; int src_dest [$]; bit src_disc [$]; bit src_first [$];
  int stalls = 0, discards = 0;

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // build 300 transactions
    for (int t = 0; t < 300; t++) begin
      automatic int len = 1 + $urandom % 4; automatic int d = $urandom % 4; automatic bit disc = ($urandom % 8) == 0;
      for (int f = 0; f < len; f++) begin
        automatic flit_t x = '0;
        x.kind = (f == 0) ? K_AW : K_W; x.eot = (f == len - 1);
        x.body[31:0] = 32'(t * 16 + f);
        src.push_back(x); src_dest.push_back(d); src_disc.push_back(disc); src_first.push_back(f == 0);
        if (!disc && d < NOUT) exp_q[d].push_back(x);
      end
      if (disc || d >= NOUT) discards++;
    end
    in_valid = 0; in_flit = '0; in_dest = 0; in_discard = 0; out_ready = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    while (src.size() > 0) begin
      bit fire;
      @(negedge clk);
      in_valid   = ($urandom % 100) < 80;
      in_flit    = src[0];
      in_dest    = src_first[0] ? 2'(src_dest[0]) : 2'($urandom);
      in_discard = src_first[0] ? src_disc[0] : 1'($urandom);
      for (int i = 0; i < NOUT; i++) out_ready[i] = ($urandom % 100) < 60;
      #1;
      chk(first == src_first[0], "first flag");
      for (int i = 0; i < NOUT; i++)
        if (out_valid[i] && out_ready[i]) begin
          chk(exp_q[i].size() > 0 && out_flit == exp_q[i][0], $sformatf("flit on output %0d", i));
          if (exp_q[i].size() > 0) void'(exp_q[i].pop_front());
        end
      chk($countones(out_valid) <= 1, "one output at a time");
      if (in_valid && !in_ready) stalls++;
      fire = in_valid && in_ready;
      @(posedge clk);
      if (fire) begin
        void'(src.pop_front()); void'(src_dest.pop_front()); void'(src_disc.pop_front()); void'(src_first.pop_front());
      end
    end
    for (int i = 0; i < NOUT; i++) chk(exp_q[i].size() == 0, "all flits delivered");
    chk(stalls > 0, "back pressure stalled the input");
    chk(discards > 0, "discards exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
