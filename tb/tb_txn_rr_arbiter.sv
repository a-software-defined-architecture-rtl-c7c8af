// tb_txn_rr_arbiter: three input queues of random multi-flit transactions into one output with
// random back pressure. Checks that transactions leave whole (never interleaved), in per-input
// order, that every flit arrives, and that with all inputs busy the grant rotates 0,1,2,0,...
module tb_txn_rr_arbiter;
  import dmc_pkg::*;
  localparam int NIN = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NIN-1:0] in_valid, in_ready;
  flit_t in_flit [NIN];
  logic out_valid, out_ready;
  flit_t out_flit;
  logic [1:0] grant;

  txn_rr_arbiter #(.NIN(NIN)) dut (.*);

  flit_t src [NIN][$];
  int cur_src = -1, last_txn_src = -1, rotations_ok = 0;
  bit all_busy_at_start;

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
    automatic int total = 0;
    for (int i = 0; i < NIN; i++)
      for (int t = 0; t < 60; t++) begin
        automatic int len = 1 + $urandom % 5;
        for (int f = 0; f < len; f++) begin
          automatic flit_t x = '0;
          x.kind = K_R; x.eot = (f == len - 1);
          x.body[7:0] = 8'(i); x.body[23:8] = 16'(t); x.body[31:24] = 8'(f);
          src[i].push_back(x); total++;
        end
      end
    in_valid = '0; out_ready = 0;
    for (int i = 0; i < NIN; i++) in_flit[i] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    while (total > 0) begin
      int s, fs; bit fire;
      @(negedge clk);
      for (int i = 0; i < NIN; i++) begin
        in_valid[i] = src[i].size() > 0;
        if (src[i].size() > 0) in_flit[i] = src[i][0];
      end
      out_ready = ($urandom % 100) < 70;
      #1;
      if (out_valid && out_ready) begin
        s = int'(out_flit.body[7:0]);
        chk(src[s].size() > 0 && out_flit == src[s][0], "flit is the head of its input");
        chk(in_ready[s] && $countones(in_ready) == 1, "only the granted input is popped");
        if (cur_src >= 0) chk(s == cur_src, "transaction not interleaved");
        else begin
          // new transaction: round robin order when every input has work
          if (last_txn_src >= 0 && src[0].size() > 0 && src[1].size() > 0 && src[2].size() > 0) begin
            chk(s == (last_txn_src + 1) % NIN, "round-robin rotation");
            rotations_ok++;
          end
          cur_src = s;
        end
        if (out_flit.eot) begin last_txn_src = s; cur_src = -1; end
      end
      fire = out_valid && out_ready; fs = int'(out_flit.body[7:0]);
      @(posedge clk);
      if (fire) begin void'(src[fs].pop_front()); total--; end
    end
    chk(rotations_ok > 20, "rotation observed with all inputs busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
