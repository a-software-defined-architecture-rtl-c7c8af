// tb_rate_limiter: a saturated input with the limiter off (one flit per cycle), then on with
// several rates. Every cycle the output is compared with an ideal token bucket kept by the
// testbench, and over 1000 cycles a rate of r/256 flits per cycle must pass the bucket size plus
// about 1000*r/256 flits. Also checks that flits pass unchanged and that a stalled output does
// not let credit grow past the bucket size.
module tb_rate_limiter;
  import dmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_en; logic [8:0] cfg_rate; logic [7:0] cfg_burst;
  logic in_valid, in_ready, out_valid, out_ready, throttled;
  flit_t in_flit, out_flit;

  rate_limiter dut (.*);

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  // count flits passed in a window of n cycles
  // ideal token bucket, in 1/256 flit units, updated once per cycle
  int mc = 32'hFF00;
  always @(negedge clk) begin
    #2;
    if (!rst_n) mc = 32'hFF00;
    else begin
      automatic bit allow = !cfg_en || mc >= 256;
      checks++;
      if (out_valid != (in_valid && allow)) begin failures++; $display("FAIL token bucket model (t=%0t)", $time); end
      if (!cfg_en) mc = int'(cfg_burst) * 256;
      else begin
        if (out_valid && out_ready) mc -= 256;
        mc += int'(cfg_rate);
        if (mc > int'(cfg_burst) * 256) mc = int'(cfg_burst) * 256;
      end
    end
  end

  task automatic window(input int n, output int passed, output int first_gap_start);
    passed = 0; first_gap_start = -1;
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      in_flit.body[31:0] = 32'(c);
      #1;
      chk(out_flit == in_flit, "flit passes unchanged");
      chk(throttled == (in_valid && !out_valid), "throttled flag");
      if (out_valid && out_ready) passed++;
      else if (first_gap_start < 0) first_gap_start = c;
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, g;
    automatic int rates [4] = '{64, 100, 200, 13};
    cfg_en = 0; cfg_rate = 256; cfg_burst = 4; in_valid = 0; out_ready = 1; in_flit = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    in_valid = 1;
    window(100, p, g);
    chk(p == 100, "disabled limiter passes a flit every cycle");
    foreach (rates[k]) begin
      // refill the bucket while disabled, then enable
      @(negedge clk); cfg_en = 0; cfg_burst = 8'(2 + k); repeat (3) @(negedge clk);
      cfg_rate = 9'(rates[k]); cfg_en = 1;
      window(1000, p, g);
      begin
        automatic int lo_exp = (2 + k) + ((1000 - (2 + k)) * rates[k]) / 256 - 1;
        automatic int hi_exp = (2 + k) + ((1000 * rates[k]) + 255) / 256 + 1;
        chk(p >= lo_exp && p <= hi_exp, $sformatf("rate %0d: %0d flits in 1000 cycles, expected %0d..%0d", rates[k], p, lo_exp, hi_exp));
      end
    end
    // output stalled for a long time: credit capped at burst
    @(negedge clk); cfg_burst = 3; cfg_rate = 32; out_ready = 0; repeat (500) @(negedge clk);
    out_ready = 1;
    window(10, p, g);
    // the first of the three buffered flits leaves in the cycle before the window starts
    chk(g == 2, $sformatf("credit capped at bucket size: burst %0d", g));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
