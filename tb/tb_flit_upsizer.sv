// tb_flit_upsizer: lane words of random flits, three per flit, low word first, with random idle
// cycles between words; each rebuilt flit must match and appear one cycle after its third word.
module tb_flit_upsizer;
  import dmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rx_valid, out_valid;
  logic [63:0] rx_data;
  flit_t out_flit;

  flit_upsizer dut (.*);

  flit_t exp_q [$];
  int got = 0;

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
    rx_valid = 0; rx_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 400; f++) begin
      automatic flit_t x = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      automatic logic [191:0] wide = {40'h0, x};
      for (int w = 0; w < 3; w++) begin
        while ($urandom % 4 == 0) begin
          @(negedge clk); rx_valid = 0; #1 chk(!out_valid || (w == 0), "no flit mid-assembly");
          if (out_valid) begin chk(exp_q.size() > 0 && out_flit == exp_q[0], "flit"); void'(exp_q.pop_front()); got++; end
        end
        @(negedge clk); rx_valid = 1; rx_data = wide[64*w +: 64];
        #1;
        if (out_valid) begin
          chk(w == 0 && exp_q.size() > 0 && out_flit == exp_q[0], "flit right after third word");
          if (exp_q.size() > 0) void'(exp_q.pop_front());
          got++;
        end
        if (w == 2) exp_q.push_back(x);
      end
    end
    @(negedge clk); rx_valid = 0; #1;
    if (out_valid) begin chk(exp_q.size() > 0 && out_flit == exp_q[0], "last flit"); void'(exp_q.pop_front()); got++; end
    chk(got == 400 && exp_q.size() == 0, $sformatf("all flits rebuilt (%0d)", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
