// tb_edge_fifo: random pushes and pops against a queue model; checks order, data, the ready and
// valid flags against the model's fill level, and the one-cycle write-to-read latency.
module tb_edge_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D+1)-1:0] count;
  logic [W-1:0] model [$];

  edge_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit push, pop; automatic int fulls = 0;
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // phases: fill-heavy, drain-heavy, mixed
      in_valid  = ($urandom % 100) < ((cyc % 600 < 200) ? 90 : (cyc % 600 < 400) ? 20 : 55);
      out_ready = ($urandom % 100) < ((cyc % 600 < 200) ? 20 : (cyc % 600 < 400) ? 90 : 55);
      in_data   = W'($urandom);
      #1;
      chk(in_ready == (model.size() < D), "in_ready vs fill level");
      chk(out_valid == (model.size() > 0), "out_valid vs fill level");
      chk(int'(count) == model.size(), "count");
      if (model.size() == D) fulls++;
      if (out_valid && model.size() > 0) chk(out_data == model[0], "head data");
      push = in_valid && in_ready;
      pop  = out_valid && out_ready;
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(in_data);
    end
    chk(fulls > 0, "queue reached full at least once");
    // one-cycle latency: push into empty queue, visible next cycle
    @(negedge clk); out_ready = 1; in_valid = 0; repeat (D+2) @(negedge clk);
    model.delete();
    in_valid = 1; in_data = 16'hBEEF; out_ready = 0;
    @(negedge clk); in_valid = 0;
    #1 chk(out_valid && out_data == 16'hBEEF, "visible one cycle after push");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
