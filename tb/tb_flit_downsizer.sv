// tb_flit_downsizer: random flits with random gaps; each must appear as three lane words, low
// word first, top 40 bits zero, one flit per three cycles when the input is saturated, and the
// first word one cycle after the flit is accepted.
module tb_flit_downsizer;
  import dmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, tx_valid;
  flit_t in_flit;
  logic [63:0] tx_data;

  flit_downsizer dut (.*);

  logic [63:0] exp_words [$];
  int accepts [$];   // cycle each flit was accepted
  int cyc = 0, first_word_cyc [$];

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
    automatic int n_sent = 0, word_idx = 0, sat_start = -1, sat_count = 0;
    in_valid = 0; in_flit = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    while (n_sent < 300 || exp_words.size() > 0) begin
      bit fire;
      @(negedge clk); cyc++;
      if (!in_valid || in_ready) begin
        in_valid = (n_sent < 300) && ((n_sent >= 100 && n_sent < 200) || ($urandom % 3 == 0));
        in_flit  = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      end
      #1;
      if (tx_valid) begin
        chk(exp_words.size() > 0 && tx_data == exp_words[0], "lane word");
        if (word_idx == 0 && accepts.size() > 0) begin
          chk(cyc == accepts[0] + 1, "first word one cycle after accept");
          void'(accepts.pop_front());
        end
        word_idx = (word_idx + 1) % 3;
        if (exp_words.size() > 0) void'(exp_words.pop_front());
      end else chk(exp_words.size() == 0 || accepts.size() > 0 && accepts[0] == cyc, "no idle word inside a flit");
      fire = in_valid && in_ready;
      if (fire) begin
        automatic logic [191:0] wide = {40'h0, in_flit};
        exp_words.push_back(wide[63:0]); exp_words.push_back(wide[127:64]); exp_words.push_back(wide[191:128]);
        accepts.push_back(cyc);
        n_sent++;
        if (n_sent == 120) sat_start = cyc;
        if (n_sent == 180) chk(cyc - sat_start == 180, $sformatf("saturated rate: 60 flits in %0d cycles", cyc - sat_start));
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
