// tb_memport_lookup: writes segment entries, then looks up random and boundary addresses and
// compares hit, translated address and OutPort with a range model. Includes the 512 MiB example
// mapping 0x8_0000_0000..0x8_1FFF_FFFF (compute brick) onto 0x2000_0000.. (memory brick).
module tb_memport_lookup;
  import dmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we; logic [IDX_W-1:0] cfg_idx; seg_entry_t cfg_data;
  logic [ADDR_W-1:0] lk_addr, lk_addr_out; logic lk_hit; logic [OUTP_W-1:0] lk_outport;

  memport_lookup #(.ENTRIES(4)) dut (.*);

  // independent model: segment base on the memory brick rather than an offset
  logic [ADDR_W-1:0] lo [4], hi [4], rbase [4]; logic [1:0] op [4]; bit vld [4];

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s addr=%h", msg, lk_addr); end
  endtask

  task automatic wr(input int i, input logic [ADDR_W-1:0] l, input logic [ADDR_W-1:0] h,
                    input logic [ADDR_W-1:0] rb, input logic [1:0] o, input bit v);
    @(negedge clk);
    cfg_we = 1; cfg_idx = IDX_W'(i);
    cfg_data.valid = v; cfg_data.low = l; cfg_data.high = h; cfg_data.offset = rb - l; cfg_data.outport = o;
    lo[i] = l; hi[i] = h; rbase[i] = rb; op[i] = o; vld[i] = v;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic look(input logic [ADDR_W-1:0] a);
    bit h = 0; logic [ADDR_W-1:0] exp_a = a; logic [1:0] exp_o = 0;
    lk_addr = a; #1;
    for (int i = 0; i < 4; i++)
      if (!h && vld[i] && a >= lo[i] && a <= hi[i]) begin h = 1; exp_a = rbase[i] + (a - lo[i]); exp_o = op[i]; end
    chk(lk_hit == h, "hit");
    if (h) begin chk(lk_addr_out == exp_a, "translated address"); chk(lk_outport == exp_o, "outport"); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_idx = 0; cfg_data = '0; lk_addr = 0;
    for (int i = 0; i < 4; i++) vld[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); look(40'h08_0000_0000); chk(!lk_hit, "empty table misses");
    // four 512 MiB segments, as in the prototype, spread over two lanes
    wr(0, 40'h08_0000_0000, 40'h08_1FFF_FFFF, 40'h00_2000_0000, 2'd0, 1);
    wr(1, 40'h08_2000_0000, 40'h08_3FFF_FFFF, 40'h00_4000_0000, 2'd1, 1);
    wr(2, 40'h10_0000_0000, 40'h10_1FFF_FFFF, 40'h00_0000_0000, 2'd1, 1);
    wr(3, 40'h20_0000_0000, 40'h20_1FFF_FFFF, 40'h00_6000_0000, 2'd0, 1);
    look(40'h08_0000_0000); chk(lk_addr_out == 40'h00_2000_0000, "example low bound");
    look(40'h08_1FFF_FFFF); chk(lk_addr_out == 40'h00_3FFF_FFFF, "example high bound");
    look(40'h07_FFFF_FFFF); look(40'h08_4000_0000); look(40'h10_2000_0000);
    for (int k = 0; k < 2000; k++) begin
      logic [ADDR_W-1:0] a;
      automatic int s = $urandom % 5;
      a = {8'($urandom), $urandom};
      if (s < 4) a = lo[s] + ADDR_W'({$urandom} % 32'h2100_0000) - 40'h80_0000;
      look(a);
    end
    // invalidate one entry
    wr(1, 40'h08_2000_0000, 40'h08_3FFF_FFFF, 40'h00_4000_0000, 2'd1, 0);
    look(40'h08_2000_1000); chk(!lk_hit, "invalidated entry misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
