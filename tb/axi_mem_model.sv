// axi_mem_model: behavioural model of an AXI4 memory slave (interconnect, DDR controller and
// DRAM), not synthesizable logic. INCR bursts of 16-byte beats; writes complete when all beats
// of a burst have arrived and are answered with one B; reads are answered with len+1 R beats.
// Responses keep request order. Unwritten locations read as their own address. `stall` holds
// every ready low. Outputs change only through nonblocking updates, like flip-flops.
// `protocol_errors` counts wlast flags that disagree with the burst length.
module axi_mem_model
  import dmc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     stall,
  input  logic     awvalid,
  output logic     awready,
  input  axi_sax_t aw,
  input  logic     wvalid,
  output logic     wready,
  input  axi_w_t   w,
  output logic     bvalid,
  input  logic     bready,
  output axi_sb_t  b,
  input  logic     arvalid,
  output logic     arready,
  input  axi_sax_t ar,
  output logic     rvalid,
  input  logic     rready,
  output axi_sr_t  r,
  output int       n_requests,
  output int       protocol_errors
);
  logic [127:0] mem [logic [39:0]];
  axi_sax_t aw_q [$];
  axi_w_t   w_q [$];
  axi_sb_t  b_q [$];
  axi_sr_t  r_q [$];

  always @(posedge clk) begin
    if (!rst_n) begin
      aw_q.delete(); w_q.delete(); b_q.delete(); r_q.delete();
      n_requests = 0; protocol_errors = 0;
      awready <= 0; wready <= 0; arready <= 0; bvalid <= 0; rvalid <= 0; b <= '0; r <= '0;
    end else begin
      if (bvalid && bready) void'(b_q.pop_front());
      if (rvalid && rready) void'(r_q.pop_front());
      if (awvalid && awready) begin aw_q.push_back(aw); n_requests++; end
      if (wvalid && wready) w_q.push_back(w);
      if (arvalid && arready) begin
        n_requests++;
        for (int i = 0; i <= int'(ar.len); i++) begin
          automatic logic [39:0] a = ar.addr + 40'(16 * i);
          automatic axi_sr_t x;
          x.id = ar.id; x.resp = 2'b00; x.last = (i == int'(ar.len));
          x.data = mem.exists(a) ? mem[a] : {88'h0, a};
          r_q.push_back(x);
        end
      end
      while (aw_q.size() > 0 && w_q.size() > int'(aw_q[0].len)) begin
        for (int i = 0; i <= int'(aw_q[0].len); i++) begin
          automatic axi_w_t x = w_q.pop_front();
          if (x.last != (i == int'(aw_q[0].len))) protocol_errors++;
          mem[aw_q[0].addr + 40'(16 * i)] = x.data;
        end
        b_q.push_back('{id: aw_q[0].id, resp: 2'b00});
        void'(aw_q.pop_front());
      end
      awready <= !stall && aw_q.size() < 8;
      wready  <= !stall && w_q.size() < 64;
      arready <= !stall && r_q.size() < 64;
      bvalid  <= b_q.size() > 0;
      b       <= (b_q.size() > 0) ? b_q[0] : '0;
      rvalid  <= r_q.size() > 0;
      r       <= (r_q.size() > 0) ? r_q[0] : '0;
    end
  end
endmodule
