// flit_mem_model: behavioural model of a memory-brick slave port (streamer, AXI4 interconnect,
// DDR controller and DRAM together), not synthesizable logic. It takes request transactions
// as flits: AW + W beats (INCR bursts of 16-byte beats) are written to a sparse memory and
// answered with one B flit; AR is answered with len+1 R flits. Responses copy the request's
// master tag, link tag and id, as the memory-brick side must for responses to find their way
// back. Response flits are queued and released in order. `stall` holds req_ready low.
// `protocol_errors` counts W beats without a header and headers inside a write burst.
module flit_mem_model
  import dmc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  stall,
  input  logic  req_valid,
  output logic  req_ready,
  input  flit_t req_flit,
  output logic  rsp_valid,
  input  logic  rsp_ready,
  output flit_t rsp_flit,
  output int    n_requests,
  output int    protocol_errors
);
  logic [127:0] mem [logic [39:0]];
  flit_t        rsp_q [$];
  flit_t        cur_hdr;
  bit           in_write = 0;
  int           beat = 0;

  // Outputs change only through nonblocking updates, like flip-flops, so the design sees the
  // values from before each clock edge.
  always @(posedge clk) begin
    if (!rst_n) begin
      rsp_q.delete(); in_write = 0; beat = 0; n_requests = 0; protocol_errors = 0;
      req_ready <= 1'b0; rsp_valid <= 1'b0; rsp_flit <= '0;
    end else begin
      if (rsp_valid && rsp_ready) void'(rsp_q.pop_front());
      if (req_valid && req_ready) begin
        automatic flit_t f = req_flit;
        automatic flit_t r = '0;
        case (f.kind)
          K_AW: begin
            if (in_write) protocol_errors++;
            cur_hdr = f; in_write = 1; beat = 0; n_requests++;
          end
          K_W: begin
            if (!in_write) protocol_errors++;
            else begin
              mem[cur_hdr.body[39:0] + 40'(16 * beat)] = f.body[127:0];
              if (f.eot != (beat == int'(cur_hdr.body[47:40]))) protocol_errors++;
              beat++;
              if (f.eot) begin
                r.kind = K_B; r.eot = 1; r.mtag = cur_hdr.mtag; r.ltag = cur_hdr.ltag;
                r.body[7:2] = cur_hdr.body[58:53];
                rsp_q.push_back(r);
                in_write = 0;
              end
            end
          end
          K_AR: begin
            if (in_write) protocol_errors++;
            n_requests++;
            for (int b = 0; b <= int'(f.body[47:40]); b++) begin
              automatic logic [39:0] a = f.body[39:0] + 40'(16 * b);
              r = '0;
              r.kind = K_R; r.eot = (b == int'(f.body[47:40])); r.mtag = f.mtag; r.ltag = f.ltag;
              r.body[127:0] = mem.exists(a) ? mem[a] : {88'h0, a};
              r.body[135:130] = f.body[58:53];
              rsp_q.push_back(r);
            end
          end
          default: protocol_errors++;
        endcase
      end
      req_ready <= !stall && (rsp_q.size() < 64);
      rsp_valid <= rsp_q.size() > 0;
      rsp_flit  <= (rsp_q.size() > 0) ? rsp_q[0] : '0;
    end
  end
endmodule
