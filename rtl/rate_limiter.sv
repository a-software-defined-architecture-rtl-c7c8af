// rate_limiter: caps the flit rate entering one lane's Tx pipeline.
//
// The lanes between bricks have no back pressure, so a memory brick whose lanes together can
// carry more than its memory controllers serve could overflow. The control plane, which knows
// every allocation, therefore sets a limit per compute-brick lane. That role follows the
// document; the mechanism, a token bucket, is this design's choice:
//   * every cycle the bucket gains cfg_rate credits, 256 credits being one flit;
//   * it holds at most cfg_burst flits' worth of credit (cfg_burst must be at least 1);
//   * a flit may pass only when the bucket holds 256 credits or more, and then costs 256.
// With cfg_en low the limiter is transparent. After reset it is disabled with a full bucket.
//
// Timing: combinational pass-through of valid/ready/flit, gated by the credit count.
module rate_limiter
  import dmc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_en,
  input  logic [8:0]  cfg_rate,   // credits per cycle, 256 = one flit per cycle
  input  logic [7:0]  cfg_burst,  // bucket size in flits
  input  logic        in_valid,
  output logic        in_ready,
  input  flit_t       in_flit,
  output logic        out_valid,
  input  logic        out_ready,
  output flit_t       out_flit,
  output logic        throttled   // a flit waits for credit this cycle
);
  logic [16:0] credit_q, cap, sum, after;
  logic        allow;

  assign cap       = {1'b0, cfg_burst, 8'h00};
  assign allow     = !cfg_en || (credit_q >= 17'd256);
  assign out_valid = in_valid && allow;
  assign in_ready  = out_ready && allow;
  assign out_flit  = in_flit;
  assign throttled = in_valid && !allow;

  always_comb begin
    after = (out_valid && out_ready && cfg_en) ? credit_q - 17'd256 : credit_q;
    sum   = after + {8'h00, cfg_rate};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      credit_q <= 17'h0FF00;
    else if (!cfg_en) credit_q <= cap;
    else             credit_q <= (sum > cap) ? cap : sum;
  end

endmodule
