// flit_downsizer: turns 152-bit flits into 64-bit words for a serDES Tx pipeline.
//
// A flit is sent as three lane words, least significant first; the top word carries flit bits
// 151:128 and 40 zero bits. The lane cannot stall, so tx_valid marks each word and the next flit
// is accepted in the cycle its predecessor's last word goes out: the lane then carries one flit
// every three cycles. The 152-to-64 width change follows the document; the word packing is this
// design's.
//
// Timing: a flit accepted in cycle t leaves as words in cycles t+1, t+2, t+3.
module flit_downsizer
  import dmc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  flit_t             in_flit,
  output logic              tx_valid,
  output logic [LANE_W-1:0] tx_data
);
  logic [LANE_WORDS*LANE_W-1:0] shreg_q;
  logic [1:0]                   left_q;  // words still to send, including the current one

  assign in_ready = (left_q <= 2'd1);
  assign tx_valid = (left_q != 2'd0);
  assign tx_data  = shreg_q[LANE_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left_q  <= 2'd0;
      shreg_q <= '0;
    end else if (in_valid && in_ready) begin
      shreg_q <= {{(LANE_WORDS*LANE_W-FLIT_W){1'b0}}, in_flit};
      left_q  <= 2'(LANE_WORDS);
    end else if (left_q != 2'd0) begin
      shreg_q <= {{LANE_W{1'b0}}, shreg_q[LANE_WORDS*LANE_W-1:LANE_W]};
      left_q  <= left_q - 2'd1;
    end
  end

endmodule
