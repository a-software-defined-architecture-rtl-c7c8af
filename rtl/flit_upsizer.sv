// flit_upsizer: rebuilds 152-bit flits from the 64-bit words of a serDES Rx pipeline.
//
// Words arrive least significant first, three per flit, as sent by flit_downsizer. The lane is
// lossless and in order, so alignment is kept by counting valid words from reset. out_valid is
// a one-cycle pulse with the rebuilt flit; there is no ready, since the lane cannot be stopped.
// The 64-to-152 width change follows the document; the packing is this design's.
//
// Timing: out_valid rises the cycle after the third word of a flit is presented.
module flit_upsizer
  import dmc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rx_valid,
  input  logic [LANE_W-1:0] rx_data,
  output logic              out_valid,
  output flit_t             out_flit
);
  logic [2*LANE_W-1:0] low_q;  // first two words of the flit being built
  logic [1:0]          cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= 2'd0;
      low_q     <= '0;
      out_valid <= 1'b0;
      out_flit  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (rx_valid) begin
        if (cnt_q == 2'(LANE_WORDS - 1)) begin
          out_flit  <= flit_t'({rx_data[FLIT_W-2*LANE_W-1:0], low_q});
          out_valid <= 1'b1;
          cnt_q     <= 2'd0;
        end else begin
          low_q <= {rx_data, low_q[2*LANE_W-1:LANE_W]};
          cnt_q <= cnt_q + 2'd1;
        end
      end
    end
  end

endmodule
