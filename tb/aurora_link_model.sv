// aurora_link_model: behavioural model of one serial lane direction, not synthesizable logic.
// It stands for a serDES Tx pipeline, the cable or circuit-switched path, and the serDES Rx
// pipeline of the far brick: a 64-bit word presented with valid appears LAT cycles later at the
// other end, unchanged and in order, with no back pressure. LAT defaults to 57 cycles, the
// one-way pipeline latency quoted for the prototype's serial cores.
module aurora_link_model #(
  parameter int LAT = 57
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] in_data,
  output logic        out_valid,
  output logic [63:0] out_data
);
  logic        v [LAT];
  logic [63:0] d [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin v[i] <= 1'b0; d[i] <= '0; end
    end else begin
      v[0] <= in_valid; d[0] <= in_data;
      for (int i = 1; i < LAT; i++) begin v[i] <= v[i-1]; d[i] <= d[i-1]; end
    end
  end
  assign out_valid = v[LAT-1];
  assign out_data  = d[LAT-1];
endmodule
