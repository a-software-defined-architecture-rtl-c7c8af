// memport_lookup: the MemPort Lookup Structure of one master port.
//
// It holds one entry per remote memory segment allocated to the compute brick: the segment's
// bounds in the compute brick's physical address space (Low Addr, High Addr), which serve as the
// index, the Rmem Offset that maps it onto the memory brick's own address space, and the OutPort,
// the lane whose circuit leads to that memory brick. These four fields follow the document; the
// entry count, inclusive bounds, lowest-index priority and clear-on-reset are choices of this
// design.
//
// Lookup is combinational: lk_addr in, lk_hit / lk_addr_out / lk_outport out in the same cycle.
// Writes (cfg_we) take effect from the next cycle. A write carries a whole entry.
module memport_lookup
  import dmc_pkg::*;
#(
  parameter int ENTRIES = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration, driven by in-band CFG flits
  input  logic                 cfg_we,
  input  logic [IDX_W-1:0]     cfg_idx,
  input  seg_entry_t           cfg_data,
  // lookup
  input  logic [ADDR_W-1:0]    lk_addr,
  output logic                 lk_hit,
  output logic [ADDR_W-1:0]    lk_addr_out,
  output logic [OUTP_W-1:0]    lk_outport
);
  seg_entry_t table_q [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) table_q[i] <= '0;
    end else if (cfg_we) begin
      for (int i = 0; i < ENTRIES; i++)
        if (int'(cfg_idx) == i) table_q[i] <= cfg_data;
    end
  end

  always_comb begin
    lk_hit      = 1'b0;
    lk_addr_out = lk_addr;
    lk_outport  = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (table_q[i].valid && (lk_addr >= table_q[i].low) && (lk_addr <= table_q[i].high)) begin
        lk_hit      = 1'b1;
        lk_addr_out = lk_addr + table_q[i].offset;
        lk_outport  = table_q[i].outport;
      end
    end
  end

endmodule
