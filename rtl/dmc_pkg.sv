// dmc_pkg: types and constants shared by the disaggregated memory controller (DMC).
//
// Every memory bus transaction travels through the DMC as a sequence of 152-bit flits, the
// width of the widest AXI4 channel (read data: 128 data bits plus control). A flit carries a
// small routing header (kind, end-of-transaction, master tag, link tag) and a 144-bit body.
// The 152-bit width and the 64-bit lane width come from the prototype this design follows; the
// exact bit layout, the tag widths and the CFG flit kind are this design's own choices.
//
//   header flit (AW/AR): body[39:0] addr, [47:40] len, [50:48] size, [52:51] burst, [58:53] id
//   write beat  (W)    : body[127:0] data, [143:128] strobes
//   read beat   (R)    : body[127:0] data, [129:128] resp, [135:130] id
//   write resp  (B)    : body[1:0] resp, [7:2] id
//   config      (CFG)  : in-band write of one lookup-table entry, see cfg_* below
//
// A transaction is one header flit (AW, AR or CFG) followed, for writes, by its W beats; or
// the R beats / the B flit of a response. The flit with eot=1 ends it.
package dmc_pkg;

  localparam int FLIT_W     = 152;   // datapath width
  localparam int LANE_W     = 64;    // serDES lane word width
  localparam int LANE_WORDS = 3;     // lane words per flit, ceil(152/64)
  localparam int ADDR_W     = 40;    // physical address width
  localparam int MTAG_W     = 2;     // master-port tag (up to 4 master ports)
  localparam int LTAG_W     = 2;     // lane tag on the memory brick (up to 4 lanes)
  localparam int OUTP_W     = 2;     // OutPort field of a lookup entry
  localparam int IDX_W      = 4;     // lookup entry index in a CFG flit (up to 16 entries)
  localparam int BODY_W     = FLIT_W - 3 - 1 - MTAG_W - LTAG_W;  // 144

  typedef enum logic [2:0] {
    K_IDLE = 3'd0,
    K_AW   = 3'd1,
    K_W    = 3'd2,
    K_AR   = 3'd3,
    K_R    = 3'd4,
    K_B    = 3'd5,
    K_CFG  = 3'd6
  } flit_kind_e;

  typedef struct packed {
    flit_kind_e          kind;
    logic                eot;    // last flit of its transaction
    logic [MTAG_W-1:0]   mtag;   // originating master port, set by the CDMC
    logic [LTAG_W-1:0]   ltag;   // arriving lane, set by the MDMC
    logic [BODY_W-1:0]   body;
  } flit_t;

  // One MemPort Lookup Structure entry.
  typedef struct packed {
    logic                valid;
    logic [ADDR_W-1:0]   low;     // first compute-brick address of the segment
    logic [ADDR_W-1:0]   high;    // last compute-brick address of the segment
    logic [ADDR_W-1:0]   offset;  // added (mod 2^ADDR_W) to reach the memory-brick address
    logic [OUTP_W-1:0]   outport; // lane that leads to the memory brick holding the segment
  } seg_entry_t;

  // CFG flit body: [39:0] low, [79:40] high, [119:80] offset, [121:120] outport,
  // [125:122] entry index, [126] valid.
  function automatic seg_entry_t cfg_entry(input logic [BODY_W-1:0] b);
    seg_entry_t e;
    e.low     = b[39:0];
    e.high    = b[79:40];
    e.offset  = b[119:80];
    e.outport = b[121:120];
    e.valid   = b[126];
    return e;
  endfunction

  function automatic logic [IDX_W-1:0] cfg_index(input logic [BODY_W-1:0] b);
    return b[125:122];
  endfunction

  // AXI4 channel payloads (handshake signals travel beside them). The compute side uses
  // AXI_ID_W-bit ids; the memory side widens them by the two tags so that a response carries
  // its way back without a table.
  localparam int AXI_ID_W  = 6;
  localparam int AXI_SID_W = AXI_ID_W + MTAG_W + LTAG_W;

  typedef struct packed {           // AW or AR, compute side
    logic [AXI_ID_W-1:0] id;
    logic [ADDR_W-1:0]   addr;
    logic [7:0]          len;
    logic [2:0]          size;
    logic [1:0]          burst;
  } axi_ax_t;

  typedef struct packed {           // AW or AR, memory side
    logic [AXI_SID_W-1:0] id;
    logic [ADDR_W-1:0]    addr;
    logic [7:0]           len;
    logic [2:0]           size;
    logic [1:0]           burst;
  } axi_sax_t;

  typedef struct packed {
    logic [127:0] data;
    logic [15:0]  strb;
    logic         last;
  } axi_w_t;

  typedef struct packed { logic [AXI_ID_W-1:0] id;  logic [1:0] resp; } axi_b_t;
  typedef struct packed { logic [AXI_SID_W-1:0] id; logic [1:0] resp; } axi_sb_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    logic [127:0]        data;
    logic [1:0]          resp;
    logic                last;
  } axi_r_t;

  typedef struct packed {
    logic [AXI_SID_W-1:0] id;
    logic [127:0]         data;
    logic [1:0]           resp;
    logic                 last;
  } axi_sr_t;

  function automatic logic is_header(input flit_kind_e k);
    return (k == K_AW) || (k == K_AR);
  endfunction

endpackage
