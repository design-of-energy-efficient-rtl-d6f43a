// noc_pkg: constants and types shared by the bypass router, its dual-function
// links and the mesh.
//
// The default configuration is the "434D-B" design point: 4 virtual channels
// per input port, 3 router flit buffers per VC (12 unified slots per port),
// 4 channel buffers per link, dynamic buffer allocation and router bypassing,
// 128-bit flits, 4-flit packets and an 8x8 mesh of 5-port routers.
//
// Flit layout (128 bits, this design's own choice of field order):
//   [127]     head   first flit of a packet
//   [126]     tail   last flit of a packet
//   [125:124] vcid   virtual channel at the receiving input port
//   [123:118] dest   destination router, {y[2:0], x[2:0]}
//   [117:112] src    source router
//   [111:0]   payload
// The lookahead that runs one cycle ahead of every flit carries the 6-bit
// destination plus the head/tail flags and the VCID.
package noc_pkg;

  localparam int FLIT_W     = 128;
  localparam int NUM_VC     = 4;
  localparam int VC_W       = 2;
  localparam int BUF_PER_VC = 3;
  localparam int BUF_SLOTS  = NUM_VC * BUF_PER_VC;            // z = v*r = 12
  localparam int LINK_BUFS  = 4;                              // c
  localparam int VC_CREDITS = (BUF_SLOTS + LINK_BUFS) / NUM_VC; // (z+c)/v = 4
  localparam int MESH_X     = 8;
  localparam int MESH_Y     = 8;
  localparam int COORD_W    = 3;
  localparam int ADDR_W     = 2 * COORD_W;                    // log2(64) = 6
  localparam int NUM_PORTS  = 5;
  localparam int PORT_W     = 3;
  localparam int PKT_FLITS  = 4;
  localparam int PAYLOAD_W  = FLIT_W - 2 - VC_W - 2 * ADDR_W;

  // Port numbering of a router
  localparam logic [PORT_W-1:0] P_XP    = 3'd0;  // +x (east)
  localparam logic [PORT_W-1:0] P_XM    = 3'd1;  // -x (west)
  localparam logic [PORT_W-1:0] P_YP    = 3'd2;  // +y (north)
  localparam logic [PORT_W-1:0] P_YM    = 3'd3;  // -y (south)
  localparam logic [PORT_W-1:0] P_LOCAL = 3'd4;  // processing element

  typedef struct packed {
    logic                 head;
    logic                 tail;
    logic [VC_W-1:0]      vcid;
    logic [ADDR_W-1:0]    dest;
    logic [ADDR_W-1:0]    src;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  typedef struct packed {
    logic              valid;
    logic              head;
    logic              tail;
    logic [VC_W-1:0]   vcid;
    logic [ADDR_W-1:0] dest;
  } la_t;

  // State of one input VC in the unified VC state table
  typedef enum logic [1:0] {
    VS_IDLE   = 2'd0,   // no packet
    VS_RC     = 2'd1,   // head buffered, route computation this cycle
    VS_VA     = 2'd2,   // waiting for an output VC
    VS_ACTIVE = 2'd3    // OP and OVC known, flits may leave
  } vc_state_e;

  typedef struct packed {
    vc_state_e         state;
    logic              bypass;   // "Status": flits of this VC go wire-to-wire
    logic [PORT_W-1:0] op;
    logic [VC_W-1:0]   ovc;
  } vc_entry_t;

endpackage
