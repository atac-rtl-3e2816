// atac_pkg: types and constants shared by the ATAC network and coherence blocks.
//
// A flit is split the way the optical network splits its waveguides: a metadata part
// (head/tail framing, destination, broadcast flag, sender and message type) that travels on
// its own lanes, and a 128-bit data part, one bit per data waveguide. Every flit of a packet
// carries the full metadata, so any receiver can filter any flit on its own.
//
// Core identifiers are 10 bits: cluster number in the upper 6 bits, tile number inside the
// 4x4 cluster mesh in the lower 4 (tile = y*4 + x). The 128-bit width, 64 clusters of 16 tiles
// and 4 hardware sharers (ACKwise_4) follow the 1024-core configuration; the message set,
// field layout, 16-byte cache line and address split are choices of this design.
package atac_pkg;

  localparam int unsigned DATA_W      = 128;  // ONet/ENet/BNet data width
  localparam int unsigned CLUSTER_W   = 6;    // up to 64 clusters (Hubs)
  localparam int unsigned TILE_W      = 4;    // 16 tiles per cluster
  localparam int unsigned CORE_W      = CLUSTER_W + TILE_W;
  localparam int unsigned ADDR_W      = 32;   // byte address
  localparam int unsigned LINE_OFS_W  = 4;    // 16-byte line, one data flit

  typedef logic [CORE_W-1:0]    core_id_t;
  typedef logic [CLUSTER_W-1:0] cluster_id_t;
  typedef logic [TILE_W-1:0]    tile_id_t;
  typedef logic [ADDR_W-1:0]    addr_t;

  // Message types carried on the metadata lanes.
  typedef enum logic [3:0] {
    MSG_REQ_SH  = 4'd0,   // cache -> home: request a shared copy
    MSG_REQ_EX  = 4'd1,   // cache -> home: request an exclusive copy
    MSG_EVICT   = 4'd2,   // cache -> home: line dropped (no silent evictions)
    MSG_ACK     = 4'd3,   // sharer / memory controller -> home
    MSG_MEM_RD  = 4'd4,   // home -> memory controller: send line to requester
    MSG_MEM_WB  = 4'd5,   // cache -> memory controller: write back (2 flits)
    MSG_FWD_SH  = 4'd6,   // home -> sharer: supply a shared copy to requester
    MSG_FWD_EX  = 4'd7,   // home -> sharer: supply line to requester and invalidate
    MSG_INV     = 4'd8,   // home -> sharer(s): invalidate (unicast or broadcast)
    MSG_DATA    = 4'd9,   // line data to requester (2 flits)
    MSG_GRANT   = 4'd10,  // home -> requester: upgrade to exclusive done
    MSG_RAW     = 4'd11   // plain core-to-core data
  } msg_t;

  typedef struct packed {
    logic     head;
    logic     tail;
    logic     bcast;      // deliver to every core
    core_id_t dst;
    core_id_t src;
    msg_t     mtype;
  } meta_t;

  typedef struct packed {
    meta_t              meta;
    logic [DATA_W-1:0]  data;
  } flit_t;

  // Layout of the data lanes of a coherence message's head flit.
  typedef struct packed {
    logic [DATA_W-ADDR_W-4*CORE_W-6-1:0] pad;
    logic     nack;       // ACK: the sharer no longer held the line
    logic     dirty;      // EVICT: line was written back first
    logic     excl;       // MEM_RD / DATA: exclusive copy
    logic     upgrade;    // REQ_EX: requester already holds a shared copy
    logic     exc1_v;     // INV: exc1 valid
    logic     exc2_v;     // INV: exc2 valid
    core_id_t exc1;       // INV broadcast: cores that must ignore it
    core_id_t exc2;
    core_id_t home;       // home directory of the line
    core_id_t req;        // requester
    addr_t    addr;
  } coh_t;

  // Directory states (MOESI, as kept at the home).
  typedef enum logic [2:0] {
    DS_I = 3'd0, DS_S = 3'd1, DS_E = 3'd2, DS_O = 3'd3, DS_M = 3'd4
  } dstate_t;

  // Tiles whose routers carry the extra output port to the Hub: (x=1,y=1) serves the
  // west half of the cluster, (x=2,y=2) the east half.
  localparam tile_id_t HUB_TILE_W = 4'd5;
  localparam tile_id_t HUB_TILE_E = 4'd10;

  // Router port numbering.
  localparam int unsigned P_N = 0, P_E = 1, P_S = 2, P_W = 3, P_L = 4, P_H = 5;

  // Home of a line: low 10 bits of the line address. Memory controller: tile 0 of the
  // home's cluster.
  function automatic core_id_t home_of(addr_t a);
    return a[LINE_OFS_W +: CORE_W];
  endfunction

  function automatic core_id_t mc_of(addr_t a);
    core_id_t h;
    h = home_of(a);
    return {h[CORE_W-1:TILE_W], {TILE_W{1'b0}}};
  endfunction

  function automatic cluster_id_t cluster_of(core_id_t c);
    return c[CORE_W-1:TILE_W];
  endfunction

  function automatic tile_id_t tile_of(core_id_t c);
    return c[TILE_W-1:0];
  endfunction

endpackage
