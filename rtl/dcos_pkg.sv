// dcos_pkg: types and constants shared by the DCOS switch and mesh.
//
// The network is a 4x2 two-dimensional mesh (eight nodes) with 8-byte
// flits, as in the platform the design targets. Each node has a core with
// its L1 cache, a shared L2 bank and a shared memory bank attached to its
// switch. Coherence follows a full-map MSI directory with one presence bit
// per node. The flit layout, message set, address map and port numbering
// below are this design's own choices.
//
// Flit: 64 data bits plus a 2-bit flit-type sideband (head, body, tail,
// single). A head or single flit carries a hdr_t in its data bits.
// Address map: 64-byte coherence blocks (the L2 line size); the three bits
// above the block offset select the home node.
package dcos_pkg;

  // mesh geometry
  localparam int unsigned MESH_X    = 4;
  localparam int unsigned MESH_Y    = 2;
  localparam int unsigned NUM_NODES = MESH_X * MESH_Y;  // P presence bits
  localparam int unsigned NODE_W    = $clog2(NUM_NODES);

  // flit
  localparam int unsigned FLIT_W = 64;  // 8-byte flit
  localparam int unsigned ADDR_W = 32;

  // address map
  localparam int unsigned BLK_OFF_W = 6;                   // 64-byte block
  localparam int unsigned HOME_LSB  = BLK_OFF_W;           // home node bits
  localparam int unsigned IDX_LSB   = BLK_OFF_W + NODE_W;  // directory index

  // switch ports
  localparam int unsigned NUM_PORTS = 8;
  localparam int unsigned PORT_W    = 3;
  typedef enum logic [PORT_W-1:0] {
    P_NORTH = 3'd0,
    P_EAST  = 3'd1,
    P_SOUTH = 3'd2,
    P_WEST  = 3'd3,
    P_CORE  = 3'd4,  // core with L1 cache
    P_L2    = 3'd5,  // shared L2 bank
    P_MEM   = 3'd6,  // shared memory bank
    P_DIR   = 3'd7   // directory controller inside the switch
  } port_e;

  typedef logic [NODE_W-1:0] node_t;
  typedef logic [NUM_NODES-1:0] pres_t;

  typedef enum logic [1:0] {
    F_HEAD   = 2'd0,
    F_BODY   = 2'd1,
    F_TAIL   = 2'd2,
    F_SINGLE = 2'd3
  } ftype_e;

  typedef struct packed {
    ftype_e              ftype;
    logic [FLIT_W-1:0]   data;
  } flit_t;

  // destination unit inside a node
  typedef enum logic [1:0] {
    U_CORE = 2'd0,
    U_L2   = 2'd1,
    U_MEM  = 2'd2,
    U_DIR  = 2'd3
  } unit_e;

  typedef enum logic [3:0] {
    M_RD     = 4'd0,  // read request (shared copy)
    M_WR     = 4'd1,  // write request (exclusive copy)
    M_FWD_RD = 4'd2,  // read forwarded to the modified owner
    M_FWD_WR = 4'd3,  // write forwarded to the modified owner
    M_INV    = 4'd4,  // invalidate a cached copy
    M_DATA   = 4'd5   // data reply (multi-flit)
  } msg_e;

  typedef struct packed {
    msg_e              msg;
    node_t             src;   // node that sent this packet
    node_t             dst;   // destination node
    unit_e             unit;  // destination unit at dst
    node_t             req;   // original requester
    logic [ADDR_W-1:0] addr;
    logic [FLIT_W-4-3*NODE_W-2-ADDR_W-1:0] rsvd;
  } hdr_t;

  // directory states (Fig. 3: empty, shared, modified)
  typedef enum logic [1:0] {
    D_E = 2'd0,
    D_S = 2'd1,
    D_M = 2'd2
  } dstate_e;

  typedef struct packed {
    dstate_e st_l1;   // state of the L1 copies
    dstate_e st_l2;   // state of the home L2 copy
    pres_t   pres;    // full-map presence bits
  } dir_entry_t;

  // dir update inputs from the attached L2 bank and memory bank
  typedef enum logic [1:0] {
    UPD_L2_EVICT = 2'd0,  // L2 bank dropped the block
    UPD_L2_FILL  = 2'd1,  // L2 bank loaded the block
    UPD_L1_WB    = 2'd2   // a node wrote back / dropped its L1 copy
  } upd_e;

  typedef struct packed {
    upd_e              kind;
    node_t             node;
    logic [ADDR_W-1:0] addr;
  } dir_upd_t;

  function automatic node_t home_of(logic [ADDR_W-1:0] a);
    return a[HOME_LSB +: NODE_W];
  endfunction

  function automatic flit_t mk_single(hdr_t h);
    flit_t f;
    f.ftype = F_SINGLE;
    f.data  = h;
    return f;
  endfunction

endpackage
