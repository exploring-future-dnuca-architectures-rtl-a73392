// dnuca_pkg: types and constants shared by the DNUCA memory system.
//
// The system is a tiled multicore: every tile holds a private L1 data cache, one
// bank of the shared last-level cache (L2) and a network interface on a 2D-mesh
// router. Coherence is a directory MESI protocol kept by the L2 banks and carried
// by three virtual networks (VNETs): requests (VNET0), responses (VNET1) and
// forwards (VNET2), as in the baseline protocol. On top of it the L2 banks speak
// to each other for the broadcast search of migrated blocks and for block
// migration.
//
// A message travels as one wide flit holding the whole message, data line
// included (a design choice: link width and flit split are not fixed here).
// Controllers emit a destination bit mask so that one emitted message can be a
// multicast (a broadcast search, invalidations, migration notifications); the
// network interface turns it into unicast messages.
//
// Address mapping (static NUCA home): block address bits [TILE_BITS-1:0] select
// the home bank, the bits above them select the L2 set, so a block keeps the
// same set index in whatever bank it migrates to.
package dnuca_pkg;

  // ---- system size (Table 5.1: 4x4 mesh, 16 cores) ----
  localparam int unsigned MESH_X    = 4;
  localparam int unsigned MESH_Y    = 4;
  localparam int unsigned N_TILES   = MESH_X * MESH_Y;
  localparam int unsigned TILE_BITS = $clog2(N_TILES);
  localparam int unsigned NVNET     = 3;

  // ---- addresses and lines ----
  localparam int unsigned ADDR_W      = 32;          // byte address
  localparam int unsigned LINE_BYTES  = 64;
  localparam int unsigned OFFSET_BITS = $clog2(LINE_BYTES);
  localparam int unsigned BLK_W       = ADDR_W - OFFSET_BITS;
  localparam int unsigned LINE_BITS   = LINE_BYTES * 8;
  localparam int unsigned WORD_BITS   = 32;
  localparam int unsigned WORDS       = LINE_BITS / WORD_BITS;

  // congestion metric M = replacements/accesses as an unsigned fixed-point
  // fraction with METRIC_FRAC fractional bits (1.0 = 1 << METRIC_FRAC)
  localparam int unsigned METRIC_FRAC = 8;
  localparam int unsigned METRIC_W    = METRIC_FRAC + 1;

  typedef logic [TILE_BITS-1:0] tile_t;
  typedef logic [N_TILES-1:0]   tmask_t;
  typedef logic [BLK_W-1:0]     blk_t;
  typedef logic [LINE_BITS-1:0] line_t;
  typedef logic [METRIC_W-1:0]  metric_t;

  typedef enum logic [1:0] {
    UNIT_L1  = 2'd0,
    UNIT_L2  = 2'd1,
    UNIT_MEM = 2'd2
  } unit_e;

  typedef enum logic [4:0] {
    // VNET0: requests
    M_GETS      = 5'd0,   // L1 -> L2 read miss
    M_GETX      = 5'd1,   // L1 -> L2 write miss / upgrade
    M_PUTX      = 5'd2,   // L1 -> L2 write-back of an E/M line
    M_BCAST     = 5'd3,   // home L2 -> other L2s: search for a migrated block
    M_MIG_REQ   = 5'd4,   // sender L2 -> receiver L2: start a migration
    M_MEM_RD    = 5'd5,   // L2 -> memory: line fetch
    // VNET1: responses and write-back data
    M_MEM_WB    = 5'd6,   // L2 -> memory: dirty line write-back
    M_DATA_S    = 5'd7,   // L2 -> L1: shared data
    M_DATA_E    = 5'd8,   // L2 -> L1: exclusive data
    M_WB_ACK    = 5'd9,   // L2 -> L1: write-back accepted
    M_RETRY     = 5'd10,  // L2 -> L1: resend the request later
    M_INV_ACK   = 5'd11,  // L1 -> L2: invalidation done (dirty data if owner)
    M_FWD_ACK   = 5'd12,  // L1 -> L2: owner's answer to a forward, with data
    M_BC_HIT    = 5'd13,  // L2 -> home L2: block found and served
    M_BC_NACK   = 5'd14,  // L2 -> home L2: block not here
    M_BC_BUSY   = 5'd15,  // L2 -> home L2: block here but in a transaction
    M_MIG_ACK   = 5'd16,  // receiver -> sender: space allocated
    M_MIG_ABORT = 5'd17,  // receiver -> sender: migration refused
    M_MIG_DATA  = 5'd18,  // sender -> receiver: the block and its directory
    M_MIG_DONE  = 5'd19,  // receiver -> sender: block installed
    M_NTF_ACK   = 5'd20,  // L1 -> sender: location update done
    M_MEM_DATA  = 5'd21,  // memory -> L2: fetched line
    M_SB_DEC    = 5'd22,  // L2 -> home L2: a migrated block left the LLC
    // VNET2: forwards
    M_INV       = 5'd23,  // L2 -> L1: invalidate
    M_FWD_GETS  = 5'd24,  // L2 -> owner L1: give data, keep S
    M_FWD_GETX  = 5'd25,  // L2 -> owner L1: give data, invalidate
    M_MIG_NTF   = 5'd26   // sender L2 -> sharer/owner L1: new location
  } mtype_e;

  // stable L2 states (Section 4.1) plus a reserved state for a way that is
  // allocated and waiting for its data (memory fill or incoming migration)
  typedef enum logic [2:0] {
    L2_NP  = 3'd0,
    L2_SS  = 3'd1,
    L2_M   = 3'd2,
    L2_MT  = 3'd3,
    L2_RSV = 3'd4
  } l2_state_e;

  typedef struct packed {
    mtype_e    mtype;
    tile_t     src;
    unit_e     src_unit;
    tile_t     dst;       // filled by the network interface
    unit_e     dst_unit;
    tmask_t    dst_mask;  // set by the controllers (multicast allowed)
    blk_t      addr;      // block address
    tile_t     req;       // L1 requestor the transaction serves
    logic      excl;      // request kind carried by a broadcast: 1 = GETX
    logic      dirty;
    l2_state_e st;        // migrated block: its L2 state
    tmask_t    sharers;   // migrated block: its sharers
    tile_t     owner;     // migrated block: its owner
    logic [15:0] aux;     // metric of a migration request / new location
    line_t     data;
  } msg_t;

  localparam int unsigned MSG_W = $bits(msg_t);

  function automatic logic [1:0] vnet_of(mtype_e t);
    if (t <= M_MEM_RD) return 2'd0;
    else if (t <= M_SB_DEC) return 2'd1;
    else return 2'd2;
  endfunction

  function automatic tile_t home_of(blk_t a);
    return a[TILE_BITS-1:0];
  endfunction

  function automatic logic [2:0] mesh_x(tile_t t);
    return 3'(t % MESH_X);
  endfunction

  function automatic logic [2:0] mesh_y(tile_t t);
    return 3'(t / MESH_X);
  endfunction

  function automatic logic [WORD_BITS-1:0] word_of(line_t l, logic [$clog2(WORDS)-1:0] w);
    return l[w*WORD_BITS +: WORD_BITS];
  endfunction

endpackage
