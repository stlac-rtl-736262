// stlac_pkg: constants and types shared by the STLAC cache/NoC codesign.
//
// The tiled system is a 4x4 mesh. Every tile holds one last-level cache
// slice of 128 KB, 8 ways and 64-byte blocks whose ways are split between a
// victim part and a prefetch part, plus a burst-support router with 128-bit
// channels and dimension-order routing. These numbers follow the evaluated
// configuration. The flit format, the message classes, the address split and
// the home-node mapping are choices of this design and are documented next to
// each definition.
package stlac_pkg;

  // ---------------------------------------------------------------- mesh
  localparam int MESH_X   = 4;
  localparam int MESH_Y   = 4;
  localparam int NODES    = MESH_X * MESH_Y;
  localparam int COORD_W  = 2;              // enough for a 4x4 mesh
  localparam int NODE_W   = $clog2(NODES);

  // Router ports. x grows to the east, y grows to the south.
  localparam int NPORTS   = 5;
  localparam int P_LOCAL  = 0;
  localparam int P_NORTH  = 1;
  localparam int P_EAST   = 2;
  localparam int P_SOUTH  = 3;
  localparam int P_WEST   = 4;

  // Virtual channels: one per message class so that requests can never block
  // the replies they wait for. VC0 carries requests and write-backs, VC1
  // carries replies (normal packet-switched ones and bursts alike).
  localparam int NVC      = 2;
  localparam int VC_W     = 1;
  localparam int VC_REQ   = 0;
  localparam int VC_RESP  = 1;
  localparam int VC_DEPTH = 4;              // flits per VC input buffer

  // ---------------------------------------------------------------- memory
  localparam int FLIT_W        = 128;       // channel width
  localparam int BLOCK_BYTES   = 64;
  localparam int BLOCK_BITS    = BLOCK_BYTES * 8;
  localparam int FLITS_PER_BLK = BLOCK_BITS / FLIT_W;   // 4
  localparam int ADDR_W        = 29;        // 512 MB of main memory
  localparam int BLK_ADDR_W    = ADDR_W - $clog2(BLOCK_BYTES);  // 23
  localparam int PREF_LEN      = 4;         // blocks per burst prefetch
  localparam int LEN_W         = 4;

  // Home node of a block: blocks are interleaved over the tiles in 4 KB pages
  // (64 blocks), so the blocks a prefetch asks for all live at one home.
  localparam int PAGE_BLK_BITS = 6;

  typedef logic [BLK_ADDR_W-1:0] blk_addr_t;
  typedef logic [BLOCK_BITS-1:0] block_t;

  function automatic logic [NODE_W-1:0] home_of(input blk_addr_t a);
    return a[PAGE_BLK_BITS +: NODE_W];
  endfunction

  // Blocks left in the page of a, counting a itself.
  function automatic int page_left(input blk_addr_t a);
    return (1 << PAGE_BLK_BITS) - int'(a[PAGE_BLK_BITS-1:0]);
  endfunction

  // ---------------------------------------------------------------- flits
  typedef struct packed {
    logic              head;
    logic              tail;
    logic              burst;   // part of a burst packet (priority, switch lock)
    logic [VC_W-1:0]   vc;
    logic [FLIT_W-1:0] data;
  } flit_t;

  typedef enum logic [2:0] {
    MSG_READ   = 3'd0,   // demand read of one block
    MSG_PREF   = 3'd1,   // prefetch: ask the home for LEN blocks from ADDR on
    MSG_WB     = 3'd2,   // write-back of one dirty block to its home
    MSG_DATA   = 3'd3,   // demand reply, one block, packet switched
    MSG_BURST  = 3'd4    // prefetch reply, LEN blocks in one burst packet
  } msg_t;

  // Header carried in the data field of a head flit.
  typedef struct packed {
    logic [FLIT_W-3-LEN_W-4*COORD_W-BLK_ADDR_W-1:0] pad;
    msg_t                  mtype;
    logic [LEN_W-1:0]      len;
    logic [COORD_W-1:0]    dst_x;
    logic [COORD_W-1:0]    dst_y;
    logic [COORD_W-1:0]    src_x;
    logic [COORD_W-1:0]    src_y;
    blk_addr_t             addr;
  } hdr_t;

  // ---------------------------------------------------------------- cache
  typedef enum logic [1:0] {
    COP_LOOKUP = 2'd0,   // demand read from the core side
    COP_VICTIM = 2'd1,   // block evicted from L1, goes to the victim part
    COP_PREF   = 2'd2    // prefetched block, goes to the prefetch part
  } cop_t;

  typedef enum logic {
    PART_VICTIM = 1'b0,
    PART_PREF   = 1'b1
  } part_t;

  // Core-side reply source, for statistics.
  typedef enum logic [1:0] {
    SRC_VICTIM = 2'd0,
    SRC_PREF   = 2'd1,
    SRC_MEM    = 2'd2
  } src_t;

  // Round-robin pick: first set bit of req at or after ptr (req up to 16 wide).
  function automatic logic [3:0] rr_pick(input logic [15:0] req, input logic [3:0] ptr, input int n);
    logic [3:0] idx;
    rr_pick = ptr;
    for (int k = n - 1; k >= 0; k--) begin
      idx = 4'((int'(ptr) + k) % n);
      if (req[idx]) rr_pick = idx;
    end
  endfunction

endpackage
