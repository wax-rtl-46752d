// wax_pkg: constants and types shared by the WAX accelerator.
//
// WAX places a narrow array of 8-bit MACs beside every SRAM subarray of a
// cache-like memory. A tile row is 24 bytes wide, split into 4 partitions
// of 6 bytes; with 3-wide kernels each partition holds two kernel windows
// ("groups"). A bank has four 6 KB subarrays fed by a 72-bit H-tree that
// splits into four 18-bit leaves. The chip has 4 banks; 7 tiles carry MACs
// and the other 9 act as output tiles. These numbers follow the document.
// The micro-op and command encodings below are this design's own.
package wax_pkg;

  // ---------------- tile geometry ----------------
  localparam int unsigned ROW_BYTES  = 24;              // bytes per subarray row / MACs per tile
  localparam int unsigned ROW_BITS   = ROW_BYTES * 8;   // 192
  localparam int unsigned PARTS      = 4;               // partitions per row (WAXFlow-3)
  localparam int unsigned PART_W     = ROW_BYTES / PARTS; // 6 bytes per partition
  localparam int unsigned KW         = 3;               // kernel elements per group
  localparam int unsigned GROUPS     = PART_W / KW;     // 2 kernel groups per partition
  localparam int unsigned ROWS       = 256;             // 6 KB / 24 B
  localparam int unsigned ADDR_W     = $clog2(ROWS);    // 8
  localparam int unsigned IDX_W      = $clog2(ROW_BYTES); // 5: index of a byte in a row

  // ---------------- interconnect ----------------
  localparam int unsigned LINK_W     = 18;              // H-tree leaf width per subarray
  localparam int unsigned SUBS       = 4;               // subarrays per bank
  localparam int unsigned ROOT_W     = LINK_W * SUBS;   // 72-bit bank/off-chip bus
  localparam int unsigned BEATS      = (ROW_BITS + LINK_W - 1) / LINK_W; // 11 beats per row
  localparam int unsigned BEAT_W     = $clog2(BEATS + 1);
  localparam int unsigned BANKS      = 4;
  localparam int unsigned TILES      = BANKS * SUBS;    // 16
  localparam int unsigned MAC_TILES  = 7;
  localparam int unsigned TILE_W     = $clog2(TILES);

  typedef logic [7:0]          byte_t;
  typedef byte_t [ROW_BYTES-1:0] row_t;     // packed 192-bit row, byte i at bits [8i+7:8i]
  typedef logic [15:0]         prod_t;      // 16-bit product / adder width
  typedef logic [ADDR_W-1:0]   addr_t;
  typedef logic [IDX_W-1:0]    idx_t;

  // Arithmetic: 8x8 products and sums are formed in 16-bit adders and the
  // result is truncated to its low 8 bits (two's complement wrap).
  function automatic byte_t trunc8(input prod_t v);
    return v[7:0];
  endfunction

  // ---------------- tile micro-op ----------------
  // One subarray access and one MAC operation may be issued in the same cycle.
  typedef enum logic [2:0] {
    MEM_NONE = 3'd0,
    MEM_RD_A = 3'd1,   // subarray row -> A register
    MEM_RD_W = 3'd2,   // subarray row -> W register
    MEM_RD_P = 3'd3,   // subarray row -> P register
    MEM_WR_P = 3'd4    // P register   -> subarray row
  } mem_op_e;

  typedef struct packed {
    mem_op_e      mem_op;
    addr_t        addr;
    logic         clr_p;     // clear P (takes effect at the end of the cycle)
    logic         mac_en;    // multiply A*W and accumulate sums into P
    logic         fc;        // 1: FC reduction (24 -> 1), 0: conv reduction (24 -> 2)
    logic         shift;     // rotate A (each partition) after this cycle
    logic [GROUPS-1:0] acc_en; // per sum: accumulate into P[idx[g]]
    idx_t [GROUPS-1:0] idx;
  } tile_op_t;

  // ---------------- H-tree leaf signals ----------------
  typedef struct packed {
    logic              valid;
    logic [LINK_W-1:0] data;
    addr_t             addr;   // destination row, held for the whole row
    logic              acc;    // 1: add the row into the stored row (Y-accumulate)
  } leaf_dn_t;

  typedef struct packed {
    logic              valid;
    logic [LINK_W-1:0] data;
  } leaf_up_t;

  // ---------------- host commands ----------------
  typedef enum logic [2:0] {
    CMD_LOAD = 3'd0,   // 11 beats of 72 bits from off-chip into row dst_row of the
                       // subarrays of bank dst_tile/4 selected by lane_mask
    CMD_MOVE = 3'd1,   // row src_row of tile src_tile -> row dst_row of tile dst_tile
                       // (sibling in the same bank: through the split-point mux;
                       // otherwise through the central controller)
    CMD_READ = 3'd2,   // row src_row of tile src_tile -> host output stream
    CMD_CONV = 3'd3,   // one WAXFlow-3 slice on every MAC tile
    CMD_FC   = 3'd4    // one fully-connected activation-row pass on every MAC tile
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e            op;
    logic [TILE_W-1:0]  src_tile;
    logic [TILE_W-1:0]  dst_tile;
    addr_t              src_row;
    addr_t              dst_row;
    logic [SUBS-1:0]    lane_mask;
    logic               acc;       // MOVE: accumulate into destination (Y-accumulate)
    // compute fields
    addr_t              a_row;
    addr_t              w_row;
    addr_t              p_row;
    logic               ld_a;      // read a_row into A first (else reuse A)
    logic               ld_p;      // read p_row into P first
    logic               clr_p;     // clear P first (when not ld_p)
    logic               st_p;      // write P to p_row at the end
    logic               p_slot;    // CONV: which half of P receives this slice
    logic [IDX_W:0]     n_rows;    // FC: number of kernel rows (1..24)
    idx_t               p_base;    // FC: P entry of the first kernel row
    logic               nowait;    // skip the ordering against the other engine
                                   // (host guarantees the rows do not overlap)
  } cmd_t;

endpackage
