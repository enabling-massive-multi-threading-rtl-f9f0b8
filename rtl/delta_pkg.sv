// delta_pkg -- types and constants shared by the thread-scheduling fabric.
//
// A thread identifier (T_id) is a 64-bit word made of a source field, a
// destination field and a per-tile creation counter (CNT). Each of the two
// address fields holds a virtual-node identifier (N_id) and a core identifier
// inside that virtual node (C_id). The 64-bit total and the three-field layout
// follow the architecture; the split into 8+8+8+8+32 bits is this design's
// choice (8-bit N_id/C_id fields are enough for 256 tiles).
//
// A virtual node (VN) is a group of 2^vn_log consecutive tiles. A tile with
// linear index t belongs to VN N_id = t >> vn_log and is core C_id =
// t mod 2^vn_log inside it, so {N_id, C_id} maps back to t = N_id*2^vn_log+C_id.
//
// The packet is the single-flit message carried by the mesh between Thread
// Dispatchers: thread creation, frame write, scheduling-slot decrement and
// thread deletion.
package delta_pkg;

  localparam int unsigned ID_W   = 8;    // width of an N_id or C_id field
  localparam int unsigned CNT_W  = 32;   // local creation counter in the T_id
  localparam int unsigned DATA_W = 32;   // frame / scratchpad word
  localparam int unsigned OFF_W  = 16;   // frame offset F_o carried by a message
  localparam int unsigned SS_W   = 16;   // scheduling-slot counter
  localparam int unsigned VNL_W  = 4;    // width of log2(VN size)

  typedef struct packed {
    logic [ID_W-1:0] nid;
    logic [ID_W-1:0] cid;
  } pe_addr_t;

  typedef struct packed {
    pe_addr_t          src;
    pe_addr_t          dst;
    logic [CNT_W-1:0]  cnt;
  } tid_t;

  // Thread-management instructions a processing element issues to its
  // Thread Dispatcher.
  typedef enum logic [2:0] {
    OP_CREATE_THREAD = 3'd0,
    OP_CREATE_AF     = 3'd1,
    OP_READ_DATA     = 3'd2,
    OP_WRITE_DATA    = 3'd3,
    OP_DECREASE_SS   = 3'd4,
    OP_DELETE_THREAD = 3'd5,
    OP_SET_VN        = 3'd6
  } op_e;

  // Request from a PE: which operands matter depends on the operation.
  //   CREATE_*    : data = initial scheduling slot of the new thread
  //   READ_DATA   : tid, off
  //   WRITE_DATA  : tid (consumer), off, data
  //   DECREASE_SS : tid (consumer), data = amount
  //   DELETE_THREAD: tid
  //   SET_VN      : data = log2 of the VN size
  typedef struct packed {
    op_e               op;
    tid_t              tid;
    logic [OFF_W-1:0]  off;
    logic [DATA_W-1:0] data;
  } pe_req_t;

  // Answer to a PE request: the new T_id for CREATE_*, the frame word for
  // READ_DATA (ok = 0 when the thread is not in the local table).
  typedef struct packed {
    logic        ok;
    logic [63:0] data;
  } pe_rsp_t;

  typedef enum logic [1:0] {
    PK_CREATE = 2'd0,
    PK_WRITE  = 2'd1,
    PK_DEC    = 2'd2,
    PK_DELETE = 2'd3
  } pkt_kind_e;

  typedef struct packed {
    pkt_kind_e         kind;
    logic [ID_W-1:0]   dst_tile;
    tid_t              tid;
    logic [OFF_W-1:0]  off;
    logic [DATA_W-1:0] data;
  } pkt_t;

  // Linear tile index of a <N_id, C_id> pair for the given VN size.
  function automatic logic [ID_W-1:0] tile_of(pe_addr_t a, logic [VNL_W-1:0] vn_log);
    return (a.nid << vn_log) | a.cid;
  endfunction

  // <N_id, C_id> of a tile for the given VN size.
  function automatic pe_addr_t addr_of(logic [ID_W-1:0] tile, logic [VNL_W-1:0] vn_log);
    pe_addr_t a;
    a.nid = tile >> vn_log;
    a.cid = tile & ID_W'((1 << vn_log) - 1);
    return a;
  endfunction

endpackage
