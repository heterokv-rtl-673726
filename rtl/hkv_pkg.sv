// hkv_pkg: types and constants shared by the HeteroKV FPGA datapath.
//
// Keys and values are 32 bits, as in the evaluated configuration. A request
// carries one of the four KVS operations (GET, PUT, DELETE, SCAN); for a SCAN the
// value field carries the tail key. The `pad` flag marks filler entries that the
// request buffer inserts when a partial batch is flushed: it is the most
// significant bit of the sort key, so fillers always sort behind real requests.
// The B+ tree index parameters (fan-out, depth) are this design's own choice.
package hkv_pkg;

  localparam int unsigned KEY_W    = 32;
  localparam int unsigned VAL_W    = 32;
  localparam int unsigned PTR_W    = 32;   // leaf (hash table) pointer / node index
  localparam int unsigned FANOUT   = 16;   // entries per B+ tree node
  localparam int unsigned LEVELS   = 3;    // levels of the index (Fig. 2: 3-level HOBT)
  localparam int unsigned CNT_W    = $clog2(FANOUT + 1);
  localparam int unsigned BATCH    = 8192; // requests per batch (8K)

  typedef enum logic [1:0] {
    KV_GET    = 2'd0,
    KV_PUT    = 2'd1,
    KV_DELETE = 2'd2,
    KV_SCAN   = 2'd3
  } kv_op_e;

  typedef struct packed {
    logic              pad;    // filler entry of a flushed partial batch
    kv_op_e            op;
    logic [KEY_W-1:0]  key;    // key, or head_key of a SCAN
    logic [VAL_W-1:0]  value;  // value of a PUT, tail_key of a SCAN
  } kv_req_t;

  localparam int unsigned KV_REQ_W = $bits(kv_req_t);

  // Sort key: fillers sort last, then by key. Equal keys keep arrival order.
  function automatic logic [KEY_W:0] sort_key(input kv_req_t r);
    return {r.pad, r.key};
  endfunction

  // Operations of the hardware-oriented B+ tree (HOBT).
  typedef enum logic [1:0] {
    T_SEARCH = 2'd0,   // look up the leaf of a key (downstream only)
    T_INSERT = 2'd1,   // add separator {key, ptr} for a new leaf (after a split)
    T_DELETE = 2'd2,   // remove the separator of a deleted leaf
    T_NOP    = 2'd3    // end-of-batch marker, passes untouched
  } tree_op_e;

  typedef logic [LEVELS-1:0][PTR_W-1:0] tree_path_t;

  typedef struct packed {
    tree_op_e          op;
    logic [KEY_W-1:0]  key;
    logic [PTR_W-1:0]  ptr;    // new leaf pointer for T_INSERT
    kv_req_t           req;    // request being dispatched (T_SEARCH)
    logic              last;   // last entry of a batch
  } tree_req_t;

  // Operation travelling downstream between level PEs.
  typedef struct packed {
    tree_req_t         t;
    tree_path_t        path;   // node index visited at each level
    logic              room;   // a split arriving from below would be absorbed
  } tree_down_t;

  // Split travelling upstream: insert {key, ptr} into node path[level] of the parent.
  typedef struct packed {
    logic [KEY_W-1:0]  key;
    logic [PTR_W-1:0]  ptr;
    tree_path_t        path;
    logic [KEY_W-1:0]  tag;    // key of the update that started the split chain
  } tree_up_t;

  typedef struct packed {
    logic [FANOUT-1:0][KEY_W-1:0] keys;
    logic [FANOUT-1:0][PTR_W-1:0] ptrs;
    logic [CNT_W-1:0]             cnt;
  } tree_node_t;

  // Result leaving the bottom level.
  typedef struct packed {
    tree_op_e          op;
    logic [PTR_W-1:0]  leaf;   // leaf pointer (T_SEARCH)
    kv_req_t           req;
    logic              last;
    logic              ok;     // update applied / search found a leaf
  } tree_resp_t;

  // Head table entry: leaf pointer and number of requests for that leaf.
  typedef struct packed {
    logic [PTR_W-1:0]  ptr;
    logic [31:0]       num;
  } head_entry_t;

endpackage
