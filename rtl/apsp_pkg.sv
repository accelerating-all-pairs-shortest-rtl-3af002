// apsp_pkg: types and constants shared by the APSP message-passing kernels.
//
// The architecture keeps three data structures in shared memory, addressed
// here in 64-bit words: the current and next message queues (two regions that
// swap roles every superstep), the CSR column-index vector C, and the n x n
// distance matrix d.  A distance word follows the bit layout of the multi-step
// APSP algorithm: while d(u,w) is unvisited it holds the start of w's
// adjacency list in [63:32], its length in [31:1] and a clear visit flag in
// [0]; once visited it holds the BFS level in [63:32] and a set flag.
// A queue message <u, start, count> is packed into one 64-bit word; the field
// widths (16/24/24 bits) are this design's choice, sized for graphs of up to
// 2^16 nodes and 2^24 edges.
package apsp_pkg;

  localparam int unsigned DATA_W  = 64;   // memory word width
  localparam int unsigned ADDR_W  = 48;   // word address width
  localparam int unsigned NODE_W  = 16;   // node identifier width
  localparam int unsigned PTR_W   = 24;   // pointer into C carried in a message
  localparam int unsigned CNT_W   = 24;   // adjacency list length in a message
  localparam int unsigned LEVEL_W = 32;   // BFS level (superstep number)
  localparam int unsigned QIDX_W  = 32;   // index into a message queue
  localparam int unsigned KID_W   = 16;   // kernel index
  localparam int unsigned CTX_W   = 2 * NODE_W;  // per-request context in a tag
  localparam int unsigned SRC_W   = 3;           // request source id in a tag
  localparam int unsigned TAG_W   = SRC_W + CTX_W;

  // Request sources, in the order the requests multiplexer scans them.
  typedef enum logic [SRC_W-1:0] {
    SRC_QC_RD = 3'd0,  // process 1: read a message from the current queue
    SRC_C_RD  = 3'd1,  // process 2: read a neighbour from C
    SRC_D_RD  = 3'd2,  // process 3: read d(u,w)
    SRC_D_WR  = 3'd3,  // process 4: write d(u,w)
    SRC_QN_WR = 3'd4   // Block 3: write a message to the next queue
  } src_e;
  localparam int unsigned NUM_SRC = 5;

  typedef logic [NODE_W-1:0]  node_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [LEVEL_W-1:0] level_t;
  typedef logic [QIDX_W-1:0]  qidx_t;

  // Traversal task held in Q_c / Q_n.
  typedef struct packed {
    node_t             u;      // source node of the BFS this task belongs to
    logic [PTR_W-1:0]  start;  // first entry of the adjacency list in C
    logic [CNT_W-1:0]  count;  // number of entries
  } msg_t;

  // Request from a process towards the requests multiplexer (untagged).
  typedef struct packed {
    logic              write;
    addr_t             addr;
    word_t             data;
    logic [CTX_W-1:0]  ctx;
  } proc_req_t;

  // Memory controller port, request side (valid/ready handshake).
  typedef struct packed {
    logic              valid;
    logic              write;
    addr_t             addr;
    word_t             data;
    logic [TAG_W-1:0]  tag;
  } mc_req_t;

  // Memory controller port, response side (read data or write acknowledge).
  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    word_t             data;
  } mc_rsp_t;

  // Communication token circulating through the kernel ring.
  typedef struct packed {
    logic    valid;
    logic    done;     // no work left: execution has terminated
    logic    idle;     // every kernel passed so far this round is idle
    level_t  level;    // current superstep / BFS level
    qidx_t   qc_size;  // number of messages in Q_c for this level
    qidx_t   count;    // slots of Q_n reserved so far
  } token_t;

  // Run-time parameters, passed from kernel to kernel at initialisation.
  typedef struct packed {
    logic               valid;
    logic [KID_W-1:0]   kernel_id;    // incremented by every kernel
    logic [KID_W-1:0]   num_kernels;
    logic [31:0]        num_nodes;    // n
    addr_t              d_base;
    addr_t              c_base;
    addr_t              q0_base;      // Q_c at level 1 (holds the initial tasks)
    addr_t              q1_base;
    qidx_t              init_count;   // number of initial tasks in q0
  } kcfg_t;

  // Distance word helpers (bit layout of the multi-step APSP algorithm).
  function automatic word_t visited_word(level_t lvl);
    return {lvl, 31'd0, 1'b1};
  endfunction

  function automatic msg_t task_from_dist(node_t u, word_t d);
    msg_t m;
    m.u     = u;
    m.start = d[32 +: PTR_W];
    m.count = d[1 +: CNT_W];
    return m;
  endfunction

endpackage
