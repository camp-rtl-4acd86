// camp_pkg: widths, record formats and result codes shared by the CAMP lookup engine.
//
// CAMP (circular, adaptive and monotonic pipeline) performs IPv4 longest-prefix match by walking
// a uni-bit trie whose nodes are spread over a ring of memory stages. The records below are the
// words that move between the blocks:
//   node_ptr_t   - where a trie node lives: its stage on the ring and its address in that stage,
//                  and whether it is the root of a child sub-trie that the lookup must enter
//                  again through that stage's request queue (adaptive splitting of a trie).
//   trie_node_t  - one uni-bit trie node: an optional prefix marker (next hop) and two child
//                  pointers, one per value of the next address bit (no leaf pushing).
//   dt_entry_t   - one entry of the direct lookup table for the initial stride: the root of the
//                  sub-trie that continues below it (if any) and the best prefix no longer than
//                  the initial stride.
//   lookup_req_t - a lookup in flight: its order tag, the destination address, how many address
//                  bits are consumed, the node it needs next, the best match found so far and
//                  whether it is on its way to re-enter at a child sub-trie root.
//   lookup_res_t - a finished lookup: its tag, a status and the next hop.
// The 32-bit address and the two-pointer node follow the design; the node-address, next-hop and
// tag widths are this implementation's choices (the source names no figures for them).
package camp_pkg;

  localparam int unsigned ADDR_W  = 32;  // IPv4 destination address
  localparam int unsigned DEPTH_W = 6;   // bit position 0..32
  localparam int unsigned STAGE_W = 5;   // up to 32 pipeline stages on the ring
  localparam int unsigned NODE_AW = 15;  // 32768 trie nodes per stage memory
  localparam int unsigned NH_W    = 8;   // next-hop identifier
  localparam int unsigned TAG_W   = 8;   // up to 256 lookups in flight (reorder buffer depth)

  typedef struct packed {
    logic               valid;
    logic               xfer;    // target is the root of a separately mapped child sub-trie
    logic [STAGE_W-1:0] stage;
    logic [NODE_AW-1:0] addr;
  } node_ptr_t;

  typedef struct packed {
    logic                pfx_valid;  // a prefix ends at this node
    logic [NH_W-1:0]     pfx_nh;     // its next hop
    node_ptr_t [1:0]     child;      // child[b]: the node reached when the next bit is b
  } trie_node_t;

  typedef struct packed {
    node_ptr_t           root;       // root node of the sub-trie below this entry
    logic                pfx_valid;  // best prefix of length <= initial stride
    logic [NH_W-1:0]     pfx_nh;
  } dt_entry_t;

  typedef struct packed {
    logic                valid;
    logic [TAG_W-1:0]    tag;
    logic [ADDR_W-1:0]   daddr;
    logic [DEPTH_W-1:0]  depth;      // number of address bits already consumed
    logic [STAGE_W-1:0]  stage;      // stage holding the node this lookup needs next
    logic [NODE_AW-1:0]  addr;       // address of that node in the stage memory
    logic                best_valid; // longest prefix matched so far
    logic [NH_W-1:0]     best_nh;
    logic                xfer;       // heading for a child sub-trie root, to re-enter via its queue
  } lookup_req_t;

  typedef enum logic [1:0] {
    RES_MATCH    = 2'd0,  // next hop found
    RES_NO_MATCH = 2'd1,  // no prefix covers the address
    RES_DROPPED  = 2'd2   // discarded: the request queue of its entry stage was full
  } res_status_t;

  typedef struct packed {
    logic [TAG_W-1:0]    tag;
    res_status_t         status;
    logic [NH_W-1:0]     nh;
  } lookup_res_t;

endpackage
