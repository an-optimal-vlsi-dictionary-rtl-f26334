// dict_pkg: types and embedding tables shared by the hypercube dictionary machine.
//
// The machine runs two structures on one hypercube of 2**D processors: the snake, a
// systolic priority queue that visits every processor once, and the broadcast net, a
// pair of directed graphs G1 (broadcast) and G2 (reverse broadcast) that carry Search
// messages out from processor 0 and the answers back to it. The two use disjoint edges.
//
// Processor numbering: bit b (0-based, weight 2**b) of a processor number is the
// "(b+1)-neighbour" dimension. Bits 3..0 number a processor inside its 16-processor
// sub-hypercube (x..x0000 .. x..x1111); bits D-1..4 number the sub-hypercube.
//
// Tables taken from the figures of the published design:
//  * bcast_dist(): broadcast-net distance of every sub-hypercube processor from its root
//    x..x0000 (the numbers printed next to the nodes in the sub-hypercube drawings).
//    Sinks of G1 are 0111 and 1011 at distance 5.
//  * snake_path(): the snake inside a sub-hypercube from end A = 0000 to end B = 1110. It is
//    the only Hamiltonian path from 0000 to 1110 whose neighbours differ by at most 3 in
//    broadcast distance and whose unused edges still reach every node at its printed distance.
// Own choices: G1 inside a sub-hypercube is every edge that is not a snake edge and joins
// distance t to distance t+1; sub-hypercubes are chained by the snake in reflected-Gray
// order of bits D-1..4, with the direction of travel alternating (B-B, then A-A joins).
package dict_pkg;

  // ---------------------------------------------------------------- records, tokens
  // Key and payload widths are this design's choice (the published design leaves them open).
  localparam int KEY_W  = 16;
  localparam int DATA_W = 16;

  typedef logic [KEY_W-1:0]  key_t;
  typedef logic [DATA_W-1:0] data_t;

  // One dictionary record as held by a snake cell.
  typedef struct packed {
    logic  valid;
    key_t  key;
    data_t data;
  } rec_t;

  typedef enum logic [2:0] {
    OP_INSERT  = 3'd0,
    OP_DELETE  = 3'd1,
    OP_SEARCH  = 3'd2,
    OP_FINDMIN = 3'd3,
    OP_XMIN    = 3'd4
  } op_e;

  // Snake token kinds travelling from the head (snake position 0) to the tail.
  typedef enum logic [2:0] {
    TK_NONE  = 3'd0,
    TK_INS   = 3'd1,  // insert carried record (a displaced record keeps travelling)
    TK_DEL   = 3'd2,  // delete the record with this key, if present
    TK_XMIN  = 3'd3,  // delete whatever the receiving (head) cell holds
    TK_SHIFT = 3'd4   // predecessor holds a hole: hand my record up, pass the hole on
  } tok_kind_e;

  typedef struct packed {
    tok_kind_e kind;
    key_t      key;
    data_t     data;
  } tok_t;

  // <"broadcast",k> message on G1 (v and r are still empty on the way out).
  typedef struct packed {
    logic valid;
    key_t key;
  } smsg_t;

  // <"reverse broadcast",k,v,r> message on G2.
  typedef struct packed {
    logic  valid;
    key_t  key;
    logic  found;  // v
    data_t data;   // r
  } rmsg_t;

  // Everything one processor may drive onto one directed hypercube link. The embeddings
  // are edge-disjoint, so on a given link only the snake fields or only the broadcast
  // fields are ever non-zero.
  typedef struct packed {
    tok_t  tok;   // snake: token to the successor
    rec_t  up;    // snake: my record, to the predecessor (used after a deletion)
    smsg_t fwd;   // broadcast net G1
    rmsg_t rev;   // broadcast net G2
  } link_t;

  // Instruction presented at the I/O processor.
  typedef struct packed {
    op_e   op;
    key_t  key;
    data_t data;
  } instr_t;

  // ---------------------------------------------------------------- constants
  localparam int SUB_BITS  = 4;   // sub-hypercube of size 2**4
  localparam int SUB_N     = 16;
  localparam int SINK_DIST = 5;   // distance of the sinks of G1 inside a sub-hypercube

  // Broadcast distance from x..x0000 inside the sub-hypercube (Figure 2b numbers).
  function automatic int bcast_dist(input int v);
    case (4'(v))
      4'b0000: return 0;
      4'b0100, 4'b0010, 4'b1000: return 1;
      4'b1100, 4'b1010, 4'b1001: return 2;
      4'b1110, 4'b1101, 4'b0001: return 3;
      4'b0110, 4'b0101, 4'b0011, 4'b1111: return 4;
      default: return 5;  // 0111, 1011: the sinks of G1
    endcase
  endfunction

  // Snake inside a sub-hypercube, index 0 = end A (0000), index 15 = end B (1110).
  function automatic int snake_path(input int l);
    // binary: 0000 0001 0101 0100 0110 0010 0011 0111 1111 1101 1001 1011 1010 1000 1100 1110
    case (4'(l))
      4'd0: return 0;    4'd1: return 1;    4'd2: return 5;    4'd3: return 4;
      4'd4: return 6;    4'd5: return 2;    4'd6: return 3;    4'd7: return 7;
      4'd8: return 15;   4'd9: return 13;   4'd10: return 9;   4'd11: return 11;
      4'd12: return 10;  4'd13: return 8;   4'd14: return 12;  default: return 14;
    endcase
  endfunction

  function automatic int snake_index(input int v);
    for (int l = 0; l < SUB_N; l++)
      if (snake_path(l) == (v & 15)) return l;
    return 0;
  endfunction

  function automatic int gray(input int j);
    return j ^ (j >> 1);
  endfunction

  function automatic int gray_inv(input int g);
    int j;
    j = 0;
    for (int b = 30; b >= 0; b--)
      j = j | ((((j >> (b + 1)) ^ (g >> b)) & 1) << b);
    return j;
  endfunction

  // Processor number at snake position pos (position 0 is processor 0, the I/O processor).
  function automatic int snake_node(input int pos);
    int j, l;
    j = pos >> SUB_BITS;
    l = pos & 15;
    if ((j & 1) != 0) l = 15 - l;
    return (gray(j) << SUB_BITS) | snake_path(l);
  endfunction

  // Snake position of processor id.
  function automatic int snake_pos(input int id);
    int j, l;
    j = gray_inv(id >> SUB_BITS);
    l = snake_index(id & 15);
    if ((j & 1) != 0) l = 15 - l;
    return (j << SUB_BITS) | l;
  endfunction

  function automatic int log2_onehot(input int x);
    for (int b = 0; b < 31; b++)
      if (x == (1 << b)) return b;
    return -1;
  endfunction

  // Link dimension from processor id to its snake predecessor / successor (-1: none).
  function automatic int snake_prev_dim(input int id);
    int p;
    p = snake_pos(id);
    if (p == 0) return -1;
    return log2_onehot(id ^ snake_node(p - 1));
  endfunction

  function automatic int snake_next_dim(input int id, input int d);
    int p;
    p = snake_pos(id);
    if (p == (1 << d) - 1) return -1;
    return log2_onehot(id ^ snake_node(p + 1));
  endfunction

  // True when the local edge (v, v ^ 2**b) is used by the snake inside a sub-hypercube.
  function automatic bit local_snake_edge(input int v, input int b);
    int la, lb;
    la = snake_index(v);
    lb = snake_index(v ^ (1 << b));
    return (la - lb == 1) || (lb - la == 1);
  endfunction

  // True when the local edge from v across bit b (b < 4) is a G1 edge from v to the child.
  function automatic bit g1_child(input int v, input int b);
    int w;
    w = (v ^ (1 << b)) & 15;
    return (bcast_dist(w) == bcast_dist(v) + 1) && !local_snake_edge(v, b);
  endfunction

  // True when the local edge from v across bit b is a G1 edge into v from its parent.
  function automatic bit g1_parent(input int v, input int b);
    return g1_child((v ^ (1 << b)) & 15, b);
  endfunction

  // Merge two G1 messages that reach a processor in the same cycle (they carry one key).
  function automatic smsg_t smsg_merge(input smsg_t a, input smsg_t b);
    return a.valid ? a : b;
  endfunction

  // Merge two reverse-broadcast answers for the same Search: v is the OR, r comes from the
  // answer that found the record (a key is stored at most once, so at most one r is set).
  function automatic rmsg_t rmsg_merge(input rmsg_t a, input rmsg_t b);
    rmsg_t m;
    m.valid = a.valid | b.valid;
    m.key   = a.valid ? a.key : b.key;
    m.found = (a.valid & a.found) | (b.valid & b.found);
    m.data  = ((a.valid & a.found) ? a.data : '0) | ((b.valid & b.found) ? b.data : '0);
    return m;
  endfunction

endpackage
